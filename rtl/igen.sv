// igen: Immediate Generator (IGEN).
//
// Runs in parallel with RGEN and TGEN: from the Op codeword it produces, for
// each instruction of the tree-pattern, the Immediate Dictionary bank select
// BSEL and bank address BADDR of that instruction's immediate, plus a flag
// for instructions that take none. Like rgen it is built in dictionary form:
// a table maps the Op rank to the first immediate record, and a step counter
// walks the records. The published scheme names IGEN as a state machine and gives
// its outputs; the dictionary form is this design's choice.
//
// Timing: as rgen. start reads the base table, rd_en reads the record of the
// current step (outputs valid the next cycle), next advances the step.
module igen
  import ofz_pkg::*;
#(
  parameter int unsigned OP_PATTERNS  = 16384,
  parameter int unsigned OPR_DEPTH    = 65536,
  parameter int unsigned MAX_TREE_LEN = 16,
  localparam int unsigned TAW = $clog2(OP_PATTERNS),
  localparam int unsigned RAW = $clog2(OPR_DEPTH),
  localparam int unsigned SW  = $clog2(MAX_TREE_LEN)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we_base,
  input  logic               we_rec,
  input  logic [RAW-1:0]     wr_addr,   // rank for we_base, record for we_rec
  input  logic [RAW-1:0]     wr_base,
  input  immsel_t            wr_rec,
  input  logic               start,
  input  logic [RANK_W-1:0]  rank,
  input  logic               next,
  input  logic               rd_en,
  output logic               has_imm,
  output logic [BSEL_W-1:0]  bsel,
  output logic [BADDR_W-1:0] baddr
);

  logic [RAW-1:0] base_tab_q [OP_PATTERNS];
  immsel_t        rec_q      [OPR_DEPTH];
  logic [RAW-1:0] base_q;
  logic [SW-1:0]  step_q;
  immsel_t        out_q;

  always_ff @(posedge clk) begin
    if (we_base) base_tab_q[TAW'(wr_addr)] <= wr_base;
    if (we_rec) rec_q[wr_addr] <= wr_rec;
    if (start) base_q <= base_tab_q[TAW'(rank)];
    if (rd_en) out_q <= rec_q[base_q + RAW'(step_q)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     step_q <= '0;
    else if (start) step_q <= '0;
    else if (next)  step_q <= step_q + 1'b1;
  end

  assign has_imm = out_q.has_imm;
  assign bsel    = out_q.bsel;
  assign baddr   = out_q.baddr;

endmodule

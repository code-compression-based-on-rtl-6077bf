// rgen: Register Generator (RGEN).
//
// Turns the Op codeword into the register operands of each instruction of
// the tree-pattern, one instruction per step, on the RD, RS1 and RS2 buses.
// The published scheme describes RGEN as a state machine whose state counts the
// instructions of the pattern and whose logic is minimised per program; it
// bounds its size by a dictionary of all operand-patterns. This module is
// that dictionary form: a table maps the Op rank to the first register record
// of the operand-pattern, and a step counter (the state, bounded by
// MAX_TREE_LEN) walks through the pattern's records. Fields that an
// instruction does not use simply hold whatever the record was loaded with.
//
// Timing: start (with rank) reads the base table; rd_en in a later cycle
// reads the record of the current step, which appears on rd/rs1/rs2 the
// cycle after and stays until the next rd_en; next advances the step.
module rgen
  import ofz_pkg::*;
#(
  parameter int unsigned OP_PATTERNS  = 16384,
  parameter int unsigned OPR_DEPTH    = 65536,
  parameter int unsigned MAX_TREE_LEN = 16,
  localparam int unsigned TAW = $clog2(OP_PATTERNS),
  localparam int unsigned RAW = $clog2(OPR_DEPTH),
  localparam int unsigned SW  = $clog2(MAX_TREE_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we_base,
  input  logic              we_rec,
  input  logic [RAW-1:0]    wr_addr,   // rank for we_base, record for we_rec
  input  logic [RAW-1:0]    wr_base,
  input  regs_t             wr_rec,
  input  logic              start,
  input  logic [RANK_W-1:0] rank,
  input  logic              next,
  input  logic              rd_en,
  output logic [REG_W-1:0]  rd,
  output logic [REG_W-1:0]  rs1,
  output logic [REG_W-1:0]  rs2,
  output logic              rank_err
);

  logic [RAW-1:0] base_tab_q [OP_PATTERNS];
  regs_t          rec_q      [OPR_DEPTH];
  logic [RAW-1:0] base_q;
  logic [SW-1:0]  step_q;
  regs_t          out_q;

  always_ff @(posedge clk) begin
    if (we_base) base_tab_q[TAW'(wr_addr)] <= wr_base;
    if (we_rec) rec_q[wr_addr] <= wr_rec;
    if (start) base_q <= base_tab_q[TAW'(rank)];
    if (rd_en) out_q <= rec_q[base_q + RAW'(step_q)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q   <= '0;
      rank_err <= 1'b0;
    end else if (start) begin
      step_q   <= '0;
      rank_err <= (32'(rank) >= OP_PATTERNS);
    end else if (next) begin
      step_q   <= step_q + 1'b1;
    end
  end

  assign rd  = out_q.rd;
  assign rs1 = out_q.rs1;
  assign rs2 = out_q.rs2;

endmodule

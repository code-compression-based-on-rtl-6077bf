// iab: Instruction Assembly Buffer (IAB).
//
// Puts together one uncompressed MIPS R2000 instruction from the TPD entry
// (OPCODE, ITYPE), the register buses RD/RS1/RS2 and the immediate bus IMB,
// and queues it for the processor. ITYPE tells where each field goes
// (see ofz_pkg); IMB is truncated to the width the format needs: 5 bits for
// a shift amount, 16 for an immediate or branch, 26 for a jump target. The
// published scheme gives the IAB's function; the field placement follows the R2000
// formats and the queue of IAB_DEPTH instructions is this design's choice.
//
// Timing: push writes the assembled instruction in the same clock edge and
// must only be asserted when full is low; level is the number of queued
// instructions, for a producer that reserves room ahead. The output side is
// a valid/ready stream, first in first out; flush empties the queue (used on
// a branch).
module iab
  import ofz_pkg::*;
#(
  parameter int unsigned IAB_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  tpd_entry_t       entry,
  input  logic [REG_W-1:0] rd,
  input  logic [REG_W-1:0] rs1,
  input  logic [REG_W-1:0] rs2,
  input  logic [IMB_W-1:0] imb,
  output logic             full,
  output logic [$clog2(IAB_DEPTH):0] level,
  output logic             insn_valid,
  input  logic             insn_ready,
  output logic [31:0]      insn
);

  localparam int unsigned PW = $clog2(IAB_DEPTH);

  logic [31:0] asm_w;
  logic [5:0]  op, funct;

  always_comb begin
    op    = entry.opcode[11:6];
    funct = entry.opcode[5:0];
    unique case (entry.itype)
      IT_R3:     asm_w = {op, rs1, rs2, rd, 5'd0, funct};
      IT_RSH:    asm_w = {op, 5'd0, rs1, rd, imb[4:0], funct};
      IT_IALU:   asm_w = {op, rs1, rd, imb[15:0]};
      IT_ISTORE: asm_w = {op, rs1, rs2, imb[15:0]};
      IT_LUI:    asm_w = {op, 5'd0, rd, imb[15:0]};
      IT_REGIMM: asm_w = {op, rs1, funct[4:0], imb[15:0]};
      IT_J:      asm_w = {op, imb[25:0]};
      IT_RAW:    asm_w = {op, 20'd0, funct};
      default:   asm_w = '0;
    endcase
  end

  logic [31:0]  q_mem [IAB_DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [PW:0]   cnt_q;
  logic          pop;

  assign full       = (cnt_q == (PW+1)'(IAB_DEPTH));
  assign level      = cnt_q;
  assign insn_valid = (cnt_q != '0);
  assign insn       = q_mem[rp_q];
  assign pop        = insn_valid && insn_ready;

  always_ff @(posedge clk) begin
    if (push && !full) q_mem[wp_q] <= asm_w;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push && !full) wp_q <= (wp_q == PW'(IAB_DEPTH - 1)) ? '0 : wp_q + 1'b1;
      if (pop)           rp_q <= (rp_q == PW'(IAB_DEPTH - 1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push && !full) - (PW+1)'(pop);
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n || flush)
    !(push && full));

endmodule

// tpd: Tree-pattern Dictionary (TPD).
//
// Holds, for every tree-pattern, the opcodes of its instructions as
// consecutive entries {OPCODE, ITYPE, END}, as in the published scheme: OPCODE is the
// opcode bits of one instruction, ITYPE its format, and END marks the last
// instruction of the pattern. OPCODE is 12 bits here ({op, funct} of the
// MIPS R2000), the 3-bit ITYPE is encoded as in ofz_pkg.
//
// Timing: synchronous read; rd_entry holds the entry at rd_addr from the
// cycle after rd_en, and keeps it until the next rd_en. One write port loads
// the dictionary.
module tpd
  import ofz_pkg::*;
#(
  parameter int unsigned TPD_DEPTH = 8192,
  localparam int unsigned DAW = $clog2(TPD_DEPTH)
) (
  input  logic       clk,
  input  logic       we,
  input  logic [DAW-1:0] wr_addr,
  input  tpd_entry_t wr_entry,
  input  logic       rd_en,
  input  logic [DAW-1:0] rd_addr,
  output tpd_entry_t rd_entry
);

  tpd_entry_t mem_q [TPD_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem_q[wr_addr] <= wr_entry;
    if (rd_en) rd_entry <= mem_q[rd_addr];
  end

endmodule

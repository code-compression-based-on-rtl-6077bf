// imd: Immediate Dictionary (IMD).
//
// Stores every distinct immediate of the program once, in banks sorted by
// size: bank k holds 2^(k+1)-bit values (2, 4, 8, ..., 2^NBANKS bits), as in
// the published engine, so a small constant costs few bits. BSEL chooses the
// bank and BADDR the entry; a multiplexer puts the value on the immediate
// bus IMB, sign-extended to 32 bits (this design's choice: the assembler
// takes only the low bits it needs, so any value is stored in the smallest
// bank that holds its significant low bits). The top bank of 32 bits holds
// branch targets {addr[20:0], offset[4:0]}.
//
// Timing: synchronous read. rd_en reads all banks at baddr and registers
// bsel; imb is valid the cycle after and holds until the next rd_en.
module imd
  import ofz_pkg::*;
#(
  parameter int unsigned NBANKS     = 5,
  parameter int unsigned BANK_DEPTH = 1024,
  localparam int unsigned AW = $clog2(BANK_DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [BSEL_W-1:0] wr_bank,
  input  logic [AW-1:0]     wr_addr,
  input  logic [IMB_W-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [BSEL_W-1:0] bsel,
  input  logic [AW-1:0]     baddr,
  output logic [IMB_W-1:0]  imb
);

  logic [IMB_W-1:0]  bank_out [NBANKS];
  logic [BSEL_W-1:0] bsel_q;

  for (genvar k = 0; k < NBANKS; k++) begin : g_bank
    localparam int unsigned W = 2 << k;
    logic [W-1:0] mem_q [BANK_DEPTH];
    logic [W-1:0] rd_q;
    always_ff @(posedge clk) begin
      if (we && wr_bank == BSEL_W'(k)) mem_q[wr_addr] <= wr_data[W-1:0];
      if (rd_en) rd_q <= mem_q[baddr];
    end
    assign bank_out[k] = IMB_W'($signed(rd_q));
  end

  always_ff @(posedge clk)
    if (rd_en) bsel_q <= bsel;

  always_comb begin
    imb = '0;
    for (int unsigned k = 0; k < NBANKS; k++)
      if (bsel_q == BSEL_W'(k)) imb = bank_out[k];
  end

endmodule

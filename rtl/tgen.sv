// tgen: Tree-pattern Generator (TGEN).
//
// Decodes the rank of a Tp codeword into tpaddr, the address of the first
// Tree-pattern Dictionary entry of that tree-pattern, and then walks through
// the pattern's consecutive TPD entries one instruction at a time. The
// decode is a table lookup (rank -> tpaddr) loaded through the write port;
// the published scheme gives the function of TGEN, the table is this design's
// simplest way to do it.
//
// Timing: start (with rank) in cycle t reads the table; from t+1 tpaddr
// holds the first entry's address. Each next adds one. rank_err is set for
// the pattern when rank is beyond the table. Synchronous active-low reset.
module tgen
  import ofz_pkg::*;
#(
  parameter int unsigned TP_PATTERNS  = 2048,
  parameter int unsigned TPD_DEPTH    = 8192,
  parameter int unsigned MAX_TREE_LEN = 16,
  localparam int unsigned TAW = $clog2(TP_PATTERNS),
  localparam int unsigned DAW = $clog2(TPD_DEPTH),
  localparam int unsigned SW  = $clog2(MAX_TREE_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [TAW-1:0]    wr_rank,
  input  logic [DAW-1:0]    wr_tpaddr,
  input  logic              start,
  input  logic [RANK_W-1:0] rank,
  input  logic              next,
  output logic [DAW-1:0]    tpaddr,
  output logic              rank_err
);

  logic [DAW-1:0] table_q [TP_PATTERNS];
  logic [DAW-1:0] base_q;
  logic [SW-1:0]  step_q;

  always_ff @(posedge clk) begin
    if (we) table_q[wr_rank] <= wr_tpaddr;
    if (start) base_q <= table_q[TAW'(rank)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q   <= '0;
      rank_err <= 1'b0;
    end else if (start) begin
      step_q   <= '0;
      rank_err <= (32'(rank) >= TP_PATTERNS);
    end else if (next) begin
      step_q   <= step_q + 1'b1;
    end
  end

  assign tpaddr = base_q + DAW'(step_q);

endmodule

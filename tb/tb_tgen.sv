// tb_tgen: unit test of the tree-pattern generator. Loads a random
// rank -> tpaddr table, starts patterns at random ranks and checks that
// tpaddr is the table value one cycle after start and advances by one on
// each next; a rank beyond the table must raise rank_err.
module tb_tgen;
  import ofz_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we = 1'b0;
  logic [5:0]  wr_rank = '0;
  logic [7:0]  wr_tpaddr = '0;
  logic        start = 1'b0, next = 1'b0;
  logic [14:0] rank = '0;
  logic [7:0]  tpaddr;
  logic        rank_err;

  always #5 clk = ~clk;

  tgen #(.TP_PATTERNS(64), .TPD_DEPTH(256), .MAX_TREE_LEN(8)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [7:0] tab [64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 64; a++) begin
      tab[a] = 8'($urandom);
      @(negedge clk); we = 1'b1; wr_rank = 6'(a); wr_tpaddr = tab[a];
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      automatic int unsigned r = $urandom % 64;
      automatic int unsigned steps = $urandom % 8;
      start = 1'b1; rank = 15'(r);
      @(negedge clk); start = 1'b0;
      for (int s = 0; s <= steps; s++) begin
        checks++;
        if (tpaddr != 8'(tab[r] + s) || rank_err) begin
          failures++;
          if (failures < 10) $display("rank %0d step %0d: %0d vs %0d", r, s, tpaddr, 8'(tab[r] + s));
        end
        // a cycle without next must hold the address
        if ($urandom % 2) begin
          @(negedge clk);
          checks++;
          if (tpaddr != 8'(tab[r] + s)) failures++;
        end
        next = 1'b1; @(negedge clk); next = 1'b0;
      end
    end
    start = 1'b1; rank = 15'd64;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!rank_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

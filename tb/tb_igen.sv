// tb_igen: unit test of the immediate generator. Loads operand-patterns of
// random length (base table and immediate records), starts random patterns
// and checks HAS_IMM/BSEL/BADDR for every step.
module tb_igen;
  import ofz_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we_base = 1'b0, we_rec = 1'b0;
  logic [9:0]  wr_addr = '0, wr_base = '0;
  immsel_t     wr_rec = '0;
  logic        start = 1'b0, next = 1'b0, rd_en = 1'b0;
  logic [14:0] rank = '0;
  logic        has_imm;
  logic [2:0]  bsel;
  logic [9:0]  baddr;
  

  always #5 clk = ~clk;

  igen #(.OP_PATTERNS(64), .OPR_DEPTH(1024), .MAX_TREE_LEN(8)) dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned base [64], len [64];
  logic [13:0] recs [1024];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned nxt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 64; o++) begin
      len[o] = 1 + $urandom % 8;
      base[o] = nxt;
      @(negedge clk); we_base = 1'b1; wr_addr = 10'(o); wr_base = 10'(nxt);
      @(negedge clk); we_base = 1'b0;
      for (int j = 0; j < len[o]; j++) begin
        recs[nxt] = 14'($urandom);
        @(negedge clk); we_rec = 1'b1; wr_addr = 10'(nxt); wr_rec = immsel_t'(recs[nxt]);
        nxt++;
      end
      @(negedge clk); we_rec = 1'b0;
    end
    for (int n = 0; n < 300; n++) begin
      automatic int unsigned o = $urandom % 64;
      start = 1'b1; rank = 15'(o);
      @(negedge clk); start = 1'b0;
      for (int j = 0; j < len[o]; j++) begin
        rd_en = 1'b1; @(negedge clk); rd_en = 1'b0;
        checks++;
        if ({has_imm, bsel, baddr} != recs[base[o] + j]) begin
          failures++;
          if (failures < 10) $display("op %0d step %0d: %h vs %h", o, j, {has_imm, bsel, baddr}, recs[base[o] + j]);
        end
        next = 1'b1; @(negedge clk); next = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

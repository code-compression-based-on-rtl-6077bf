// tb_tpd: unit test of the tree-pattern dictionary. Writes random
// {OPCODE, ITYPE, END} entries, reads them back in random order and checks
// the one-cycle read latency and that the output holds while rd_en is low.
module tb_tpd;
  import ofz_pkg::*;

  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [8:0] wr_addr = '0;
  tpd_entry_t wr_entry = '0;
  logic       rd_en = 1'b0;
  logic [8:0] rd_addr = '0;
  tpd_entry_t rd_entry;

  always #5 clk = ~clk;

  tpd #(.TPD_DEPTH(512)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [15:0] ref_m [512];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      ref_m[a] = 16'($urandom);
      @(negedge clk); we = 1'b1; wr_addr = 9'(a); wr_entry = tpd_entry_t'(ref_m[a]);
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      automatic int unsigned a = $urandom % 512;
      rd_en = 1'b1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = 1'b0; rd_addr = 9'($urandom);
      checks++;
      if (16'(rd_entry) != ref_m[a]) failures++;
      @(negedge clk);
      checks++;
      if (16'(rd_entry) != ref_m[a]) failures++;
      // field layout: OPCODE[15:4], ITYPE[3:1], END[0]
      checks++;
      if (rd_entry.opcode != ref_m[a][15:4] || 3'(rd_entry.itype) != ref_m[a][3:1] ||
          rd_entry.last != ref_m[a][0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_imd: unit test of the immediate dictionary. Writes random 32-bit words
// to every entry of every bank; each bank keeps only its own width, so a
// read must return the low 2^(k+1) bits of what was written, sign-extended
// to 32 bits. Reads use random banks and addresses and check the one-cycle
// latency and that the output holds while rd_en is low.
module tb_imd;
  import ofz_pkg::*;

  logic        clk = 1'b0;
  logic        we = 1'b0;
  logic [2:0]  wr_bank = '0;
  logic [5:0]  wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic        rd_en = 1'b0;
  logic [2:0]  bsel = '0;
  logic [5:0]  baddr = '0;
  logic [31:0] imb;

  always #5 clk = ~clk;

  imd #(.NBANKS(5), .BANK_DEPTH(64)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [31:0] raw [5][64];

  function automatic logic [31:0] expect_val(int unsigned k, int unsigned a);
    int unsigned w = 2 << k;
    logic [31:0] v = raw[k][a];
    if (w == 32) return v;
    // keep w bits, copy bit w-1 upwards
    if (v[w-1]) return v | ~((32'd1 << w) - 1);
    return v & ((32'd1 << w) - 1);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++)
      for (int a = 0; a < 64; a++) begin
        raw[k][a] = $urandom;
        @(negedge clk); we = 1'b1; wr_bank = 3'(k); wr_addr = 6'(a); wr_data = raw[k][a];
      end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      automatic int unsigned k = $urandom % 5, a = $urandom % 64;
      rd_en = 1'b1; bsel = 3'(k); baddr = 6'(a);
      @(negedge clk);
      rd_en = 1'b0; bsel = 3'($urandom); baddr = 6'($urandom);
      checks++;
      if (imb != expect_val(k, a)) begin
        failures++;
        if (failures < 10) $display("bank %0d addr %0d: %h vs %h", k, a, imb, expect_val(k, a));
      end
      @(negedge clk);
      checks++;
      if (imb != expect_val(k, a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

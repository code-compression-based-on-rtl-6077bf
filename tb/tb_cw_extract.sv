// tb_cw_extract: unit test of the codeword-pair extractor.
//
// Encodes random codeword pairs (ranks over all three classes) into a word
// memory with an independent encoder, then checks that the extractor returns
// the same ranks in order while the consumer accepts pairs at random. A
// restart at a pair with a non-zero bit offset must resume at that pair.
// Also checks that no pair is offered before the first restart, and the
// steady-state rate: with the consumer always ready and only 4-bit codewords,
// one pair is delivered every cycle (a word of four pairs is fetched every
// two cycles, so the fetch keeps up).
module tb_cw_extract;
  import ofz_pkg::*;

  localparam int unsigned NP = 300;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mem_req;
  logic [20:0] mem_addr;
  logic [31:0] mem_rdata;
  logic        redir_valid = 1'b0;
  logic [20:0] redir_addr = '0;
  logic [4:0]  redir_offs = '0;
  logic        pair_valid, pair_ready = 1'b0;
  logic [14:0] tp_rank, op_rank;

  always #5 clk = ~clk;

  cw_extract dut (.*);

  logic [31:0] prog [1024];
  always_ff @(posedge clk) if (mem_req) mem_rdata <= prog[mem_addr[9:0]];

  int unsigned checks = 0, failures = 0;
  int unsigned rt [NP], ro [NP], pos [NP];
  int unsigned bitpos = 0;

  function automatic int unsigned rnd_rank();
    case ($urandom % 3)
      0: return $urandom % 8;
      1: return 8 + $urandom % 64;
      default: return 72 + $urandom % 16384;
    endcase
  endfunction

  task automatic put_cw(int unsigned r);
    int unsigned len, code;
    if (r < 8)        begin len = 4;  code = 32'h8 | r; end
    else if (r < 72)  begin len = 8;  code = 32'h40 | (r - 8); end
    else              begin len = 16; code = r - 72; end
    for (int i = len - 1; i >= 0; i--) begin
      prog[bitpos / 32][31 - (bitpos % 32)] = code[i];
      bitpos++;
    end
  endtask

  task automatic restart(int unsigned bp);
    @(negedge clk);
    redir_valid = 1'b1;
    redir_addr  = 21'(bp / 32);
    redir_offs  = 5'(bp % 32);
    @(negedge clk);
    redir_valid = 1'b0;
  endtask

  task automatic expect_pairs(int unsigned from, int unsigned upto, bit always_ready);
    int unsigned i = from;
    while (i < upto) begin
      @(negedge clk);
      pair_ready = always_ready || ($urandom % 3 != 0);
      #1;
      if (pair_valid && pair_ready) begin
        checks++;
        if (tp_rank != 15'(rt[i]) || op_rank != 15'(ro[i])) begin
          failures++;
          if (failures < 10)
            $display("pair %0d: got %0d/%0d expected %0d/%0d", i, tp_rank, op_rank, rt[i], ro[i]);
        end
        i++;
      end
    end
    @(negedge clk);
    pair_ready = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p_back, t0, rate_pos;
    foreach (prog[i]) prog[i] = '0;
    for (int unsigned p = 0; p < NP; p++) begin
      rt[p] = rnd_rank();
      ro[p] = rnd_rank();
      pos[p] = bitpos;
      put_cw(rt[p]);
      put_cw(ro[p]);
    end
    // 32 pairs of 4-bit codewords, word aligned, for the rate check
    rate_pos = ((bitpos + 31) / 32) * 32;
    for (int unsigned a = rate_pos / 32; a < rate_pos / 32 + 8; a++) prog[a] = 32'h8888_8888;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (pair_valid || mem_req) begin
      failures++;
      $display("activity before the first restart");
    end
    restart(0);
    expect_pairs(0, NP / 2, 1'b0);
    p_back = 1;
    for (int unsigned p = 1; p < NP / 2; p++) if (pos[p] % 32 != 0) p_back = p;
    checks++;
    if (pos[p_back] % 32 == 0) failures++;
    restart(pos[p_back]);
    expect_pairs(p_back, NP, 1'b0);
    // rate: 8 words of 4 pairs each
    restart(rate_pos);
    pair_ready = 1'b1;
    t0 = 0;
    while (!pair_valid) begin @(negedge clk); t0++; end
    begin
      int unsigned n = 0, cyc = 0;
      while (n < 32) begin
        if (pair_valid) begin
          checks++;
          if (tp_rank != 0 || op_rank != 0) failures++;
          n++;
        end
        @(negedge clk);
        cyc++;
      end
      $display("32 pairs in %0d cycles (first after %0d)", cyc, t0);
      checks++;
      if (cyc != 32) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

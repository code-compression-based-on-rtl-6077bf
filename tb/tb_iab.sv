// tb_iab: unit test of the instruction assembly buffer. Pushes instructions
// of every ITYPE with random fields, computes the expected MIPS word with its
// own shift-and-mask assembler, and pops them with a random consumer to check
// order and contents. It also checks the figure's example tree
// (addiu r4,r4,1 / lui r1,0 / sw r1,0(r4)), that full rises after IAB_DEPTH
// pushes without pops, that level counts the queued instructions, and that
// flush empties the queue.
module tb_iab;
  import ofz_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        flush = 1'b0, push = 1'b0;
  tpd_entry_t  entry = '0;
  logic [4:0]  rd = '0, rs1 = '0, rs2 = '0;
  logic [31:0] imb = '0;
  logic        full, insn_valid, insn_ready = 1'b0;
  logic [2:0]  level;
  logic [31:0] insn;

  always #5 clk = ~clk;

  iab #(.IAB_DEPTH(4)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [31:0] expq [$];

  function automatic logic [31:0] ref_asm(logic [11:0] opc, int unsigned it, logic [4:0] d,
                                         logic [4:0] s1, logic [4:0] s2, logic [31:0] im);
    logic [31:0] w = 32'(opc[11:6]) << 26;
    logic [31:0] fn = 32'(opc[5:0]);
    case (it)
      0: w |= (32'(s1) << 21) | (32'(s2) << 16) | (32'(d) << 11) | fn;
      1: w |= (32'(s1) << 16) | (32'(d) << 11) | ((im & 31) << 6) | fn;
      2: w |= (32'(s1) << 21) | (32'(d) << 16) | (im & 32'hffff);
      3: w |= (32'(s1) << 21) | (32'(s2) << 16) | (im & 32'hffff);
      4: w |= (32'(d) << 16) | (im & 32'hffff);
      5: w |= (32'(s1) << 21) | ((fn & 31) << 16) | (im & 32'hffff);
      6: w |= im & 32'h03ff_ffff;
      default: w |= fn;
    endcase
    return w;
  endfunction

  task automatic do_push(logic [11:0] opc, int unsigned it, logic [4:0] d, logic [4:0] s1,
                         logic [4:0] s2, logic [31:0] im);
    entry = '{opcode: opc, itype: itype_e'(it), last: 1'b0};
    rd = d; rs1 = s1; rs2 = s2; imb = im;
    push = 1'b1;
    expq.push_back(ref_asm(opc, it, d, s1, s2, im));
  endtask

  // one cycle: maybe push, maybe pop; checks a pop against the queue
  task automatic cycle(bit want_push, bit want_pop);
    insn_ready = want_pop;
    if (want_push && !full)
      do_push(12'($urandom), $urandom % 8, 5'($urandom), 5'($urandom), 5'($urandom), $urandom);
    #1;
    checks++;
    if (32'(level) != expq.size() - 32'(push)) failures++;
    if (insn_valid && insn_ready) begin
      checks++;
      if (insn != expq[0]) begin
        failures++;
        if (failures < 10) $display("got %08h expected %08h", insn, expq[0]);
      end
      void'(expq.pop_front());
    end
    @(negedge clk);
    push = 1'b0;
    insn_ready = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the example tree: addiu r4,r4,1 ; lui r1,0 ; sw r1,0(r4)
    do_push({6'h09, 6'h00}, 2, 5'd4, 5'd4, 5'd0, 32'd1); @(negedge clk); push = 1'b0;
    do_push({6'h0f, 6'h00}, 4, 5'd1, 5'd0, 5'd0, 32'd0); @(negedge clk); push = 1'b0;
    do_push({6'h2b, 6'h00}, 3, 5'd0, 5'd4, 5'd1, 32'd0); @(negedge clk); push = 1'b0;
    begin
      logic [31:0] known [3] = '{32'h2484_0001, 32'h3c01_0000, 32'hac81_0000};
      for (int i = 0; i < 3; i++) begin
        insn_ready = 1'b1; #1;
        checks++;
        if (!insn_valid || insn != known[i]) begin
          failures++;
          $display("example %0d: %08h", i, insn);
        end
        void'(expq.pop_front());
        @(negedge clk);
      end
      insn_ready = 1'b0;
    end
    // fill: full after 4 pushes
    for (int i = 0; i < 4; i++) cycle(1'b1, 1'b0);
    checks++;
    if (!full) failures++;
    // random traffic
    for (int n = 0; n < 3000; n++) cycle($urandom % 2 == 1, $urandom % 3 != 0);
    // flush
    for (int i = 0; i < 3; i++) cycle(1'b1, 1'b0);
    flush = 1'b1; @(negedge clk); flush = 1'b0;
    expq.delete();
    checks++;
    if (insn_valid || full) failures++;
    for (int n = 0; n < 200; n++) cycle($urandom % 2 == 1, $urandom % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workloads: the engine at its default sizes on programs sized like the
// SPECint95 benchmarks compiled for the MIPS R2000.
//
// For each benchmark the published counts of expression trees, distinct
// tree-patterns and distinct operand-patterns set the size of a synthetic
// program: the testbench creates that many patterns (random opcodes, formats,
// registers and immediates; 1 to 5 instructions per tree), gives the lowest
// codeword ranks to the most frequent ones, and draws the trees from a
// distribution skewed towards low ranks, every operand-pattern at least once.
// It loads the dictionaries, decompresses the whole program with an always
// ready processor side and compares every instruction with its own
// reference. It also checks the engine's rate of L + 1 cycles for a tree
// of L instructions and prints the compressed size of the codeword stream against
// the uncompressed program (the dictionaries are not counted).
//
// gcc has 41486 operand-patterns, more than the 16384 the engine's tables and
// code space hold; its run uses only the 16384 most frequent ones, so it
// covers the tree count but not the full operand-pattern variety.
module tb_workloads;
  import ofz_pkg::*;

  localparam int unsigned MEMW = 1 << 19;
  localparam int unsigned NIMM = 64;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        mem_req;
  logic [20:0] mem_addr;
  logic [31:0] mem_rdata;
  logic        redir_valid = 1'b0;
  logic [20:0] redir_addr = '0;
  logic [4:0]  redir_offs = '0;
  logic        cfg_we = 1'b0;
  cfg_tgt_e    cfg_tgt = CFG_TGEN;
  logic [2:0]  cfg_bank = '0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        insn_valid;
  logic        insn_ready = 1'b0;
  logic [31:0] insn;
  logic        decode_err;

  always #5 clk = ~clk;

  opfact_decomp dut (.*);

  logic [31:0] prog [MEMW];
  always_ff @(posedge clk) if (mem_req) mem_rdata <= prog[mem_addr[18:0]];

  int unsigned checks = 0, failures = 0;

  int unsigned tp_len [2048], tp_base [2048];
  int unsigned op_base [16384];
  logic [14:0] e_word [8192];      // {opcode, itype}
  logic [14:0] r_regs [65536];
  logic [13:0] i_rec  [65536];     // {has, bsel, baddr}
  logic [31:0] imdv   [5][NIMM];
  logic [31:0] exp_q  [$];
  int unsigned bitpos;

  task automatic put_cw(int unsigned r);
    int unsigned len, code;
    if (r < 8)       begin len = 4;  code = 32'h8 | r; end
    else if (r < 72) begin len = 8;  code = 32'h40 | (r - 8); end
    else             begin len = 16; code = r - 72; end
    for (int i = len - 1; i >= 0; i--) begin
      prog[bitpos / 32][31 - (bitpos % 32)] = code[i];
      bitpos++;
    end
  endtask

  function automatic logic [31:0] ref_asm(logic [14:0] e, logic [14:0] rg, logic [13:0] ir);
    logic [31:0] w, imm, fn, rd, rs1, rs2;
    imm = ir[13] ? imdv[ir[12:10]][ir[9:0]] : 32'd0;
    fn  = 32'(e[8:3]);
    rd  = 32'(rg[14:10]);
    rs1 = 32'(rg[9:5]);
    rs2 = 32'(rg[4:0]);
    w = 32'(e[14:9]) << 26;
    case (e[2:0])
      3'd0: w = w | (rs1 << 21) | (rs2 << 16) | (rd << 11) | fn;
      3'd1: w = w | (rs1 << 16) | (rd << 11) | ((imm & 32'h1f) << 6) | fn;
      3'd2: w = w | (rs1 << 21) | (rd << 16) | (imm & 32'hffff);
      3'd3: w = w | (rs1 << 21) | (rs2 << 16) | (imm & 32'hffff);
      3'd4: w = w | (rd << 16) | (imm & 32'hffff);
      3'd5: w = w | (rs1 << 21) | ((fn & 32'h1f) << 16) | (imm & 32'hffff);
      3'd6: w = w | (imm & 32'h03ff_ffff);
      default: w = w | fn;
    endcase
    return w;
  endfunction

  task automatic cfg(cfg_tgt_e t, int unsigned bank, int unsigned a, logic [31:0] d);
    cfg_we = 1'b1; cfg_tgt = t; cfg_bank = 3'(bank); cfg_addr = 16'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // skewed draw in [0, n): the product of two uniform draws
  function automatic int unsigned skew(int unsigned n);
    longint unsigned u = $urandom % n, v = $urandom % n;
    return int'((u * v) / n);
  endfunction

  task automatic run(string name, int unsigned n_trees, int unsigned n_tp, int unsigned n_op);
    int unsigned tpd_next = 0, opr_next = 0, got = 0, cycles = 0, n_insn;
    // ---- patterns
    for (int unsigned t = 0; t < n_tp; t++) begin
      tp_len[t] = 1 + $urandom % 5;
      tp_base[t] = tpd_next;
      for (int unsigned j = 0; j < tp_len[t]; j++) begin
        e_word[tpd_next] = {12'($urandom), 3'($urandom)};
        tpd_next++;
      end
    end
    for (int unsigned o = 0; o < n_op; o++) begin
      op_base[o] = opr_next;
      for (int unsigned j = 0; j < tp_len[o % n_tp]; j++) begin
        r_regs[opr_next] = 15'($urandom);
        i_rec[opr_next]  = {1'($urandom % 4 != 0), 3'($urandom % 5), 10'($urandom % NIMM)};
        opr_next++;
      end
    end
    for (int unsigned k = 0; k < 5; k++)
      for (int unsigned a = 0; a < NIMM; a++) begin
        automatic logic [31:0] v = $urandom;
        automatic int unsigned wdt = 2 << k;
        if (wdt < 32) v = v[wdt-1] ? (v | ~((32'd1 << wdt) - 1)) : (v & ((32'd1 << wdt) - 1));
        imdv[k][a] = v;
      end
    // ---- program
    exp_q.delete();
    bitpos = 0;
    for (int unsigned p = 0; p < n_trees; p++) begin
      automatic int unsigned o = (p < n_op) ? p : skew(n_op);
      automatic int unsigned t = o % n_tp;
      put_cw(t);
      put_cw(o);
      for (int unsigned j = 0; j < tp_len[t]; j++)
        exp_q.push_back(ref_asm(e_word[tp_base[t] + j], r_regs[op_base[o] + j],
                                i_rec[op_base[o] + j]));
    end
    n_insn = exp_q.size();
    // ---- load
    @(negedge clk);
    for (int unsigned t = 0; t < n_tp; t++) cfg(CFG_TGEN, 0, t, tp_base[t]);
    for (int unsigned t = 0; t < n_tp; t++)
      for (int unsigned j = 0; j < tp_len[t]; j++)
        cfg(CFG_TPD, 0, tp_base[t] + j, {16'd0, e_word[tp_base[t] + j], j == tp_len[t] - 1});
    for (int unsigned o = 0; o < n_op; o++) begin
      cfg(CFG_RBASE, 0, o, op_base[o]);
      cfg(CFG_IBASE, 0, o, op_base[o]);
    end
    for (int unsigned a = 0; a < opr_next; a++) begin
      cfg(CFG_RREC, 0, a, 32'(r_regs[a]));
      cfg(CFG_IREC, 0, a, 32'(i_rec[a]));
    end
    for (int unsigned k = 0; k < 5; k++)
      for (int unsigned a = 0; a < NIMM; a++) cfg(CFG_IMD, k, a, imdv[k][a]);
    // ---- decompress
    redir_valid = 1'b1; redir_addr = '0; redir_offs = '0;
    @(negedge clk);
    redir_valid = 1'b0;
    insn_ready = 1'b1;
    while (got < n_insn) begin
      if (insn_valid) begin
        checks++;
        if (insn !== exp_q[got]) begin
          failures++;
          if (failures < 10)
            $display("%s insn %0d: got %08h expected %08h", name, got, insn, exp_q[got]);
        end
        got++;
      end
      @(negedge clk);
      cycles++;
    end
    insn_ready = 1'b0;
    checks++;                        // rate: L + 1 cycles per tree of L instructions
    if (cycles > n_insn + n_trees + 16) begin
      failures++;
      $display("%s: %0d cycles for %0d instructions", name, cycles, n_insn);
    end
    checks++;
    if (decode_err) failures++;
    $display("%-9s trees=%0d tree-patterns=%0d operand-patterns=%0d instructions=%0d cycles=%0d stream=%0d%%",
             name, n_trees, n_tp, n_op, n_insn, cycles, (100 * bitpos) / (32 * n_insn));
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (prog[i]) prog[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // published counts: expression trees, tree-patterns, operand-patterns
    run("compress",   1444,  125,   731);
    run("li",        15761,  157,  3056);
    run("jpeg",      38426,  767,  9839);
    run("go",        54651,  578, 12561);
    run("perl",      62915,  648, 11209);
    run("vortex",   128104,  471, 16143);
    run("gcc",      311488, 1547, 16384);   // operand-patterns capped, see above
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

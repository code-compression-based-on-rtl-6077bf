// tb_opfact_decomp: end-to-end test of the decompression engine at its
// default sizes.
//
// The testbench builds a random set of dictionaries (tree-patterns of 1 to 5
// instructions plus one of MAX_TREE_LEN, operand-patterns, immediates in every
// IMD bank), with codeword ranks spread over all three codeword classes, and
// loads them through the cfg port. It then encodes a random program of
// codeword pairs into 32-bit words with its own encoder, and works out the
// expected instruction stream with its own MIPS field assembler. The engine
// runs from address 0 while the processor side accepts instructions at
// random; half way through, a branch redirects it to a pair that starts at a
// non-zero bit offset, and it then runs to the end of the program. Finally a
// pair whose Tp rank lies beyond the TGEN table must raise decode_err.
//
// Mechanisms counted (each must occur): codewords split across words, every
// codeword class for Tp and Op, reads held back until the IAB has room, a redirect with a non-zero
// offset, a redirect that flushes queued instructions, every ITYPE, every
// IMD bank, instructions without immediate, the longest tree-pattern, and
// the decode error.
module tb_opfact_decomp;
  import ofz_pkg::*;

  localparam int unsigned NT    = 24;   // tree-patterns used
  localparam int unsigned NO    = 48;   // operand-patterns used
  localparam int unsigned NP    = 160;  // pairs in the program
  localparam int unsigned MEMW  = 4096;
  localparam int unsigned NIMM  = 16;   // entries used per IMD bank
  localparam int unsigned MAXL  = 16;   // engine default MAX_TREE_LEN
  localparam int unsigned TPN   = 2048; // engine default TP_PATTERNS
  localparam int unsigned OPN   = 16384; // engine default OP_PATTERNS

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

  // compressed program memory, one cycle latency
  logic [31:0] prog [MEMW];
  always_ff @(posedge clk) if (mem_req) mem_rdata <= prog[mem_addr[11:0]];

  int unsigned checks = 0, failures = 0;

  // reference dictionaries
  int unsigned tp_rank [NT], tp_len [NT], tp_base [NT];
  int unsigned op_rank [NO], op_base [NO];
  logic [11:0] e_opc  [NT*MAXL];
  logic [2:0]  e_ityp [NT*MAXL];
  logic [14:0] r_regs [NO*MAXL];
  logic        i_has  [NO*MAXL];
  logic [2:0]  i_bsel [NO*MAXL];
  logic [9:0]  i_badr [NO*MAXL];
  logic [31:0] imdv   [5][NIMM];
  // program
  int unsigned pair_op [NP], pair_pos [NP], pair_first [NP];
  logic [31:0] exp_q [$];
  int unsigned bitpos = 0;
  // mechanism counters
  int unsigned n_split = 0, n_stall = 0, n_redir_offs = 0, n_flush = 0;
  int unsigned n_noimm = 0, n_longpat = 0, n_err = 0;
  int unsigned n_tcls [3], n_ocls [3], n_ityp [8], n_bank [5];

  bit used_t [int unsigned], used_o [int unsigned];

  function automatic int unsigned pick_rank(int unsigned i, int unsigned n, int unsigned lim);
    // spread over the classes: the first four in class 0, the rest evenly
    // over classes 1 and 2
    if (i < 4) return i;
    if (((i - 4) * 2) / (n - 4) == 0) return 8 + $urandom % 64;
    return 72 + $urandom % (lim - 72);
  endfunction

  function automatic int unsigned cls_of(int unsigned r);
    if (r < 8) return 0;
    if (r < 72) return 1;
    return 2;
  endfunction

  // Encoder: class 0 is 1 + 3 bits, class 1 is 01 + 6 bits, class 2 is
  // 00 + 14 bits.
  task automatic put_cw(int unsigned r);
    int unsigned c, len, code, first_word;
    c = cls_of(r);
    case (c)
      0:       begin len = 4;  code = 32'h8 | r; end
      1:       begin len = 8;  code = 32'h40 | (r - 8); end
      default: begin len = 16; code = r - 72; end
    endcase
    first_word = bitpos / 32;
    if ((bitpos + len - 1) / 32 != first_word) n_split++;
    for (int i = len - 1; i >= 0; i--) begin
      prog[bitpos / 32][31 - (bitpos % 32)] = code[i];
      bitpos++;
    end
  endtask

  function automatic logic [31:0] imm_value(int unsigned k);
    if (!i_has[k]) return 32'd0;
    return imdv[i_bsel[k]][i_badr[k]];
  endfunction

  // Reference assembler, built from shifts of the MIPS R2000 fields.
  function automatic logic [31:0] ref_asm(int unsigned te, int unsigned oe);
    logic [31:0] w, imm;
    logic [31:0] op, fn, rd, rs1, rs2;
    op  = 32'(e_opc[te][11:6]);
    fn  = 32'(e_opc[te][5:0]);
    rd  = 32'(r_regs[oe][14:10]);
    rs1 = 32'(r_regs[oe][9:5]);
    rs2 = 32'(r_regs[oe][4:0]);
    imm = imm_value(oe);
    w = op << 26;
    case (e_ityp[te])
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
    @(negedge clk);
    cfg_we = 1'b1; cfg_tgt = t; cfg_bank = 3'(bank); cfg_addr = 16'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Receive instructions until n have been checked against exp_q.
  int unsigned got = 0;
  task automatic receive(int unsigned n, bit stall_often);
    while (got < n) begin
      @(negedge clk);
      insn_ready = stall_often ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (dut.act_q && !dut.room && !dut.end_now) n_stall++;
      #1;
      if (insn_valid && insn_ready) begin
        checks++;
        if (insn !== exp_q[got]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH insn %0d: got %08h expected %08h", got, insn, exp_q[got]);
        end
        got++;
      end
    end
    @(negedge clk);
    insn_ready = 1'b0;
  endtask

  task automatic redirect(int unsigned p);
    @(negedge clk);
    insn_ready = 1'b0;
    if (insn_valid) n_flush++;
    redir_valid = 1'b1;
    redir_addr  = 21'(pair_pos[p] / 32);
    redir_offs  = 5'(pair_pos[p] % 32);
    if (redir_offs != 0) n_redir_offs++;
    @(negedge clk);
    redir_valid = 1'b0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tpd_next, opr_next, r, p_mid, p_back, err_pos;
    foreach (prog[i]) prog[i] = '0;
    foreach (n_tcls[i]) begin n_tcls[i] = 0; n_ocls[i] = 0; end
    foreach (n_ityp[i]) n_ityp[i] = 0;
    foreach (n_bank[i]) n_bank[i] = 0;
    // ---- dictionaries
    tpd_next = 0;
    for (int unsigned t = 0; t < NT; t++) begin
      do r = pick_rank(t, NT, TPN); while (used_t.exists(r));
      used_t[r] = 1'b1;
      tp_rank[t] = r;
      tp_len[t]  = (t == NT - 1) ? MAXL : 1 + $urandom % 5;
      tp_base[t] = tpd_next;
      for (int unsigned j = 0; j < tp_len[t]; j++) begin
        e_opc[tpd_next]  = 12'($urandom);
        e_ityp[tpd_next] = 3'((tpd_next + t) % 8);
        tpd_next++;
      end
    end
    opr_next = 0;
    for (int unsigned o = 0; o < NO; o++) begin
      do r = pick_rank(o, NO, OPN); while (used_o.exists(r));
      used_o[r] = 1'b1;
      op_rank[o] = r;
      op_base[o] = opr_next;
      for (int unsigned j = 0; j < tp_len[o % NT]; j++) begin
        r_regs[opr_next] = 15'($urandom);
        i_has[opr_next]  = ($urandom % 4 != 0);
        i_bsel[opr_next] = 3'($urandom % 5);
        i_badr[opr_next] = 10'($urandom % NIMM);
        opr_next++;
      end
    end
    for (int unsigned k = 0; k < 5; k++)
      for (int unsigned a = 0; a < NIMM; a++) begin
        automatic logic [31:0] v = $urandom;
        automatic int unsigned wdt = 2 << k;
        // value as the bank returns it: low wdt bits, sign-extended
        v = (wdt == 32) ? v : ((v & ((32'd1 << wdt) - 1)) ^ (32'd1 << (wdt - 1))) - (32'd1 << (wdt - 1));
        imdv[k][a] = v;
      end
    // ---- program
    for (int unsigned p = 0; p < NP; p++) begin
      automatic int unsigned o, t;
      o = (p < NO) ? p : $urandom % NO;
      t = o % NT;
      pair_op[p] = o;
      pair_pos[p] = bitpos;
      pair_first[p] = exp_q.size();
      put_cw(tp_rank[t]);
      put_cw(op_rank[o]);
      for (int unsigned j = 0; j < tp_len[t]; j++)
        exp_q.push_back(ref_asm(tp_base[t] + j, op_base[o] + j));
    end
    // a pair whose Tp rank is beyond the TGEN table
    err_pos = (bitpos / 32 + 4) * 32 + 7;
    bitpos = err_pos;
    put_cw(5000);
    put_cw(op_rank[0]);

    // ---- load
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int unsigned t = 0; t < NT; t++) cfg(CFG_TGEN, 0, tp_rank[t], tp_base[t]);
    for (int unsigned a = 0; a < tpd_next; a++) begin
      automatic bit last = 1'b0;
      for (int unsigned u = 0; u < NT; u++)
        if (a == tp_base[u] + tp_len[u] - 1) last = 1'b1;
      cfg(CFG_TPD, 0, a, {16'd0, e_opc[a], e_ityp[a], last});
    end
    for (int unsigned o = 0; o < NO; o++) begin
      cfg(CFG_RBASE, 0, op_rank[o], op_base[o]);
      cfg(CFG_IBASE, 0, op_rank[o], op_base[o]);
    end
    for (int unsigned a = 0; a < opr_next; a++) begin
      cfg(CFG_RREC, 0, a, 32'(r_regs[a]));
      cfg(CFG_IREC, 0, a, 32'({i_has[a], i_bsel[a], i_badr[a]}));
    end
    for (int unsigned k = 0; k < 5; k++)
      for (int unsigned a = 0; a < NIMM; a++) cfg(CFG_IMD, k, a, imdv[k][a]);

    // ---- run: first half, with a slow consumer so the IAB fills
    p_mid = NP / 2;
    p_back = 0;
    for (int unsigned p = 1; p < p_mid; p++)
      if (pair_pos[p] % 32 != 0 && tp_len[pair_op[p] % NT] > 1) p_back = p;
    redirect(0);
    receive(pair_first[p_mid] + 1, 1'b1);
    // branch back to a pair at a non-zero bit offset; queued work is dropped
    repeat (12) @(negedge clk);
    redirect(p_back);
    got = pair_first[p_back];
    receive(exp_q.size(), 1'b0);
    // every expected instruction was seen in order
    checks++;
    if (decode_err !== 1'b0) begin
      failures++;
      $display("decode_err raised on a valid program");
    end
    // ---- out-of-range Tp rank
    bitpos = err_pos;
    redirect(0);
    redir_valid = 1'b1;
    redir_addr = 21'(err_pos / 32);
    redir_offs = 5'(err_pos % 32);
    @(negedge clk);
    redir_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (decode_err !== 1'b1) begin
      failures++;
      $display("decode_err not raised for rank 5000");
    end else n_err++;

    // ---- mechanism coverage, from the program actually run
    for (int unsigned p = 0; p < NP; p++) begin
      automatic int unsigned o = pair_op[p], t = o % NT;
      n_tcls[cls_of(tp_rank[t])]++;
      n_ocls[cls_of(op_rank[o])]++;
      if (tp_len[t] == MAXL) n_longpat++;
      for (int unsigned j = 0; j < tp_len[t]; j++) begin
        n_ityp[e_ityp[tp_base[t] + j]]++;
        if (i_has[op_base[o] + j]) n_bank[i_bsel[op_base[o] + j]]++;
        else n_noimm++;
      end
    end
    $display("split=%0d stall=%0d redir_offs=%0d flush=%0d noimm=%0d longpat=%0d err=%0d",
             n_split, n_stall, n_redir_offs, n_flush, n_noimm, n_longpat, n_err);
    for (int i = 0; i < 3; i++) begin
      $display("class %0d: tp=%0d op=%0d", i, n_tcls[i], n_ocls[i]);
      checks++; if (n_tcls[i] == 0 || n_ocls[i] == 0) failures++;
    end
    for (int i = 0; i < 8; i++) begin checks++; if (n_ityp[i] == 0) failures++; end
    for (int i = 0; i < 5; i++) begin checks++; if (n_bank[i] == 0) failures++; end
    checks++; if (n_split == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_redir_offs == 0) failures++;
    checks++; if (n_flush == 0) failures++;
    checks++; if (n_noimm == 0) failures++;
    checks++; if (n_longpat == 0) failures++;
    $display("instructions checked=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// opfact_decomp: operand-factorization decompression engine (top level).
//
// A program compressed by operand factorization is a bit stream of codeword
// pairs [Tp, Op]. Tp names a tree-pattern: the opcodes of the instructions of
// one expression tree with the operands taken out. Op names an
// operand-pattern: the registers and immediates of that tree, in order. The
// engine turns each pair back into the original MIPS instructions:
//
//   cw_extract  fetches compressed words, extracts the Tp and Op ranks
//   tgen        Tp rank -> tpaddr, then one TPD entry per instruction
//   tpd         {OPCODE, ITYPE, END} per instruction
//   rgen        Op rank -> RD, RS1, RS2 per instruction
//   igen        Op rank -> BSEL, BADDR per instruction (in parallel)
//   imd         immediates in banks of 2..32 bits -> IMB
//   iab         assembles and queues the instruction for the processor
//
// This block structure follows the published engine. The sequencing is this
// design's own, a three-stage pipeline that reaches one instruction per
// cycle within a tree-pattern:
//   issue    : read TPD entry, register record and immediate record of the
//              current step (tpaddr = base + step) and advance the step
//   entry    : the three records are out; read the IMD; if the TPD entry has
//              END set, the pattern is over: the speculative read of the step
//              after it is not issued, and the next pair is started instead
//   assemble : the immediate is out; the IAB assembles and queues the
//              instruction
// A pattern of L instructions takes L + 1 cycles. A read is only issued when
// the IAB has room for it and for everything already in the pipeline, so the
// pipeline never has to stop half way; while the processor does not take
// instructions, issue simply waits.
//
// A branch (redir_valid) restarts the extractor at a word address and bit
// offset, abandons the pattern in progress and flushes the IAB. The
// dictionaries are loaded through the cfg_* port before use (cfg_tgt picks
// the table, cfg_bank the IMD bank). decode_err is set, and stays set until
// reset, when a codeword rank falls outside the TGEN or RGEN table.
//
// mem_rdata must return the word addressed by mem_addr in the cycle after
// mem_req. Synchronous, active-low reset.
module opfact_decomp
  import ofz_pkg::*;
#(
  parameter int unsigned ADDR_W       = 21,
  parameter int unsigned OFFS_W       = 5,
  parameter int unsigned TP_PATTERNS  = 2048,
  parameter int unsigned TPD_DEPTH    = 8192,
  parameter int unsigned OP_PATTERNS  = 16384,
  parameter int unsigned OPR_DEPTH    = 65536,
  parameter int unsigned NBANKS       = 5,
  parameter int unsigned BANK_DEPTH   = 1024,
  parameter int unsigned MAX_TREE_LEN = 16,
  parameter int unsigned IAB_DEPTH    = 4,
  localparam int unsigned CFG_AW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // compressed program memory
  output logic                  mem_req,
  output logic [ADDR_W-1:0]     mem_addr,
  input  logic [WORD_W-1:0]     mem_rdata,
  // branch redirect from the processor
  input  logic                  redir_valid,
  input  logic [ADDR_W-1:0]     redir_addr,
  input  logic [OFFS_W-1:0]     redir_offs,
  // dictionary load port
  input  logic                  cfg_we,
  input  cfg_tgt_e              cfg_tgt,
  input  logic [BSEL_W-1:0]     cfg_bank,
  input  logic [CFG_AW-1:0]     cfg_addr,
  input  logic [31:0]           cfg_wdata,
  // decompressed instructions to the processor
  output logic                  insn_valid,
  input  logic                  insn_ready,
  output logic [31:0]           insn,
  output logic                  decode_err
);

  localparam int unsigned TAW = $clog2(TP_PATTERNS);
  localparam int unsigned DAW = $clog2(TPD_DEPTH);
  localparam int unsigned RAW = $clog2(OPR_DEPTH);
  localparam int unsigned IAW = $clog2(BANK_DEPTH);

  localparam int unsigned LW = $clog2(IAB_DEPTH) + 1;

  logic              pair_valid, pair_ready;
  logic [RANK_W-1:0] tp_rank, op_rank;
  logic              start, issue, push;
  logic [DAW-1:0]    tpaddr;
  tpd_entry_t        entry;
  logic [REG_W-1:0]  rd, rs1, rs2;
  logic              has_imm;
  logic [BSEL_W-1:0] bsel;
  logic [BADDR_W-1:0] baddr;
  logic [IMB_W-1:0]  imb;
  logic              iab_full;
  logic [LW-1:0]     iab_level;
  logic              tp_err, op_err;

  logic              act_q;       // a pattern is being expanded
  logic              v1_q;        // entry stage holds an instruction
  logic              v2_q;        // assemble stage holds an instruction
  tpd_entry_t        entry2_q;
  regs_t             regs2_q;
  logic              has_imm2_q;
  logic              end_now;     // entry stage sees the pattern's END
  logic              room;        // the IAB can take one more instruction

  // ---------------------------------------------------------------- control
  always_comb begin
    end_now    = v1_q && entry.last;
    room       = (32'(iab_level) + 32'(v1_q) + 32'(v2_q)) < IAB_DEPTH;
    pair_ready = (!act_q || end_now) && !redir_valid;
    start      = pair_valid && pair_ready;
    issue      = act_q && !end_now && room && !redir_valid;
    push       = v2_q && !redir_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || redir_valid) begin
      act_q <= 1'b0;
      v1_q  <= 1'b0;
      v2_q  <= 1'b0;
    end else begin
      if (start)        act_q <= 1'b1;
      else if (end_now) act_q <= 1'b0;
      v1_q <= issue;
      v2_q <= v1_q;
    end
  end

  // the entry stage's records move on with the instruction
  always_ff @(posedge clk) begin
    if (v1_q) begin
      entry2_q   <= entry;
      regs2_q    <= '{rd: rd, rs1: rs1, rs2: rs2};
      has_imm2_q <= has_imm;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                decode_err <= 1'b0;
    else if (tp_err || op_err) decode_err <= 1'b1;
  end

  a_iab_room: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> !iab_full);

  // ----------------------------------------------------------------- blocks
  cw_extract #(.ADDR_W(ADDR_W), .OFFS_W(OFFS_W)) u_extract (
    .clk, .rst_n, .mem_req, .mem_addr, .mem_rdata,
    .redir_valid, .redir_addr, .redir_offs,
    .pair_valid, .pair_ready, .tp_rank, .op_rank
  );

  tgen #(.TP_PATTERNS(TP_PATTERNS), .TPD_DEPTH(TPD_DEPTH),
         .MAX_TREE_LEN(MAX_TREE_LEN)) u_tgen (
    .clk, .rst_n,
    .we        (cfg_we && cfg_tgt == CFG_TGEN),
    .wr_rank   (TAW'(cfg_addr)),
    .wr_tpaddr (DAW'(cfg_wdata)),
    .start, .rank(tp_rank), .next(issue), .tpaddr, .rank_err(tp_err)
  );

  tpd #(.TPD_DEPTH(TPD_DEPTH)) u_tpd (
    .clk,
    .we       (cfg_we && cfg_tgt == CFG_TPD),
    .wr_addr  (DAW'(cfg_addr)),
    .wr_entry (tpd_entry_t'(cfg_wdata[$bits(tpd_entry_t)-1:0])),
    .rd_en    (issue),
    .rd_addr  (tpaddr),
    .rd_entry (entry)
  );

  rgen #(.OP_PATTERNS(OP_PATTERNS), .OPR_DEPTH(OPR_DEPTH),
         .MAX_TREE_LEN(MAX_TREE_LEN)) u_rgen (
    .clk, .rst_n,
    .we_base (cfg_we && cfg_tgt == CFG_RBASE),
    .we_rec  (cfg_we && cfg_tgt == CFG_RREC),
    .wr_addr (RAW'(cfg_addr)),
    .wr_base (RAW'(cfg_wdata)),
    .wr_rec  (regs_t'(cfg_wdata[$bits(regs_t)-1:0])),
    .start, .rank(op_rank), .next(issue), .rd_en(issue),
    .rd, .rs1, .rs2, .rank_err(op_err)
  );

  igen #(.OP_PATTERNS(OP_PATTERNS), .OPR_DEPTH(OPR_DEPTH),
         .MAX_TREE_LEN(MAX_TREE_LEN)) u_igen (
    .clk, .rst_n,
    .we_base (cfg_we && cfg_tgt == CFG_IBASE),
    .we_rec  (cfg_we && cfg_tgt == CFG_IREC),
    .wr_addr (RAW'(cfg_addr)),
    .wr_base (RAW'(cfg_wdata)),
    .wr_rec  (immsel_t'(cfg_wdata[$bits(immsel_t)-1:0])),
    .start, .rank(op_rank), .next(issue), .rd_en(issue),
    .has_imm, .bsel, .baddr
  );

  imd #(.NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_imd (
    .clk,
    .we      (cfg_we && cfg_tgt == CFG_IMD),
    .wr_bank (cfg_bank),
    .wr_addr (IAW'(cfg_addr)),
    .wr_data (cfg_wdata),
    .rd_en   (v1_q),
    .bsel,
    .baddr   (IAW'(baddr)),
    .imb
  );

  iab #(.IAB_DEPTH(IAB_DEPTH)) u_iab (
    .clk, .rst_n,
    .flush (redir_valid),
    .push,
    .entry (entry2_q),
    .rd    (regs2_q.rd),
    .rs1   (regs2_q.rs1),
    .rs2   (regs2_q.rs2),
    .imb   (has_imm2_q ? imb : '0),
    .full  (iab_full),
    .level (iab_level),
    .insn_valid, .insn_ready, .insn
  );

endmodule

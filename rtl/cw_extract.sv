// cw_extract: compressed-word fetch and codeword-pair extraction.
//
// Fetches 32-bit compressed words from program memory and keeps them in a
// 96-bit, left-aligned bit buffer, so that a codeword split across two words
// (allowed by the compaction scheme) is decoded as one. Each cycle it looks at
// the head of the buffer: the leading zeroes of the first codeword give its
// class and length (VLC coding), the second codeword starts right after it,
// and the pair is offered as two ranks once all of its bits are present. A
// pair is at most 2 x 16 = 32 bits. A word is requested whenever 32 bits are
// free, so more than a pair is normally buffered and a pair can be taken
// every cycle while the fetch keeps up (16 bits per cycle on average).
//
// A branch restarts decompression at a word address and a bit offset within
// that word (21 + 5 bits, as in the published scheme). Bit offset 0 is the most
// significant bit of the word; bits are consumed from the MSB down. The
// codeword format is described in ofz_pkg and is this design's own choice.
//
// Interface and timing:
//   mem_req/mem_addr : one word read; mem_rdata must hold the word in the
//                      following cycle (synchronous memory, 1-cycle latency).
//                      At most one read is outstanding; a new read is issued
//                      whenever the buffer has room for 32 more bits.
//   redir_*          : restart; the buffer is emptied and the next read goes
//                      to redir_addr, its first redir_offs bits skipped.
//                      Nothing is fetched after reset until the first restart.
//   pair_valid/ready : valid/ready handshake; the ranks stay stable while
//                      pair_valid is high and pair_ready low.
module cw_extract
  import ofz_pkg::*;
#(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned OFFS_W = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 mem_req,
  output logic [ADDR_W-1:0]    mem_addr,
  input  logic [WORD_W-1:0]    mem_rdata,
  input  logic                 redir_valid,
  input  logic [ADDR_W-1:0]    redir_addr,
  input  logic [OFFS_W-1:0]    redir_offs,
  output logic                 pair_valid,
  input  logic                 pair_ready,
  output logic [RANK_W-1:0]    tp_rank,
  output logic [RANK_W-1:0]    op_rank
);

  localparam int unsigned BUF_W = 3 * WORD_W;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0]  buf_q;     // valid bits left-aligned, zeroes below
  logic [CNT_W-1:0]  cnt_q;     // number of valid bits
  logic [ADDR_W-1:0] faddr_q;   // next word to fetch
  logic              inflight_q;
  logic              active_q;
  logic [OFFS_W-1:0] skip_q;    // bits to drop from the next arriving word

  // Decode of one codeword at the head of a 16-bit window.
  typedef struct packed {
    logic [4:0]        len;   // up to CW_MAX
    logic [RANK_W-1:0] rank;
  } cw_t;

  function automatic cw_t decode_cw(logic [CW_MAX-1:0] win);
    cw_t         r;
    int unsigned z;
    int unsigned pay;
    logic [CW_MAX-1:0] field;
    z = 0;
    for (int unsigned i = 0; i < VLC_NCLS - 1; i++)
      if (win[CW_MAX-1-i] == 1'b0 && z == i) z = i + 1;
    pay    = vlc_pay(z);
    field  = win >> (CW_MAX - vlc_len(z));
    field  = field & CW_MAX'((1 << pay) - 1);
    r.len  = 5'(vlc_len(z));
    r.rank = RANK_W'(vlc_base(z)) + RANK_W'(field);
    return r;
  endfunction

  cw_t              cw_t_d, cw_o_d;
  logic [BUF_W-1:0] after_tp;  // only the top CW_MAX bits are looked at
  logic [5:0]       pair_len;

  always_comb begin
    cw_t_d   = decode_cw(buf_q[BUF_W-1 -: CW_MAX]);
    after_tp = buf_q << cw_t_d.len;
    cw_o_d   = decode_cw(after_tp[BUF_W-1 -: CW_MAX]);
    pair_len = {1'b0, cw_t_d.len} + {1'b0, cw_o_d.len};
  end

  assign pair_valid = active_q && (CNT_W'(pair_len) <= cnt_q);
  assign tp_rank    = cw_t_d.rank;
  assign op_rank    = cw_o_d.rank;

  assign mem_req  = active_q && !redir_valid && !inflight_q && (cnt_q <= CNT_W'(BUF_W - WORD_W));
  assign mem_addr = faddr_q;

  logic              consume;
  logic [BUF_W-1:0]  buf_d;
  logic [CNT_W-1:0]  cnt_d;
  logic [WORD_W-1:0] word_sh;

  always_comb begin
    consume = pair_valid && pair_ready;
    buf_d   = consume ? (buf_q << pair_len) : buf_q;
    cnt_d   = consume ? (cnt_q - CNT_W'(pair_len)) : cnt_q;
    word_sh = mem_rdata << skip_q;
    if (inflight_q) begin
      buf_d = buf_d | ({word_sh, {(BUF_W - WORD_W){1'b0}}} >> cnt_d);
      cnt_d = cnt_d + CNT_W'(WORD_W) - CNT_W'(skip_q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q      <= '0;
      cnt_q      <= '0;
      faddr_q    <= '0;
      inflight_q <= 1'b0;
      active_q   <= 1'b0;
      skip_q     <= '0;
    end else if (redir_valid) begin
      buf_q      <= '0;
      cnt_q      <= '0;
      faddr_q    <= redir_addr;
      inflight_q <= 1'b0;
      active_q   <= 1'b1;
      skip_q     <= redir_offs;
    end else begin
      buf_q      <= buf_d;
      cnt_q      <= cnt_d;
      inflight_q <= mem_req;
      if (inflight_q) skip_q <= '0;
      if (mem_req) faddr_q <= faddr_q + 1'b1;
    end
  end

  // The buffer never overflows: a word is only requested when it fits.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_q <= CNT_W'(BUF_W));
  // Handshake: an offered pair stays the same until it is taken.
  a_pair_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (pair_valid && !pair_ready && !redir_valid) |=>
      (pair_valid && $stable(tp_rank) && $stable(op_rank)));

endmodule

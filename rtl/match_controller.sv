// match_controller - turns verified hash matches into Zstd sequences and literals.
//
// Receives one 4-byte input word per cycle together with the match results of
// the four hash match engines for the word's four positions, and splits the
// input into the two streams of Zstd's first stage: the literal stream (bytes
// not covered by a match) and the sequence stream (literal length, match
// length, offset). Parsing is greedy: outside a match, the first lane whose
// engine reports a verified 4-byte match starts a match. The match is then
// extended 4 bytes per cycle by comparing each following input word with the
// bytes OFFSET positions back, read from this block's copy of the history
// buffer one cycle ahead (bytes fewer than 4 positions back are taken from the
// word itself). A match ends at the first differing byte, at the end of the
// task or at MAX_MATCH bytes. No new match starts in the word where a match
// ended, so at most one sequence is produced per cycle.
//
// Interface: the word (w_*) and engine results (m_ok, m_pos) are consumed when
// en is high and w_valid is set. Outputs are registered and change only when
// en is high: lit_* is the word with a mask of its literal bytes, seq_* a
// sequence-stream entry (a sequence, the end-of-task mark, or both).
// Greedy first-lane parsing, the end-of-match rule and the 4-byte minimum match
// are this design's choices; the two output streams follow Zstd's format.
module match_controller
  import zstd_pkg::*;
#(
  parameter int unsigned HIST      = 65536,
  parameter int unsigned MAX_MATCH = 131074
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  // current word
  input  logic        w_valid,
  input  pos_t        w_pos,
  input  logic [31:0] w_data,
  input  logic [3:0]  w_vmask,    // lanes inside the task
  input  logic [3:0]  w_lane_ok,  // lanes whose 4-byte string lies inside the task
  input  logic        w_last,
  input  logic [3:0]  m_ok,
  input  pos_t [3:0]  m_pos,
  // history writes (shared by all copies)
  input  logic        hist_wr_en,
  input  pos_t        hist_wr_pos,
  input  logic [31:0] hist_wr_data,
  // outputs
  output logic        lit_valid,
  output logic [31:0] lit_data,
  output logic [3:0]  lit_mask,
  output logic        lit_last,
  output logic        seq_valid,
  output seq_raw_t    seq_out
);

  // ---- state
  logic in_match;
  pos_t off;
  len_t mlen, lit_cnt, seq_ll;

  logic [31:0] ref_q;
  pos_t        rd_pos;
  history_buffer #(.DEPTH(HIST), .N_RD(1), .POS_W(POS_W)) u_hist (
    .clk,
    .wr_en   (hist_wr_en),
    .wr_pos  (hist_wr_pos),
    .wr_data (hist_wr_data),
    .rd_en   (en && w_valid),
    .rd_pos  (rd_pos),
    .rd_data (ref_q)
  );

  // ---- next state
  logic       in_match_n;
  pos_t       off_n;
  len_t       mlen_n, lit_cnt_n, seq_ll_n;
  logic [3:0] lits;
  logic       emit;
  len_t       emit_ml;
  logic [3:0][7:0] wb, rb;

  always_comb begin
    int m, e;
    m  = 4;
    e  = 4;
    wb = w_data;
    for (int k = 0; k < 4; k++)
      rb[k] = (off <= POS_W'(k)) ? wb[2'(k - int'(off[1:0]))] : ref_q[8*k +: 8];

    in_match_n = in_match;
    off_n      = off;
    mlen_n     = mlen;
    lit_cnt_n  = lit_cnt;
    seq_ll_n   = seq_ll;
    lits       = '0;
    emit       = 1'b0;
    emit_ml    = mlen;

    if (in_match) begin
      for (int k = 3; k >= 0; k--)
        if (!(w_vmask[k] && wb[k] == rb[k])) m = k;
      if (m == 4 && 32'(mlen) + 4 + 4 <= MAX_MATCH) begin
        mlen_n = mlen + len_t'(4);
      end else begin
        emit       = 1'b1;
        emit_ml    = mlen + len_t'(m);
        in_match_n = 1'b0;
        for (int k = 0; k < 4; k++) lits[k] = w_vmask[k] && (k >= m);
        lit_cnt_n  = len_t'($countones(lits));
      end
    end else begin
      for (int k = 3; k >= 0; k--)
        if (m_ok[k] && w_lane_ok[k]) e = k;
      if (e < 4) begin
        in_match_n = 1'b1;
        off_n      = w_pos + POS_W'(e) - m_pos[e];
        mlen_n     = len_t'(4 - e);
        for (int k = 0; k < 4; k++) lits[k] = (k < e);
        seq_ll_n   = lit_cnt + len_t'(e);
        lit_cnt_n  = '0;
      end else begin
        lits      = w_vmask;
        lit_cnt_n = lit_cnt + len_t'($countones(w_vmask));
      end
    end

    // a match still open at the end of the task ends there
    if (w_last && in_match_n) begin
      emit       = 1'b1;
      emit_ml    = mlen_n;
      in_match_n = 1'b0;
    end

    // reference bytes for the next word
    rd_pos = w_pos + POS_W'(4) - off_n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_match  <= 1'b0;
      lit_cnt   <= '0;
      mlen      <= '0;
      seq_ll    <= '0;
      off       <= '0;
      lit_valid <= 1'b0;
      seq_valid <= 1'b0;
    end else if (en) begin
      lit_valid <= w_valid;
      seq_valid <= w_valid && (emit || w_last);
      if (w_valid) begin
        in_match <= in_match_n;
        off      <= off_n;
        mlen     <= mlen_n;
        seq_ll   <= seq_ll_n;
        lit_cnt  <= w_last ? '0 : lit_cnt_n;
        lit_data <= w_data;
        lit_mask <= lits;
        lit_last <= w_last;
        seq_out.has_seq   <= emit;
        seq_out.last      <= w_last;
        seq_out.lit_len   <= emit ? (in_match ? seq_ll : seq_ll_n) : '0;
        seq_out.match_len <= emit_ml;
        seq_out.offset    <= off_n;
      end
    end
  end

endmodule

// hash_match_engine - one of the kernel's four hash match engines.
//
// Every cycle the kernel takes 4 input bytes, i.e. 4 string start positions.
// All engines receive the same 4 inserts (the hash of the 4-byte string at each
// of the 4 positions) and each engine performs one lookup, for one of the 4
// positions. Inside an engine there are TABLES hash tables: table j stores
// only the strings that started at lane j of a word, so the 4 inserts of one
// cycle go to 4 different tables, while all tables are read with the same
// lookup hash. The engine therefore returns up to 4 candidates per lookup.
//
// Pipeline (all registers advance when en is high):
//   cycle 0  lookup/insert in the tables (read first: a word never finds itself)
//   cycle 1  candidates screened: earlier than the current word, inside the
//            current task, no further back than MAX_OFF; history reads issued
//   cycle 2  each candidate's 4 bytes compared with the looked-up string; the
//            nearest verified candidate is reported on m_ok / m_pos (combinational
//            from the cycle-2 registers)
// The engine has its own copy of the history buffer with one read port per
// table, written with the same words as every other copy (hist_wr_*).
// Four engines of four tables, one lookup and four inserts per engine follow
// the kernel's organisation; verification against the history, choosing the
// nearest candidate and the 2-cycle latency are this design's choices.
module hash_match_engine
  import zstd_pkg::*;
#(
  parameter int unsigned TABLES = 4,
  parameter int unsigned ENTRIES  = 4096,
  parameter int unsigned HIST     = 65536,
  parameter int unsigned MAX_OFF  = 65536 - 16,
  localparam int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic                          clk,
  input  logic                          en,         // pipeline advance
  // cycle 0: one input word
  input  logic                          word_valid,
  input  pos_t                          word_pos,   // position of lane 0
  input  pos_t                          task_base,  // first position of the task
  input  logic [TABLES-1:0]           ins_ok,     // lane's string lies inside the task
  input  logic [TABLES-1:0][AW-1:0]   ins_hash,
  input  logic                          lk_ok,
  input  logic [AW-1:0]                 lk_hash,
  input  pos_t                          lk_pos,
  input  logic [31:0]                   lk_str,     // 4 bytes at lk_pos
  // history writes (shared by all copies)
  input  logic                          hist_wr_en,
  input  pos_t                          hist_wr_pos,
  input  logic [31:0]                   hist_wr_data,
  // cycle 2 result
  output logic                          m_ok,
  output pos_t                          m_pos
);

  pos_t [TABLES-1:0] cand;

  for (genvar j = 0; j < TABLES; j++) begin : g_tab
    hash_table #(.ENTRIES(ENTRIES), .POS_W(POS_W)) u_tab (
      .clk,
      .wr_en   (en && word_valid && ins_ok[j]),
      .wr_addr (ins_hash[j]),
      .wr_pos  (word_pos + POS_W'(j)),
      .rd_en   (en),
      .rd_addr (lk_hash),
      .rd_pos  (cand[j])
    );
  end

  // ---- stage 1
  logic        s1_ok;
  pos_t        s1_lk_pos, s1_word_pos, s1_base;
  logic [31:0] s1_str;

  always_ff @(posedge clk)
    if (en) begin
      s1_ok       <= word_valid && lk_ok;
      s1_lk_pos   <= lk_pos;
      s1_word_pos <= word_pos;
      s1_base     <= task_base;
      s1_str      <= lk_str;
    end

  logic [TABLES-1:0] c_ok;
  always_comb
    for (int j = 0; j < TABLES; j++)
      c_ok[j] = s1_ok
             && (s1_word_pos - cand[j]) >= POS_W'(1)
             && (s1_lk_pos - cand[j]) <= POS_W'(MAX_OFF)
             && (cand[j] - s1_base) < (s1_word_pos - s1_base);

  logic [TABLES-1:0][31:0] hist_q;
  history_buffer #(.DEPTH(HIST), .N_RD(TABLES), .POS_W(POS_W)) u_hist (
    .clk,
    .wr_en   (hist_wr_en),
    .wr_pos  (hist_wr_pos),
    .wr_data (hist_wr_data),
    .rd_en   ({TABLES{en}}),
    .rd_pos  (cand),
    .rd_data (hist_q)
  );

  // ---- stage 2
  logic [TABLES-1:0] s2_ok;
  pos_t [TABLES-1:0] s2_cand;
  logic [31:0]         s2_str;

  always_ff @(posedge clk)
    if (en) begin
      s2_ok   <= c_ok;
      s2_cand <= cand;
      s2_str  <= s1_str;
    end

  // nearest verified candidate (largest position)
  always_comb begin
    m_ok  = 1'b0;
    m_pos = '0;
    for (int j = 0; j < TABLES; j++)
      if (s2_ok[j] && hist_q[j] == s2_str && (!m_ok || (s2_cand[j] - m_pos) < (POS_W'(1) << (POS_W-1)))) begin
        m_ok  = 1'b1;
        m_pos = s2_cand[j];
      end
  end

endmodule

// zstd_kernel - one Zstd compression kernel, 4 input bytes per cycle.
//
// A task (up to one 128 KB Zstd block) streams in as 32-bit little-endian words
// and leaves as the two parts a Zstd block is assembled from:
//   * the literal section, raw bytes (lit_*), and
//   * the FSE-coded sequence bitstream with its sequence count (bs_*),
// both ready to be wrapped into a block (literals in "raw" mode, sequences with
// the predefined tables) by the host software.
//
// Datapath, one word per cycle:
//   S0  the word and the next one (lookahead) give the 4-byte strings at the
//       word's 4 positions; their 12-bit Zstd hashes are inserted into all four
//       hash match engines (engine e, table j takes lane j), and engine e looks
//       up lane e. The word is written to every copy of the 64 KB history.
//   S1/S2  inside the engines: candidates read, screened and verified.
//   S2  the match controller picks matches, extends them and emits literals and
//       sequences; then repeat-offset coding, the literal packer and the FSE
//       sequence encoder.
// The whole pipeline advances together on en, which is high while the literal
// packer and the repeat-offset stage can take a beat; the FSE encoder holds the
// kernel while it encodes a finished task.
//
// Input: in_valid/in_ready, in_data (byte k at lane k), in_last marks the last
// word of a task, in_nbytes its valid bytes (1..4; 4 for every other word).
// Every task starts at a word boundary of the kernel's position counter.
// Four engines of four 4096-entry tables, the 4-byte hash, the 64 KB history,
// static FSE tables and raw literals follow the kernel as designed for trading
// data; the stream interfaces and the task framing are this design's choices.
module zstd_kernel
  import zstd_pkg::*;
#(
  parameter int unsigned HASH_ENTRIES_P = HASH_ENTRIES,
  parameter int unsigned HIST_P         = HIST_BYTES,
  parameter int unsigned SEQ_DEPTH_P    = BLOCK_BYTES / 8 + 1,
  localparam int unsigned HB            = $clog2(HASH_ENTRIES_P),
  localparam int unsigned SAW           = $clog2(SEQ_DEPTH_P + 1)
) (
  input  logic        clk,
  input  logic        rst,
  // raw data in
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  input  logic [2:0]  in_nbytes,
  // literal section out
  output logic        lit_valid,
  input  logic        lit_ready,
  output logic [31:0] lit_data,
  output logic [2:0]  lit_nbytes,
  output logic        lit_last,
  // sequence bitstream out
  output logic        bs_valid,
  input  logic        bs_ready,
  output logic [63:0] bs_data,
  output logic [3:0]  bs_nbytes,
  output logic        bs_last,
  output logic [SAW-1:0] bs_nseq
);

  logic en;

  // ---------------------------------------------------------------- S0 front end
  logic        cur_valid, cur_last, task_start;
  logic [31:0] cur_data;
  logic [2:0]  cur_nb;
  pos_t        pos, task_base, base_now;
  logic        fire;

  assign fire     = en && cur_valid && (cur_last || in_valid);
  assign in_ready = !cur_valid || en;
  assign base_now = task_start ? pos : task_base;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_valid  <= 1'b0;
      pos        <= '0;
      task_base  <= '0;
      task_start <= 1'b1;
    end else begin
      if (in_valid && in_ready) begin
        cur_valid <= 1'b1;
        cur_data  <= in_data;
        cur_last  <= in_last;
        cur_nb    <= in_last ? in_nbytes : 3'd4;
      end else if (fire) begin
        cur_valid <= 1'b0;
      end
      if (fire) begin
        pos        <= pos + POS_W'(4);
        task_base  <= base_now;
        task_start <= cur_last;
      end
    end
  end

  // strings at the 4 lanes, from the word and the lookahead word
  logic [7:0][7:0]  win;
  logic [3:0][31:0] str;
  logic [3:0][HB-1:0] h;
  logic [3:0]       vmask, lane_ok;
  logic [3:0]       nvalid;

  always_comb begin
    win    = {(cur_last ? 32'h0 : in_data), cur_data};
    nvalid = 4'(cur_nb) + ((cur_last || !in_valid) ? 4'd0 : (in_last ? 4'(in_nbytes) : 4'd4));
    for (int k = 0; k < 4; k++) begin
      str[k]     = {win[k+3], win[k+2], win[k+1], win[k]};
      h[k]       = HB'(zstd_hash4(str[k], HB));
      vmask[k]   = (3'(k) < cur_nb);
      lane_ok[k] = (4'(k + 4) <= nvalid);
    end
  end

  // ---------------------------------------------------------------- engines
  logic [3:0] m_ok;
  pos_t [3:0] m_pos;

  for (genvar e = 0; e < N_ENGINES; e++) begin : g_eng
    hash_match_engine #(
      .TABLES   (N_TABLES),
      .ENTRIES  (HASH_ENTRIES_P),
      .HIST     (HIST_P),
      .MAX_OFF  (HIST_P - 16)
    ) u_eng (
      .clk,
      .en,
      .word_valid   (fire),
      .word_pos     (pos),
      .task_base    (base_now),
      .ins_ok       (lane_ok),
      .ins_hash     (h),
      .lk_ok        (lane_ok[e]),
      .lk_hash      (h[e]),
      .lk_pos       (pos + POS_W'(e)),
      .lk_str       (str[e]),
      .hist_wr_en   (fire),
      .hist_wr_pos  (pos),
      .hist_wr_data (cur_data),
      .m_ok         (m_ok[e]),
      .m_pos        (m_pos[e])
    );
  end

  // word information travelling alongside the engines
  typedef struct packed {
    logic        valid;
    pos_t        pos;
    logic [31:0] data;
    logic [3:0]  vmask;
    logic [3:0]  lane_ok;
    logic        last;
  } word_t;

  word_t s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1.valid <= 1'b0;
      s2.valid <= 1'b0;
    end else if (en) begin
      s1 <= '{valid: fire, pos: pos, data: cur_data, vmask: vmask, lane_ok: lane_ok, last: cur_last};
      s2 <= s1;
    end
  end

  // ---------------------------------------------------------------- S2 parsing
  logic        mc_lit_valid, mc_lit_last, mc_seq_valid;
  logic [31:0] mc_lit_data;
  logic [3:0]  mc_lit_mask;
  seq_raw_t    mc_seq;
  logic        lp_ready, ro_ready;

  match_controller #(.HIST(HIST_P)) u_mc (
    .clk, .rst, .en,
    .w_valid      (s2.valid),
    .w_pos        (s2.pos),
    .w_data       (s2.data),
    .w_vmask      (s2.vmask),
    .w_lane_ok    (s2.lane_ok),
    .w_last       (s2.last),
    .m_ok, .m_pos,
    .hist_wr_en   (fire),
    .hist_wr_pos  (pos),
    .hist_wr_data (cur_data),
    .lit_valid    (mc_lit_valid),
    .lit_data     (mc_lit_data),
    .lit_mask     (mc_lit_mask),
    .lit_last     (mc_lit_last),
    .seq_valid    (mc_seq_valid),
    .seq_out      (mc_seq)
  );

  // the controller's output registers are free when both consumers can take a beat
  assign en = lp_ready && ro_ready;

  literal_packer u_lp (
    .clk, .rst,
    .in_valid   (mc_lit_valid && ro_ready),
    .in_ready   (lp_ready),
    .in_data    (mc_lit_data),
    .in_mask    (mc_lit_mask),
    .in_last    (mc_lit_last),
    .out_valid  (lit_valid),
    .out_ready  (lit_ready),
    .out_data   (lit_data),
    .out_nbytes (lit_nbytes),
    .out_last   (lit_last)
  );

  logic ro_valid, fe_ready;
  seq_t ro_seq;

  repeat_offset_encoder u_ro (
    .clk, .rst,
    .in_valid  (mc_seq_valid && lp_ready),
    .in_ready  (ro_ready),
    .in_seq    (mc_seq),
    .out_valid (ro_valid),
    .out_ready (fe_ready),
    .out_seq   (ro_seq)
  );

  fse_seq_encoder #(.SEQ_DEPTH(SEQ_DEPTH_P)) u_fse (
    .clk, .rst,
    .in_valid   (ro_valid),
    .in_ready   (fe_ready),
    .in_seq     (ro_seq),
    .out_valid  (bs_valid),
    .out_ready  (bs_ready),
    .out_data   (bs_data),
    .out_nbytes (bs_nbytes),
    .out_last   (bs_last),
    .out_nseq   (bs_nseq)
  );

endmodule

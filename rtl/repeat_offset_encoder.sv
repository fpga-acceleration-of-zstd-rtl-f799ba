// repeat_offset_encoder - Zstd repeat-offset coding of the sequence stream.
//
// Zstd keeps the offsets of the last three sequences (rep0..rep2, 1/4/8 at the
// start of a frame). An offset equal to one of them is sent as a small repeat
// code instead of the offset itself; any other offset is sent as offset + 3.
// With a literal length above zero the codes 1/2/3 mean rep0/rep1/rep2; with a
// literal length of zero they mean rep1/rep2/rep0-1 (Zstd format rules). The
// repeat history is updated as the Zstd decoder updates it, and restarts at
// 1/4/8 after each end-of-task entry, so each task is an independent frame.
//
// One registered stage with valid/ready handshake: an entry is taken when
// in_valid && in_ready, and appears on out_* the next cycle. in_ready is high
// whenever the output register is empty or being read.
// The coding rules are the Zstd format's; the one-stage pipeline and the
// per-task restart are this design's choices.
module repeat_offset_encoder
  import zstd_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  output logic     in_ready,
  input  seq_raw_t in_seq,
  output logic     out_valid,
  input  logic     out_ready,
  output seq_t     out_seq
);

  pos_t rep0, rep1, rep2;
  pos_t n0, n1, n2;
  ofv_t ofv;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    logic ll0;
    ll0 = (in_seq.lit_len == '0);
    n0 = in_seq.offset;
    n1 = rep0;
    n2 = rep1;
    ofv = ofv_t'(in_seq.offset + POS_W'(3));
    if (!ll0) begin
      if (in_seq.offset == rep0) begin
        ofv = 1; n0 = rep0; n1 = rep1; n2 = rep2;
      end else if (in_seq.offset == rep1) begin
        ofv = 2; n2 = rep2;
      end else if (in_seq.offset == rep2) begin
        ofv = 3;
      end
    end else begin
      if (in_seq.offset == rep1) begin
        ofv = 1; n2 = rep2;
      end else if (in_seq.offset == rep2) begin
        ofv = 2;
      end else if (in_seq.offset == rep0 - POS_W'(1)) begin
        ofv = 3;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      rep0 <= POS_W'(1); rep1 <= POS_W'(4); rep2 <= POS_W'(8);
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_seq.has_seq   <= in_seq.has_seq;
        out_seq.last      <= in_seq.last;
        out_seq.lit_len   <= in_seq.lit_len;
        out_seq.match_len <= in_seq.match_len;
        out_seq.off_value <= ofv;
        if (in_seq.last) begin
          rep0 <= POS_W'(1); rep1 <= POS_W'(4); rep2 <= POS_W'(8);
        end else if (in_seq.has_seq) begin
          rep0 <= n0; rep1 <= n1; rep2 <= n2;
        end
      end
    end
  end

endmodule

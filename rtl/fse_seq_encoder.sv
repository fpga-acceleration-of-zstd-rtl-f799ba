// fse_seq_encoder - static-table FSE encoder for the sequence stream of a task.
//
// Zstd entropy-codes each sequence as three FSE symbols (literal-length code,
// match-length code, offset code) plus the extra bits of each code, all in one
// backward-read bitstream. Building FSE tables from the data's statistics is a
// long sequential computation, so this encoder uses fixed tables: the Zstd
// predefined distributions (a block that declares "predefined" mode for all
// three symbol types needs no table description). The encoding tables are
// computed from those distributions at elaboration time (see zstd_pkg).
//
// Operation: the sequences of a task are stored in a buffer as they arrive
// (FILL). After the end-of-task entry they are encoded from the last to the
// first, as the format requires (ENC): the last sequence initialises the three
// FSE states, each earlier one first emits the states' low bits (offset, match
// length, literal length) and then its extra bits (literal length, match
// length, offset). Finally the three states are flushed (match length, offset,
// literal length), a closing 1 bit is added and the stream is padded to a byte
// (FIN, DRAIN). One sequence is encoded per cycle while output space allows.
//
// Output: 64-bit little-endian words on a valid/ready stream; the last beat of
// a task has out_last, its byte count out_nbytes (1..8) and the task's sequence
// count out_nseq. A task without sequences produces one last beat of 0 bytes.
// in_ready is low outside FILL, which stalls the kernel while a task is encoded.
// The bit order and state handling follow the Zstd format; using the predefined
// distributions as the static tables, the single buffer and the 64-bit output are
// this design's choices.
module fse_seq_encoder
  import zstd_pkg::*;
#(
  parameter int unsigned SEQ_DEPTH = BLOCK_BYTES / 8 + 1,
  localparam int unsigned SAW      = $clog2(SEQ_DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  seq_t        in_seq,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic [3:0]  out_nbytes,
  output logic        out_last,
  output logic [SAW-1:0] out_nseq
);

  localparam logic [FSE_MAXT-1:0][7:0]    ST_LL = fse_state_table(FSE_LL);
  localparam logic [FSE_MAXT-1:0][7:0]    ST_ML = fse_state_table(FSE_ML);
  localparam logic [FSE_MAXT-1:0][7:0]    ST_OF = fse_state_table(FSE_OF);
  localparam logic [FSE_MAXSYM-1:0][47:0] TT_LL = fse_symbol_tt(FSE_LL);
  localparam logic [FSE_MAXSYM-1:0][47:0] TT_ML = fse_symbol_tt(FSE_ML);
  localparam logic [FSE_MAXSYM-1:0][47:0] TT_OF = fse_symbol_tt(FSE_OF);

  typedef enum logic [2:0] {S_FILL, S_ZERO, S_ENC, S_FIN, S_DRAIN} state_e;
  state_e st;

  typedef struct packed {
    len_t ll;
    len_t ml;
    ofv_t ofv;
  } entry_t;

  entry_t mem [SEQ_DEPTH];
  entry_t q;
  logic   q_valid;
  logic [SAW-1:0] wr_ptr, nseq, rd_left;
  logic [SAW-1:0] rd_ptr;
  logic   first;
  logic [7:0] s_ll, s_ml, s_of;

  logic [191:0] acc;
  logic [7:0]   cnt;

  assign in_ready = (st == S_FILL);

  // ---------------------------------------------------------------- FSE steps
  function automatic logic [7:0] fse_init(input logic [47:0] tt, input logic [FSE_MAXT-1:0][7:0] stab);
    logic [31:0] dnb, nb, value;
    int dfs;
    dnb   = tt[31:0];
    dfs   = int'($signed(tt[47:32]));
    nb    = (dnb + 32'd32768) >> 16;
    value = (nb << 16) - dnb;
    return stab[int'(value >> nb) + dfs];
  endfunction

  // returns {new state, nbits(4), bits(8)}
  function automatic logic [19:0] fse_step(input logic [7:0] state, input logic [47:0] tt,
                                           input logic [FSE_MAXT-1:0][7:0] stab);
    logic [31:0] dnb, nb;
    logic [7:0]  bits;
    int dfs;
    dnb  = tt[31:0];
    dfs  = int'($signed(tt[47:32]));
    nb   = (32'(state) + dnb) >> 16;
    bits = state & 8'((32'd1 << nb) - 1);
    return {stab[int'(32'(state) >> nb) + dfs], 4'(nb), bits};
  endfunction

  // ---------------------------------------------------------------- one sequence
  logic [5:0]  c_ll, c_ml, c_of;
  logic [7:0]  n_ll, n_ml, n_of;
  logic [79:0] v;
  logic [6:0]  vlen;

  always_comb begin
    logic [19:0] r_of, r_ml, r_ll;
    len_t mlb;
    int unsigned bl, bm, bo;
    r_of = '0;
    r_ml = '0;
    r_ll = '0;
    mlb  = q.ml - len_t'(3);
    c_ll = ll_code(q.ll);
    c_ml = ml_code(mlb);
    c_of = 6'(highbit32(32'(q.ofv)));
    bl   = ll_bits(32'(c_ll));
    bm   = ml_bits(32'(c_ml));
    bo   = 32'(c_of);
    v    = '0;
    vlen = '0;
    if (first) begin
      n_ll = fse_init(TT_LL[c_ll], ST_LL);
      n_ml = fse_init(TT_ML[c_ml], ST_ML);
      n_of = fse_init(TT_OF[c_of], ST_OF);
    end else begin
      r_of = fse_step(s_of, TT_OF[c_of], ST_OF);
      r_ml = fse_step(s_ml, TT_ML[c_ml], ST_ML);
      r_ll = fse_step(s_ll, TT_LL[c_ll], ST_LL);
      n_of = r_of[19:12];
      n_ml = r_ml[19:12];
      n_ll = r_ll[19:12];
      v    = v | (80'(r_of[7:0]) << vlen); vlen = vlen + 7'(r_of[11:8]);
      v    = v | (80'(r_ml[7:0]) << vlen); vlen = vlen + 7'(r_ml[11:8]);
      v    = v | (80'(r_ll[7:0]) << vlen); vlen = vlen + 7'(r_ll[11:8]);
    end
    v    = v | (80'(q.ll & len_t'((32'd1 << bl) - 1)) << vlen);  vlen = vlen + 7'(bl);
    v    = v | (80'(mlb & len_t'((32'd1 << bm) - 1)) << vlen);   vlen = vlen + 7'(bm);
    v    = v | (80'(q.ofv & ofv_t'((32'd1 << bo) - 1)) << vlen); vlen = vlen + 7'(bo);
  end

  // state flush and closing bit: ML (6 bits), OF (5), LL (6), then a 1
  logic [79:0] fin_v;
  assign fin_v = 80'({1'b1, s_ll[5:0], s_of[4:0], s_ml[5:0]});
  localparam logic [6:0] FIN_LEN = 7'd18;

  // ---------------------------------------------------------------- control
  logic out_free, emit_full, space, consume, issue;
  logic [7:0] cnt_e;
  logic [191:0] acc_e;

  assign out_free  = !out_valid || out_ready;
  assign emit_full = (st == S_ENC || st == S_FIN || st == S_DRAIN) && out_free
                     && (cnt > 8'd64 || (cnt == 8'd64 && st != S_DRAIN));
  assign cnt_e     = emit_full ? cnt - 8'd64 : cnt;
  assign acc_e     = emit_full ? acc >> 64 : acc;
  assign space     = cnt_e < 8'd64;
  assign consume   = (st == S_ENC) && q_valid && space;
  assign issue     = (st == S_ENC) && rd_left != '0 && (!q_valid || consume);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready && in_seq.has_seq)
      mem[wr_ptr] <= '{ll: in_seq.lit_len, ml: in_seq.match_len, ofv: in_seq.off_value};
    if (issue)
      q <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_FILL;
      wr_ptr    <= '0;
      out_valid <= 1'b0;
      q_valid   <= 1'b0;
      cnt       <= '0;
      acc       <= '0;
    end else begin
      if (out_free) out_valid <= 1'b0;
      if (emit_full) begin
        out_valid  <= 1'b1;
        out_data   <= acc[63:0];
        out_nbytes <= 4'd8;
        out_last   <= 1'b0;
      end
      acc <= acc_e;
      cnt <= cnt_e;

      unique case (st)
        S_FILL: if (in_valid) begin
          logic [SAW-1:0] n;
          n = wr_ptr + SAW'(in_seq.has_seq);
          wr_ptr <= n;
          if (in_seq.last) begin
            nseq    <= n;
            wr_ptr  <= '0;
            rd_ptr  <= n - SAW'(1);
            rd_left <= n;
            first   <= 1'b1;
            q_valid <= 1'b0;
            acc     <= '0;
            cnt     <= '0;
            st      <= (n == '0) ? S_ZERO : S_ENC;
          end
        end
        S_ZERO: if (out_free) begin
          out_valid  <= 1'b1;
          out_data   <= '0;
          out_nbytes <= 4'd0;
          out_last   <= 1'b1;
          out_nseq   <= '0;
          st         <= S_FILL;
        end
        S_ENC: begin
          if (issue) begin
            rd_ptr  <= rd_ptr - SAW'(1);
            rd_left <= rd_left - SAW'(1);
            q_valid <= 1'b1;
          end else if (consume) begin
            q_valid <= 1'b0;
          end
          if (consume) begin
            acc   <= acc_e | (192'(v) << cnt_e);
            cnt   <= cnt_e + 8'(vlen);
            s_ll  <= n_ll;
            s_ml  <= n_ml;
            s_of  <= n_of;
            first <= 1'b0;
            if (rd_left == '0) st <= S_FIN;
          end
        end
        S_FIN: if (space) begin
          acc <= acc_e | (192'(fin_v) << cnt_e);
          cnt <= cnt_e + 8'(FIN_LEN);
          st  <= S_DRAIN;
        end
        S_DRAIN: if (out_free && cnt <= 8'd64) begin
          out_valid  <= 1'b1;
          out_data   <= acc[63:0];
          out_nbytes <= 4'((cnt + 8'd7) >> 3);
          out_last   <= 1'b1;
          out_nseq   <= nseq;
          cnt        <= '0;
          st         <= S_FILL;
        end
        default: st <= S_FILL;
      endcase
    end
  end

endmodule

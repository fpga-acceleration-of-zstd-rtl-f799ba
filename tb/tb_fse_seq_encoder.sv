// tb_fse_seq_encoder - tasks of random sequences (literal lengths, match
// lengths and offset values spread over every code, up to their largest
// values) are encoded under random output back-pressure, and each bitstream is
// decoded by the reference decoder of zstd_tb_pkg. The decoded sequences must
// equal the ones sent, every bit must be used, the sequence count must be
// reported, and a task without sequences must give one empty last beat.
// Encoding speed is checked too: without back-pressure a task of N sequences
// must finish within 2N + 16 cycles of its end-of-task entry.
module tb_fse_seq_encoder;
  import zstd_pkg::*;
  import zstd_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  seq_t in_seq = '0;
  logic [63:0] out_data;
  logic [3:0] out_nbytes;
  logic [10:0] out_nseq;
  fse_seq_encoder #(.SEQ_DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  localparam int NT = 12;
  int tll [NT][$], tml [NT][$], tofv [NT][$];
  bytes_t bs [NT];
  int nseq [NT];
  int done = 0;
  int bp = 0;
  longint cyc = 0, t_end [NT], t_out [NT];

  always @(posedge clk) begin
    cyc++;
    out_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (!rst && out_valid && out_ready && done < NT) begin
      for (int k = 0; k < int'(out_nbytes); k++) bs[done].push_back(out_data[8*k +: 8]);
      if (out_last) begin
        nseq[done] = int'(out_nseq);
        t_out[done] = cyc;
        done++;
      end
    end
  end

  function automatic int pick_len(int maxv);
    case ($urandom_range(0, 3))
      0: return $urandom_range(0, 15);
      1: return $urandom_range(0, 300);
      2: return $urandom_range(0, maxv);
      default: return 1 << $urandom_range(0, 16);
    endcase
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < NT; t++) begin
      automatic int n = (t == 3) ? 0 : (t == 4) ? 1 : $urandom_range(2, 300);
      bp = (t % 2);
      for (int i = 0; i < n; i++) begin
        automatic int l = pick_len(131071);
        automatic int m = 3 + pick_len(131071);
        automatic int o = (i % 4 == 0) ? $urandom_range(1, 3) : 1 + pick_len(65538);
        if (l > 131071) l = 131071;
        if (m > 131074) m = 131074;
        if (o > 65539) o = 65539;
        tll[t].push_back(l); tml[t].push_back(m); tofv[t].push_back(o);
        in_valid = 1;
        in_seq = '{has_seq: 1'b1, last: 1'b0, lit_len: len_t'(l), match_len: len_t'(m), off_value: ofv_t'(o)};
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 1;
      in_seq = '{has_seq: 1'b0, last: 1'b1, lit_len: '0, match_len: '0, off_value: '0};
      while (!in_ready) @(negedge clk);
      t_end[t] = cyc;
      @(negedge clk);
      in_valid = 0;
    end
  end

  initial begin
    wait (done == NT);
    for (int t = 0; t < NT; t++) begin
      int ll[$], ml[$], ofv[$];
      int left;
      left = decode_seqs(bs[t], nseq[t], ll, ml, ofv);
      checks += 3;
      if (nseq[t] != tll[t].size()) begin failures++; $display("FAIL task %0d: %0d sequences reported, %0d sent", t, nseq[t], tll[t].size()); end
      if (left != 0 && nseq[t] != 0) begin failures++; $display("FAIL task %0d: %0d bits left", t, left); end
      if (ll != tll[t] || ml != tml[t] || ofv != tofv[t]) begin
        failures++;
        $display("FAIL task %0d: decoded sequences differ", t);
        for (int i = 0; i < ll.size() && i < tll[t].size(); i++)
          if (ll[i] != tll[t][i] || ml[i] != tml[t][i] || ofv[i] != tofv[t][i]) begin
            $display("  seq %0d: got %0d/%0d/%0d sent %0d/%0d/%0d", i, ll[i], ml[i], ofv[i], tll[t][i], tml[t][i], tofv[t][i]);
            break;
          end
      end
      if (t == 3) begin
        checks++;
        if (bs[t].size() != 0) begin failures++; $display("FAIL empty task gave %0d bytes", bs[t].size()); end
      end
      if (t % 2 == 0) begin
        checks++;
        if (t_out[t] - t_end[t] > 2 * tll[t].size() + 16) begin
          failures++;
          $display("FAIL task %0d: %0d sequences took %0d cycles", t, tll[t].size(), t_out[t] - t_end[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

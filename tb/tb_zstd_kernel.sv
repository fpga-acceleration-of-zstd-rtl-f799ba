// tb_zstd_kernel - end-to-end test of the compression kernel at its default size.
//
// Streams several tasks through the kernel (market-data-like text records, a
// run of one byte, random bytes, a 3-byte task and a full 128 KB block), with
// and without input gaps and output back-pressure. Each task's literal bytes
// and FSE sequence bitstream are collected and decompressed by the reference
// decoder of zstd_tb_pkg; the result must equal the input. Also checked: the
// first task is taken at 4 bytes per cycle, and every mechanism of the design
// (matches, repeat offsets, overlapping matches, long matches, tasks without sequences, partial last words, kernel stalls while
// encoding, back-pressure) occurs at least once.
module tb_zstd_kernel;
  import zstd_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = 0;
  logic [2:0]  in_nbytes = 4;
  logic        lit_valid, lit_ready = 1, lit_last;
  logic [31:0] lit_data;
  logic [2:0]  lit_nbytes;
  logic        bs_valid, bs_ready = 1, bs_last;
  logic [63:0] bs_data;
  logic [3:0]  bs_nbytes;
  logic [14:0] bs_nseq;

  zstd_kernel dut (.*);

  int checks = 0, failures = 0;
  localparam int NT = 7;
  bytes_t task_in [NT];
  bytes_t lit_out [NT];
  bytes_t bs_out  [NT];
  int     nseq_out[NT];
  int lit_done = 0, bs_done = 0;
  int backpress = 0;   // 1 while output back-pressure is applied
  longint cyc = 0;
  int in_stall = 0, out_stall = 0;

  always @(posedge clk) cyc++;

  // ---------------------------------------------------------------- data
  function automatic bytes_t records(int n, int seed);
    bytes_t d;
    string syms[4] = '{"AAPL", "MSFT", "INTC", "ASML"};
    int px[4] = '{15023, 20110, 4550, 61200};
    int t = 9300000 + seed;
    while (d.size() < n) begin
      int s = $urandom_range(0, 3);
      string r;
      px[s] += $urandom_range(0, 20) - 10;
      t += $urandom_range(1, 40);
      r = $sformatf("T=%08d;S=%s;P=%06d;Q=%04d;X=%0d\n", t, syms[s], px[s], 100 * $urandom_range(1, 9), $urandom_range(0, 2));
      foreach (r[i]) if (d.size() < n) d.push_back(r[i]);
    end
    return d;
  endfunction

  initial begin
    void'($urandom(7));
    task_in[0] = records(6000, 1);
    for (int i = 0; i < 1000; i++) task_in[1].push_back(8'h41);               // run: offset 1
    for (int i = 0; i < 64; i++) task_in[2].push_back(8'($urandom));           // random
    task_in[3] = '{8'h31, 8'h32, 8'h33};                                        // 3 bytes
    task_in[4] = records(4093, 2);                                              // partial last word
    for (int i = 0; i < 999; i++) task_in[5].push_back(8'(65 + i % 5));        // period 5
    task_in[6] = records(131072, 3);                                            // full block
  end

  // ---------------------------------------------------------------- driver
  int first_hs = -1, last_hs = -1, t0_words;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      automatic int n = task_in[t].size();
      automatic int nw = (n + 3) / 4;
      backpress = (t == 1 || t == 4);
      for (int w = 0; w < nw; w++) begin
        automatic logic [31:0] d = 0;
        if (t == 4 && $urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        for (int k = 0; k < 4; k++) if (4 * w + k < n) d[8*k +: 8] = task_in[t][4*w+k];
        in_valid  = 1;
        in_data   = d;
        in_last   = (w == nw - 1);
        in_nbytes = (w == nw - 1) ? 3'(n - 4 * w) : 3'd4;
        // the word is taken at the next rising edge where in_ready is high
        while (!in_ready) begin in_stall++; @(negedge clk); end
        if (t == 0) begin
          if (w == 0) first_hs = int'(cyc);
          last_hs = int'(cyc);
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // ---------------------------------------------------------------- sinks
  always @(posedge clk) begin
    if (backpress) begin
      lit_ready <= $urandom_range(0, 2) != 0;
      bs_ready  <= $urandom_range(0, 2) != 0;
    end else begin
      lit_ready <= 1;
      bs_ready  <= 1;
    end
    if ((lit_valid && !lit_ready) || (bs_valid && !bs_ready)) out_stall++;
    if (!rst && lit_valid && lit_ready && lit_done < NT) begin
      for (int k = 0; k < int'(lit_nbytes); k++) lit_out[lit_done].push_back(lit_data[8*k +: 8]);
      if (lit_last) lit_done++;
    end
    if (!rst && bs_valid && bs_ready && bs_done < NT) begin
      for (int k = 0; k < int'(bs_nbytes); k++) bs_out[bs_done].push_back(bs_data[8*k +: 8]);
      if (bs_last) begin
        nseq_out[bs_done] = int'(bs_nseq);
        bs_done++;
      end
    end
  end

  // ---------------------------------------------------------------- check
  initial begin
    int n_seq = 0, n_rep = 0, n_overlap = 0, n_long = 0, n_noseq = 0;
    longint tot_in = 0, tot_out = 0;
    wait (lit_done == NT && bs_done == NT);
    repeat (5) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      int ll[$], ml[$], ofv[$], offs[$];
      int left;
      bytes_t rebuilt;
      left = decode_seqs(bs_out[t], nseq_out[t], ll, ml, ofv);
      rebuilt = execute(lit_out[t], ll, ml, ofv, offs);
      checks++;
      if (rebuilt != task_in[t]) begin
        failures++;
        $display("FAIL task %0d: rebuilt %0d bytes, expected %0d", t, rebuilt.size(), task_in[t].size());
      end
      checks++;
      if (left != 0) begin
        failures++;
        $display("FAIL task %0d: %0d bitstream bits not consumed", t, left);
      end
      if (nseq_out[t] == 0) n_noseq++;
      n_seq += nseq_out[t];
      for (int i = 0; i < ll.size(); i++) begin
        if (ofv[i] <= 3) n_rep++;
        if (offs[i] < 4) n_overlap++;
        if (ml[i] >= 16) n_long++;
      end
      tot_in  += task_in[t].size();
      tot_out += lit_out[t].size() + bs_out[t].size();
      $display("task %0d: %0d bytes -> %0d literals + %0d bitstream bytes, %0d sequences",
               t, task_in[t].size(), lit_out[t].size(), bs_out[t].size(), nseq_out[t]);
    end
    // 4 bytes per cycle on the first task
    t0_words = (task_in[0].size() + 3) / 4;
    checks++;
    if (last_hs - first_hs != t0_words - 1) begin
      failures++;
      $display("FAIL throughput: %0d words took %0d cycles", t0_words, last_hs - first_hs + 1);
    end
    $display("mechanisms: seq=%0d rep=%0d overlap=%0d long=%0d noseq_tasks=%0d in_stall=%0d out_stall=%0d",
             n_seq, n_rep, n_overlap, n_long, n_noseq, in_stall, out_stall);
    $display("ratio (literals + sequence bitstream) / input = %0.3f", real'(tot_out) / real'(tot_in));
    checks += 7;
    if (n_seq == 0) begin failures++; $display("FAIL no sequences"); end
    if (n_rep == 0) begin failures++; $display("FAIL no repeat offsets"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping match"); end
    if (n_long == 0) begin failures++; $display("FAIL no long match"); end
    if (n_noseq == 0) begin failures++; $display("FAIL no task without sequences"); end
    if (in_stall == 0) begin failures++; $display("FAIL kernel never stalled"); end
    if (out_stall == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: lit_done=%0d bs_done=%0d", lit_done, bs_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_zstd_accel - all ten kernels of the device at once, at default sizes.
//
// Every kernel gets two tasks of market-data-like records (kernel 0 a full
// 128 KB block), all streams run concurrently, and the odd kernels see output
// back-pressure. Each task's literals and sequence bitstream are decompressed
// by the reference decoder and must equal the input. Also checked: all kernels
// were busy in the same cycle, and each kernel without back-pressure took its
// first task at 4 bytes per cycle.
module tb_zstd_accel;
  import zstd_tb_pkg::*;
  localparam int NK = 10, NT = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NK-1:0]       in_valid = '0, in_ready, in_last = '0;
  logic [NK-1:0][31:0] in_data = '0;
  logic [NK-1:0][2:0]  in_nbytes = '0;
  logic [NK-1:0]       lit_valid, lit_ready = '1, lit_last;
  logic [NK-1:0][31:0] lit_data;
  logic [NK-1:0][2:0]  lit_nbytes;
  logic [NK-1:0]       bs_valid, bs_ready = '1, bs_last;
  logic [NK-1:0][63:0] bs_data;
  logic [NK-1:0][3:0]  bs_nbytes;
  logic [NK-1:0][14:0] bs_nseq;

  zstd_accel dut (.*);

  int checks = 0, failures = 0;
  bytes_t task_in [NK][NT];
  bytes_t lit_out [NK][NT];
  bytes_t bs_out  [NK][NT];
  int     nseq_out[NK][NT];
  int     lit_done[NK], bs_done[NK];
  int     first_hs[NK], last_hs[NK];
  int     all_busy = 0, drivers_done = 0;
  longint cyc = 0;

  function automatic bytes_t records(int n);
    bytes_t d;
    string syms[4] = '{"AAPL", "MSFT", "INTC", "ASML"};
    int px[4] = '{15023, 20110, 4550, 61200};
    int t = 9300000 + $urandom_range(0, 1000);
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
    void'($urandom(11));
    for (int k = 0; k < NK; k++) begin
      task_in[k][0] = records(k == 0 ? 131072 : 3000 + 997 * k);
      task_in[k][1] = records(500 + 13 * k);
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (&in_valid && &in_ready) all_busy++;
    for (int k = 0; k < NK; k++) begin
      lit_ready[k] <= (k % 2 == 0) || ($urandom_range(0, 2) != 0);
      bs_ready[k]  <= (k % 2 == 0) || ($urandom_range(0, 2) != 0);
      if (!rst && lit_valid[k] && lit_ready[k] && lit_done[k] < NT) begin
        for (int b = 0; b < int'(lit_nbytes[k]); b++) lit_out[k][lit_done[k]].push_back(lit_data[k][8*b +: 8]);
        if (lit_last[k]) lit_done[k]++;
      end
      if (!rst && bs_valid[k] && bs_ready[k] && bs_done[k] < NT) begin
        for (int b = 0; b < int'(bs_nbytes[k]); b++) bs_out[k][bs_done[k]].push_back(bs_data[k][8*b +: 8]);
        if (bs_last[k]) begin nseq_out[k][bs_done[k]] = int'(bs_nseq[k]); bs_done[k]++; end
      end
    end
  end

  // one driver per kernel
  for (genvar g = 0; g < NK; g++) begin : g_drv
    initial begin
      repeat (4) @(posedge clk);
      rst <= 0;
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        automatic int n = task_in[g][t].size();
        automatic int nw = (n + 3) / 4;
        for (int w = 0; w < nw; w++) begin
          automatic logic [31:0] d = 0;
          for (int b = 0; b < 4; b++) if (4 * w + b < n) d[8*b +: 8] = task_in[g][t][4*w+b];
          in_valid[g]  = 1;
          in_data[g]   = d;
          in_last[g]   = (w == nw - 1);
          in_nbytes[g] = (w == nw - 1) ? 3'(n - 4 * w) : 3'd4;
          while (!in_ready[g]) @(negedge clk);
          if (t == 0) begin
            if (w == 0) first_hs[g] = int'(cyc);
            last_hs[g] = int'(cyc);
          end
          @(negedge clk);
        end
        in_valid[g] = 0;
      end
      drivers_done++;
    end
  end

  function automatic bit all_done();
    for (int k = 0; k < NK; k++) if (lit_done[k] < NT || bs_done[k] < NT) return 0;
    return 1;
  endfunction

  initial begin
    longint tin = 0, tout = 0;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int k = 0; k < NK; k++) begin
      for (int t = 0; t < NT; t++) begin
        int ll[$], ml[$], ofv[$], offs[$];
        int left;
        bytes_t rebuilt;
        left = decode_seqs(bs_out[k][t], nseq_out[k][t], ll, ml, ofv);
        rebuilt = execute(lit_out[k][t], ll, ml, ofv, offs);
        checks += 2;
        if (rebuilt != task_in[k][t]) begin failures++; $display("FAIL kernel %0d task %0d: output does not decompress to the input", k, t); end
        if (left != 0) begin failures++; $display("FAIL kernel %0d task %0d: %0d bits left", k, t, left); end
        tin  += task_in[k][t].size();
        tout += lit_out[k][t].size() + bs_out[k][t].size();
      end
      if (k % 2 == 0) checks++;
      if (k % 2 == 0 && last_hs[k] - first_hs[k] != (task_in[k][0].size() + 3) / 4 - 1) begin
        failures++;
        $display("FAIL kernel %0d: first task not taken at 4 bytes per cycle (%0d cycles)", k, last_hs[k] - first_hs[k] + 1);
      end
    end
    checks++;
    if (all_busy == 0) begin failures++; $display("FAIL kernels never all busy together"); end
    $display("%0d bytes in, %0d bytes out (ratio %0.3f), all-busy cycles %0d", tin, tout, real'(tout) / real'(tin), all_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

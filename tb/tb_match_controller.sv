// tb_match_controller - drives the match controller with words of a repetitive
// text and with engine results worked out by the testbench (the most recent
// earlier-word occurrence of each lane's 4-byte string, inside the task and at
// most 240 bytes back; history reduced to 256 bytes). The pipeline enable is
// dropped at random. Checks, per task: literals and sequences rebuild the input
// exactly; every match is at least 4 bytes and ends at a differing byte or at
// the end of the task; one sequence-stream entry marks each task's end.
module tb_match_controller;
  import zstd_pkg::*;
  localparam int H = 256, MO = 240;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic en = 0, w_valid = 0, w_last = 0, hist_wr_en = 0;
  logic [31:0] w_pos = 0, w_data = 0, hist_wr_pos = 0, hist_wr_data = 0;
  logic [3:0] w_vmask = 0, w_lane_ok = 0, m_ok = 0;
  logic [3:0][31:0] m_pos = '0;
  logic lit_valid, lit_last, seq_valid;
  logic [31:0] lit_data;
  logic [3:0] lit_mask;
  seq_raw_t seq_out;

  match_controller #(.HIST(H)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned data [$];
  int tstart [4] = '{0, 2000, 2600, 2604};   // task boundaries (last one: end)
  int tlen   [3] = '{1998, 600, 3};          // bytes of each task (partial last words)
  byte unsigned lits [3][$];
  int sll [3][$], sml [3][$], soff [3][$];
  int n_end = 0, n_overlap = 0;
  int cur_task = 0;

  function automatic logic [31:0] word_at(int p);
    return {data[p+3], data[p+2], data[p+1], data[p]};
  endfunction

  // collect outputs whenever the pipeline advances
  always @(posedge clk) if (!rst && en) begin
    if (lit_valid)
      for (int k = 0; k < 4; k++) if (lit_mask[k]) lits[cur_task].push_back(lit_data[8*k +: 8]);
    if (seq_valid) begin
      if (seq_out.has_seq) begin
        sll[cur_task].push_back(int'(seq_out.lit_len));
        sml[cur_task].push_back(int'(seq_out.match_len));
        soff[cur_task].push_back(int'(seq_out.offset));
        if (seq_out.offset < 4) n_overlap++;
      end
      if (seq_out.last) begin n_end++; cur_task++; end
    end
  end

  initial begin
    int last_at [int];
    for (int i = 0; i < 2700; i++)
      data.push_back((i % 97 < 60) ? 8'(65 + (i % 7) + ((i / 700) % 2)) : 8'($urandom_range(65, 68)));
    for (int i = 300; i < 340; i++) data[i] = 8'h5a;    // a run: offset 1 matches
    repeat (3) @(posedge clk);
    // history holds each word two words ahead of the controller, as in the kernel
    @(negedge clk);
    rst = 0;
    hist_wr_en = 1; hist_wr_pos = 0; hist_wr_data = word_at(0);
    @(negedge clk);
    hist_wr_pos = 4; hist_wr_data = word_at(4);
    for (int t = 0; t < 3; t++) begin
      automatic int nw = (tlen[t] + 3) / 4;
      for (int w = 0; w < nw; w++) begin
        automatic int p0 = tstart[t] + 4 * w;
        automatic int nv = tlen[t] - 4 * w;
        @(negedge clk);
        w_valid = 1; w_pos = 32'(p0); w_data = word_at(p0); w_last = (w == nw - 1);
        for (int k = 0; k < 4; k++) begin
          automatic int key = int'(word_at(p0 + k));
          w_vmask[k]   = (k < nv);
          w_lane_ok[k] = (k + 4 <= nv);
          m_ok[k] = w_lane_ok[k] && last_at.exists(key) && last_at[key] >= tstart[t] && (p0 + k - last_at[key]) <= MO;
          m_pos[k] = m_ok[k] ? 32'(last_at[key]) : 32'h0;
        end
        hist_wr_en = 1; hist_wr_pos = 32'(p0 + 8); hist_wr_data = word_at(p0 + 8);
        en = ($urandom_range(0, 4) != 0);
        while (!en) begin
          @(negedge clk);
          hist_wr_en = 0;
          en = ($urandom_range(0, 2) != 0);
        end
        for (int k = 0; k < 4; k++) if (k < nv) last_at[int'(word_at(p0 + k))] = p0 + k;
      end
    end
    @(negedge clk);
    w_valid = 0; hist_wr_en = 0;
    repeat (3) @(negedge clk);
    // ---- check each task
    for (int t = 0; t < 3; t++) begin
      automatic byte unsigned out [$];
      automatic int lp = 0;
      for (int i = 0; i < sll[t].size(); i++) begin
        for (int k = 0; k < sll[t][i]; k++) out.push_back(lits[t][lp++]);
        for (int k = 0; k < sml[t][i]; k++) out.push_back(out[out.size() - soff[t][i]]);
        checks++;
        if (sml[t][i] < 4) begin failures++; $display("FAIL task %0d seq %0d: match of %0d bytes", t, i, sml[t][i]); end
        // maximal: the next byte differs, or the task ends
        checks++;
        if (out.size() < tlen[t] && data[tstart[t] + out.size()] == out[out.size() - soff[t][i]]) begin
          failures++;
          $display("FAIL task %0d seq %0d: match could have been longer", t, i);
        end
      end
      while (lp < lits[t].size()) out.push_back(lits[t][lp++]);
      checks++;
      if (out.size() != tlen[t]) begin
        failures++;
        $display("FAIL task %0d: rebuilt %0d bytes, expected %0d", t, out.size(), tlen[t]);
      end else
        for (int i = 0; i < tlen[t]; i++) if (out[i] != data[tstart[t] + i]) begin
          failures++;
          $display("FAIL task %0d: byte %0d differs", t, i);
          break;
        end
      $display("task %0d: %0d bytes, %0d literals, %0d sequences", t, tlen[t], lits[t].size(), sll[t].size());
    end
    checks += 2;
    if (n_end != 3) begin failures++; $display("FAIL %0d end marks", n_end); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping match"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

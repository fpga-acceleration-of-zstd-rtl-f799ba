// tb_hash_match_engine - one engine with small tables (64 entries, many hash
// collisions) and a 256-byte history, fed with words of a two-letter text. For
// every word the engine looks up lane LK; the expected result is worked out
// from a model of the four per-lane tables and the input bytes: the nearest
// candidate that is earlier than the word, inside the task, no more than
// MAX_OFF back and whose 4 bytes equal the looked-up string. Tasks restart
// every 300 words, so candidates of the previous task must be rejected.
module tb_hash_match_engine;
  import zstd_tb_pkg::*;
  localparam int E = 64, AW = 6, H = 256, MO = 240, LK = 1;
  // positions start far from 0 so that the tables' random power-up contents
  // can never pass the range checks
  localparam logic [31:0] OFS = 32'h4000_0000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en = 1, word_valid = 0, lk_ok = 0, hist_wr_en = 0, m_ok;
  logic [31:0] word_pos = 0, task_base = 0, lk_pos = 0, lk_str = 0, hist_wr_pos = 0, hist_wr_data = 0, m_pos;
  logic [3:0] ins_ok = 0;
  logic [3:0][AW-1:0] ins_hash = '0;
  logic [AW-1:0] lk_hash = 0;

  hash_match_engine #(.TABLES(4), .ENTRIES(E), .HIST(H), .MAX_OFF(MO)) dut (.*);

  int checks = 0, failures = 0, hits = 0, rejected_old = 0;
  byte unsigned data [$];
  longint tab [4][int];     // model tables: hash -> position
  logic        exp_ok [$];
  logic [31:0] exp_pos [$];

  function automatic logic [31:0] str_at(longint p);
    return {data[p+3], data[p+2], data[p+1], data[p]};
  endfunction

  initial begin
    int nw = 3000;
    for (int i = 0; i < 4 * nw + 8; i++) data.push_back($urandom_range(0, 1) ? 8'h61 : 8'h62);
    for (int w = 0; w < nw; w++) begin
      automatic longint p0 = 4 * w;
      automatic longint base = (w / 300) * 1200;
      automatic logic eok = 0;
      automatic logic [31:0] epos = 0;
      // expected result from the tables before this word's inserts
      for (int j = 0; j < 4; j++) begin
        automatic int hsh = int'(hash4(str_at(p0 + LK), AW));
        if (tab[j].exists(hsh)) begin
          automatic longint c = tab[j][hsh];
          if (c < p0 && c >= base && (p0 + LK - c) <= MO && str_at(c) == str_at(p0 + LK)) begin
            if (!eok || OFS + 32'(c) > epos) begin eok = 1; epos = OFS + 32'(c); end
          end else if (c < base && str_at(c) == str_at(p0 + LK)) rejected_old++;
        end
      end
      exp_ok.push_back(eok); exp_pos.push_back(epos);
      @(negedge clk);
      word_valid = 1; word_pos = OFS + 32'(p0); task_base = OFS + 32'(base);
      ins_ok = 4'hf; lk_ok = 1; lk_pos = OFS + 32'(p0 + LK); lk_str = str_at(p0 + LK);
      lk_hash = AW'(hash4(str_at(p0 + LK), AW));
      for (int j = 0; j < 4; j++) begin
        ins_hash[j] = AW'(hash4(str_at(p0 + j), AW));
        tab[j][int'(ins_hash[j])] = p0 + j;
      end
      hist_wr_en = 1; hist_wr_pos = OFS + 32'(p0); hist_wr_data = str_at(p0);
      // result of the word issued two cycles ago
      if (w >= 2) begin
        checks++;
        if (m_ok !== exp_ok[w-2] || (m_ok && m_pos !== exp_pos[w-2])) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: got %b/%0d expected %b/%0d", w - 2, m_ok, m_pos, exp_ok[w-2], exp_pos[w-2]);
        end
        if (m_ok) hits++;
      end
    end
    checks++;
    if (hits == 0 || rejected_old == 0) begin
      failures++;
      $display("FAIL coverage: hits=%0d rejected_old=%0d", hits, rejected_old);
    end
    $display("hits=%0d rejected_old_task=%0d", hits, rejected_old);
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

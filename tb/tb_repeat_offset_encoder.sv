// tb_repeat_offset_encoder - random sequences whose offsets are often one of the
// last three offsets (or the first minus one), with zero literal lengths half of
// the time, through the encoder under random output back-pressure. The expected
// offset value of each sequence comes from a testbench model of the Zstd repeat
// rules; end-of-task entries must restart the history at 1/4/8.
module tb_repeat_offset_encoder;
  import zstd_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  seq_raw_t in_seq = '0;
  seq_t out_seq;
  repeat_offset_encoder dut (.*);

  int checks = 0, failures = 0;
  int exp_ofv [$];
  int exp_ll [$];
  int n_code [4];
  int n_ll0_rep = 0;

  always @(posedge clk) begin
    out_ready <= $urandom_range(0, 3) != 0;
    if (!rst && out_valid && out_ready && out_seq.has_seq) begin
      automatic int e = exp_ofv.pop_front();
      automatic int l = exp_ll.pop_front();
      checks++;
      if (int'(out_seq.off_value) != e || int'(out_seq.lit_len) != l) begin
        failures++;
        $display("FAIL got ofv %0d ll %0d expected ofv %0d ll %0d", out_seq.off_value, out_seq.lit_len, e, l);
      end
    end
  end

  initial begin
    int rep [3], nr [3];
    repeat (3) @(negedge clk);
    rst = 0;
    begin nr = '{1, 4, 8}; rep = nr; end
    for (int i = 0; i < 4000; i++) begin
      automatic int ll = $urandom_range(0, 1) ? 0 : $urandom_range(1, 300);
      automatic int r = $urandom_range(0, 4);
      automatic int off;
      automatic int ofv;
      automatic logic last = ($urandom_range(0, 99) == 0);
      off = (r == 0) ? rep[0] : (r == 1) ? rep[1] : (r == 2) ? rep[2] : (r == 3 && rep[0] > 1) ? rep[0] - 1 : $urandom_range(1, 60000);
      // expected code and new history (Zstd rules)
      if (ll != 0 && off == rep[0]) ofv = 1;
      else if (ll != 0 && off == rep[1]) begin ofv = 2; begin nr = '{rep[1], rep[0], rep[2]}; rep = nr; end end
      else if (ll != 0 && off == rep[2]) begin ofv = 3; begin nr = '{rep[2], rep[0], rep[1]}; rep = nr; end end
      else if (ll == 0 && off == rep[1]) begin ofv = 1; begin nr = '{rep[1], rep[0], rep[2]}; rep = nr; end end
      else if (ll == 0 && off == rep[2]) begin ofv = 2; begin nr = '{rep[2], rep[0], rep[1]}; rep = nr; end end
      else if (ll == 0 && off == rep[0] - 1) begin ofv = 3; begin nr = '{rep[0] - 1, rep[0], rep[1]}; rep = nr; end end
      else begin ofv = off + 3; begin nr = '{off, rep[0], rep[1]}; rep = nr; end end
      if (ofv <= 3) begin n_code[ofv]++; if (ll == 0) n_ll0_rep++; end
      else n_code[0]++;
      if (last) begin nr = '{1, 4, 8}; rep = nr; end
      exp_ofv.push_back(ofv);
      exp_ll.push_back(ll);
      in_valid = 1;
      in_seq = '{has_seq: 1'b1, last: last, lit_len: len_t'(ll), match_len: len_t'(4), offset: 32'(off)};
      // taken at the next rising edge with in_ready high
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks += 2;
    if (exp_ofv.size() != 0) begin failures++; $display("FAIL %0d sequences missing", exp_ofv.size()); end
    if (n_code[1] == 0 || n_code[2] == 0 || n_code[3] == 0 || n_ll0_rep == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d", n_code[1], n_code[2], n_code[3], n_ll0_rep);
    end
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

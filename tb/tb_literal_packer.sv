// tb_literal_packer - random byte masks, random input gaps and output
// back-pressure, tasks of random length (including ones ending with 0..7
// pending bytes). The output must be the masked bytes in order, in full 4-byte
// words, each task closed by exactly one last beat with the right byte count.
module tb_literal_packer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [31:0] in_data = 0, out_data;
  logic [3:0] in_mask = 0;
  logic [2:0] out_nbytes;
  literal_packer dut (.*);

  int checks = 0, failures = 0, tasks_out = 0, n_double = 0;
  byte unsigned exp [$];
  int exp_task_len [$];
  int got_len = 0;

  always @(posedge clk) begin
    out_ready <= $urandom_range(0, 3) != 0;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (!out_last && out_nbytes != 4) begin failures++; $display("FAIL partial word before the end"); end
      for (int k = 0; k < int'(out_nbytes); k++) begin
        automatic byte unsigned e = exp.pop_front();
        checks++;
        got_len++;
        if (out_data[8*k +: 8] != e) begin failures++; $display("FAIL byte %h expected %h", out_data[8*k +: 8], e); end
      end
      if (out_last) begin
        automatic int el = exp_task_len.pop_front();
        checks++;
        if (got_len != el) begin failures++; $display("FAIL task of %0d bytes, expected %0d", got_len, el); end
        got_len = 0;
        tasks_out++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int nw = $urandom_range(1, 20);
      automatic int len = 0;
      for (int w = 0; w < nw; w++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(0, 2) != 0); end
        in_data = $urandom;
        in_mask = 4'($urandom);
        in_last = (w == nw - 1);
        if (in_last && t % 3 == 0) in_mask = 4'hf;
        while (!in_ready) @(negedge clk);
        for (int k = 0; k < 4; k++) if (in_mask[k]) begin exp.push_back(in_data[8*k +: 8]); len++; end
        if (in_last) begin
          exp_task_len.push_back(len);
          if (len % 4 != 0 && (len % 4) + 0 < 4 && $countones(in_mask) > (len % 4)) n_double++;
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (50) @(posedge clk);
    checks += 2;
    if (tasks_out != 200) begin failures++; $display("FAIL %0d tasks out", tasks_out); end
    if (n_double == 0) begin failures++; $display("FAIL no two-word flush"); end
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

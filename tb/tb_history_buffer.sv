// tb_history_buffer - checks unaligned 4-byte reads of the ring buffer against a
// byte-array model, on two read ports at once, across the wrap-around of a
// reduced 256-byte buffer, with the one-cycle read latency.
module tb_history_buffer;
  localparam int D = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [31:0] wr_pos = 0, wr_data = 0;
  logic [1:0] rd_en = 0;
  logic [1:0][31:0] rd_pos = '0, rd_data;
  history_buffer #(.DEPTH(D), .N_RD(2), .POS_W(32)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned mem [longint];

  initial begin
    longint wp = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic logic [31:0] exp [2];
      @(negedge clk);
      // write the next word
      wr_en = 1; wr_pos = 32'(wp); wr_data = $urandom;
      for (int k = 0; k < 4; k++) mem[wp + k] = wr_data[8*k +: 8];
      wp += 4;
      // read two windows fully inside the last D-4 written bytes
      rd_en = 2'b11;
      for (int p = 0; p < 2; p++) begin
        automatic longint lo = (wp - 4 - (D - 8) > 0) ? wp - 4 - (D - 8) : 0;
        automatic longint r = lo + $urandom_range(0, int'(wp - 8 - lo > 0 ? wp - 8 - lo : 0));
        if (wp < 8) r = 0;
        rd_pos[p] = 32'(r);
        for (int k = 0; k < 4; k++) exp[p][8*k +: 8] = mem.exists(r + k) ? mem[r + k] : 8'h00;
      end
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      if (wp >= 8)
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (rd_data[p] !== exp[p]) begin
            failures++;
            $display("FAIL port %0d pos %0d: got %h expected %h", p, rd_pos[p], rd_data[p], exp[p]);
          end
        end
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

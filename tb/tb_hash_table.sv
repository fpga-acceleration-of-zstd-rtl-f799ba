// tb_hash_table - checks the hash table RAM against an associative-array model:
// random inserts and lookups, read-first behaviour when a lookup and an insert
// hit the same entry, one-cycle read latency, and output hold while rd_en is low.
module tb_hash_table;
  localparam int E = 4096, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_pos = 0, rd_pos;
  hash_table #(.ENTRIES(E), .POS_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned model [int];

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // fill the entries that will be read
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a * 16); wr_pos = $urandom; model[a * 16] = wr_pos;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int ra = $urandom_range(0, 255) * 16;
      automatic int wa = ($urandom_range(0, 3) == 0) ? ra : $urandom_range(0, 255) * 16;
      automatic int unsigned exp = model[ra];
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(ra);
      wr_en = $urandom_range(0, 1); wr_addr = AW'(wa); wr_pos = $urandom;
      if (wr_en) model[wa] = wr_pos;
      @(negedge clk);
      chk(rd_pos, exp, "lookup (old contents on a same-entry insert)");
      rd_en = 0; wr_en = 0;
      @(negedge clk);
      chk(rd_pos, exp, "output held while rd_en is low");
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

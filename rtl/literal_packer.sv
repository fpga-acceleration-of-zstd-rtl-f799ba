// literal_packer - packs the literal bytes of each task into dense 4-byte words.
//
// The kernel stores literals raw (no Huffman coding), so the literal section
// of a Zstd block is simply the literal bytes in input order. Each input beat
// is a 4-byte word with a mask of the bytes that are literals; the packer
// drops the other bytes and outputs full little-endian words. At the end of a
// task (in_last) the remaining 0..3 bytes (0..7 when the last beat adds more)
// are flushed, and the final beat carries out_last and its byte count
// out_nbytes (0..4; 0 only when a task has no trailing bytes to send).
//
// Handshake: valid/ready on both sides. The output is registered; in_ready is
// low for one cycle when a last beat needs two output words.
// The packing scheme is this design's own.
module literal_packer (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic [3:0]  in_mask,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic [2:0]  out_nbytes,
  output logic        out_last
);

  logic [2:0][7:0] acc;      // 0..3 bytes left over
  logic [1:0]      acc_n;
  logic            pend;     // a final partial word waits to be sent
  logic            out_free;

  assign out_free = !out_valid || out_ready;
  assign in_ready = out_free && !pend;

  // append the masked bytes of the beat to the left-over bytes
  logic [6:0][7:0] cat;
  logic [2:0]      cat_n;
  always_comb begin
    cat   = '0;
    for (int i = 0; i < 3; i++) cat[i] = acc[i];
    cat_n = 3'(acc_n);
    for (int k = 0; k < 4; k++)
      if (in_mask[k]) begin
        cat[cat_n] = in_data[8*k +: 8];
        cat_n      = cat_n + 3'd1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      acc_n     <= '0;
      pend      <= 1'b0;
    end else if (out_free) begin
      out_valid <= 1'b0;
      if (pend) begin
        out_valid  <= 1'b1;
        out_data   <= {8'h00, acc};
        out_nbytes <= 3'(acc_n);
        out_last   <= 1'b1;
        acc_n      <= '0;
        pend       <= 1'b0;
      end else if (in_valid) begin
        if (cat_n >= 3'd4) begin
          out_valid  <= 1'b1;
          out_data   <= cat[3:0];
          out_nbytes <= 3'd4;
          acc        <= cat[6:4];
          acc_n      <= 2'(cat_n - 3'd4);
          out_last   <= in_last && (cat_n == 3'd4);
          pend       <= in_last && (cat_n != 3'd4);
        end else begin
          acc   <= cat[2:0];
          acc_n <= 2'(cat_n);
          if (in_last) begin
            out_valid  <= 1'b1;
            out_data   <= cat[3:0];
            out_nbytes <= cat_n;
            out_last   <= 1'b1;
            acc_n      <= '0;
          end
        end
      end
    end
  end

endmodule

// history_buffer - ring buffer of the most recent input bytes.
//
// Holds the last DEPTH bytes of the input stream, addressed by absolute byte
// position modulo DEPTH. Every write stores one aligned 4-byte word (position
// a multiple of 4). Each of the N_RD read ports returns the 4 consecutive bytes
// starting at any byte position, aligned or not: the storage is split into 4
// byte-wide banks (bank = position mod 4), and every port has its own copy of
// the banks so that all ports read in the same cycle, as a block RAM with one
// write and one read port per copy would. Reads are synchronous: rd_data is
// valid the cycle after rd_en and holds while rd_en is low. rd_data[7:0] is the
// byte at rd_pos. Contents are not reset.
// The 64 KB size follows the kernel's choice of history depth; the banking and
// the per-port copies are this design's own.
module history_buffer #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned N_RD  = 1,
  parameter int unsigned POS_W = 32,
  localparam int unsigned BW   = $clog2(DEPTH / 4)   // bank address width
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [POS_W-1:0]          wr_pos,    // multiple of 4
  input  logic [31:0]               wr_data,   // byte k at wr_pos + k
  input  logic [N_RD-1:0]           rd_en,
  input  logic [N_RD-1:0][POS_W-1:0] rd_pos,
  output logic [N_RD-1:0][31:0]     rd_data
);

  for (genvar p = 0; p < N_RD; p++) begin : g_port
    // bank b holds bytes at positions 4*i + b
    logic [7:0] bank [4][DEPTH/4];
    logic [1:0] sel_q;
    logic [3:0][7:0] q;

    always_ff @(posedge clk) begin
      if (wr_en)
        for (int b = 0; b < 4; b++) bank[b][wr_pos[BW+1:2]] <= wr_data[8*b +: 8];
      if (rd_en[p]) begin
        for (int b = 0; b < 4; b++) begin
          // bank b supplies the byte of the 4-byte window that lies in bank b;
          // that byte is in the same row as rd_pos, or the next row if b < rd_pos mod 4
          if (2'(b) >= rd_pos[p][1:0]) q[b] <= bank[b][rd_pos[p][BW+1:2]];
          else                         q[b] <= bank[b][rd_pos[p][BW+1:2] + BW'(1)];
        end
        sel_q <= rd_pos[p][1:0];
      end
    end

    // rotate the banks so that byte 0 is the byte at rd_pos
    always_comb
      for (int k = 0; k < 4; k++) rd_data[p][8*k +: 8] = q[2'(k) + sel_q];
  end

endmodule

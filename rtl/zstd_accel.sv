// zstd_accel - the compression kernels of one FPGA, side by side.
//
// Each kernel compresses 4 bytes per cycle; throughput is scaled by placing
// N_KERNELS independent kernels on the device (ten in the evaluated build).
// The kernels share nothing: a task scheduler outside this module (part of the
// FPGA platform, together with the PCIe controller and DMA) hands each task to
// one kernel through that kernel's input stream and collects its literal and
// sequence-bitstream streams. All ports are arrays indexed by kernel number,
// with the same meaning and timing as the ports of zstd_kernel.
// The count of ten kernels is the evaluated configuration; the flat array of
// per-kernel streams is this design's choice of how the platform attaches.
module zstd_accel
  import zstd_pkg::*;
#(
  parameter int unsigned N_KERNELS = 10,
  localparam int unsigned SAW      = $clog2(BLOCK_BYTES / 8 + 2)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_KERNELS-1:0]          in_valid,
  output logic [N_KERNELS-1:0]          in_ready,
  input  logic [N_KERNELS-1:0][31:0]    in_data,
  input  logic [N_KERNELS-1:0]          in_last,
  input  logic [N_KERNELS-1:0][2:0]     in_nbytes,
  output logic [N_KERNELS-1:0]          lit_valid,
  input  logic [N_KERNELS-1:0]          lit_ready,
  output logic [N_KERNELS-1:0][31:0]    lit_data,
  output logic [N_KERNELS-1:0][2:0]     lit_nbytes,
  output logic [N_KERNELS-1:0]          lit_last,
  output logic [N_KERNELS-1:0]          bs_valid,
  input  logic [N_KERNELS-1:0]          bs_ready,
  output logic [N_KERNELS-1:0][63:0]    bs_data,
  output logic [N_KERNELS-1:0][3:0]     bs_nbytes,
  output logic [N_KERNELS-1:0]          bs_last,
  output logic [N_KERNELS-1:0][SAW-1:0] bs_nseq
);

  for (genvar i = 0; i < N_KERNELS; i++) begin : g_k
    zstd_kernel u_kernel (
      .clk, .rst,
      .in_valid   (in_valid[i]),
      .in_ready   (in_ready[i]),
      .in_data    (in_data[i]),
      .in_last    (in_last[i]),
      .in_nbytes  (in_nbytes[i]),
      .lit_valid  (lit_valid[i]),
      .lit_ready  (lit_ready[i]),
      .lit_data   (lit_data[i]),
      .lit_nbytes (lit_nbytes[i]),
      .lit_last   (lit_last[i]),
      .bs_valid   (bs_valid[i]),
      .bs_ready   (bs_ready[i]),
      .bs_data    (bs_data[i]),
      .bs_nbytes  (bs_nbytes[i]),
      .bs_last    (bs_last[i]),
      .bs_nseq    (bs_nseq[i])
    );
  end

endmodule

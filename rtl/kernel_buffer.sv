// kernel_buffer: on-chip store of the kernel spectra.
//
// Holds the P-beat 2D FFT of every (output channel, input channel) kernel
// of the current layer, up to D_OUT_MAX x D_IN_MAX kernels, at address
// (d_out * D_in + d_in) * P + beat. Kernels are transformed once when the
// layer starts and then reused for every tile. One write port, one read
// port, read data one cycle after rd_en.
//
// A kernel buffer is part of the accelerator; its capacity and addressing
// are this design's choice.
module kernel_buffer
  import oaa_pkg::*;
#(
  parameter int unsigned P         = FFT_P,
  parameter int unsigned D_IN_MAX  = 64,
  parameter int unsigned D_OUT_MAX = 16,
  localparam int unsigned AW       = $clog2(D_OUT_MAX * D_IN_MAX * P)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  cplx_t         wr_data [P],
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output cplx_t         rd_data [P]
);

  typedef cplx_t beat_t [P];
  beat_t mem [D_OUT_MAX * D_IN_MAX * P];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

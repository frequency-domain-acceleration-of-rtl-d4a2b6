// image_buffer: double-buffered store for the spectra of one input tile.
//
// Holds, for each of up to D_IN_MAX input channels, the P beats of the 2D
// FFT of the current input tile. The spectra are kept so that one FFT of the
// input serves every output channel's kernel. Two halves are provided: the
// loader fills one half with the next tile while the MAC reads the other,
// which overlaps the transfer of input data with computation.
// Addressing: {half, channel * P + beat}. One write port and one read port;
// reads return data one cycle after rd_en (block-RAM style).
//
// Reuse of FFT results across kernels follows the accelerator; the
// double-buffering and the sizes are this design's choices.
module image_buffer
  import oaa_pkg::*;
#(
  parameter int unsigned P        = FFT_P,
  parameter int unsigned D_IN_MAX = 64,
  localparam int unsigned AW      = $clog2(D_IN_MAX * P)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_half,
  input  logic [AW-1:0] wr_addr,
  input  cplx_t         wr_data [P],
  input  logic          rd_en,
  input  logic          rd_half,
  input  logic [AW-1:0] rd_addr,
  output cplx_t         rd_data [P]
);

  typedef cplx_t beat_t [P];
  beat_t mem [2 * D_IN_MAX * P];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_half, wr_addr}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_half, rd_addr}];
  end

endmodule

// hadamard_mac: frequency-domain multiply-accumulate over input channels.
//
// For every output channel the convolver needs
//   Y[k] = sum over d_in of X_din[k] * K_dout,din[k]
// element by element over the P x P spectrum (a Hadamard product). Beats of
// P spectrum words arrive with their beat index; `first` marks the first
// input channel (the accumulator restarts from the product) and `last` the
// final one (the finished sum is emitted). The running sums of one whole
// tile (P beats of P words) are kept in registers, so the channels can be
// interleaved beat by beat: for each d_in the P beats of the tile are sent
// in order. Each lane uses a cmul_gated multiplier, which skips the
// floating-point multipliers when a spectrum value is 0, 1, j or -j.
//
// The Hadamard product and sum over channels follow the accelerator; the
// accumulator organisation is this design's. Timing: result one cycle after
// the `last` beat, one beat per cycle, no stall.
module hadamard_mac
  import oaa_pkg::*;
#(
  parameter int unsigned P  = FFT_P,
  localparam int unsigned BW = $clog2(P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          first,
  input  logic          last,
  input  logic [BW-1:0] beat,
  input  cplx_t         img [P],
  input  cplx_t         ker [P],
  output logic          out_valid,
  output cplx_t         out_data [P],
  output logic [P-1:0]  gated          // lanes whose multiplier was bypassed
);

  cplx_t acc  [P][P];
  cplx_t prod [P];
  cplx_t sum  [P];

  for (genvar l = 0; l < P; l++) begin : g_lane
    cmul_gated u_mul (.a(img[l]), .b(ker[l]), .y(prod[l]), .gated(gated[l]));
    assign sum[l] = first ? prod[l] : c_add(acc[beat][l], prod[l]);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      acc[beat] <= sum;
      if (last) out_data <= sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && last;
  end

endmodule

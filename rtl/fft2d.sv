// fft2d: streaming 2D FFT (INV = 0) or 2D IFFT (INV = 1) of P x P tiles.
//
// Row FFT, matrix transpose, column FFT: a tile enters as P beats of P
// complex words (beat r = row r) and each beat goes through a P-point
// fft1d_var, then spn_transpose turns rows into columns, and a second
// fft1d_var transforms the columns. The result leaves transposed: output
// beat v holds frequency column v, lane u frequency row u. Fed with a tile in
// that transposed layout, the INV = 1 instance returns the spatial tile in
// natural layout (beat r = row r), because the second transpose undoes the
// first. The inverse is scaled by 1/P per dimension.
//
// 2D FFT = row FFT + column FFT with a streaming-permutation transpose is the
// accelerator's organisation; P = 16 and the full-length mode of the FFT are
// this design's configuration. Timing: one beat per cycle in and out, no
// stall; the first beat of a tile leaves 2*S + P + 1 cycles after the first
// beat enters (S = log4 P pipeline stages per FFT), i.e. 21 cycles for P = 16.
module fft2d
  import oaa_pkg::*;
#(
  parameter int unsigned P   = FFT_P,
  parameter bit          INV = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data [P],
  output logic  out_valid,
  output cplx_t out_data [P]
);

  logic  row_v, row_m, tr_v, col_m, row_b, col_b;
  cplx_t row_d [P];
  cplx_t tr_d  [P];

  fft1d_var #(.N(P), .INV(INV)) u_row (
    .clk, .rst_n, .in_valid, .in_mode(1'b0), .in_data,
    .out_valid(row_v), .out_mode(row_m), .out_data(row_d), .last_bypassed(row_b)
  );

  spn_transpose #(.P(P)) u_tr (
    .clk, .rst_n, .in_valid(row_v), .in_data(row_d),
    .out_valid(tr_v), .out_data(tr_d)
  );

  fft1d_var #(.N(P), .INV(INV)) u_col (
    .clk, .rst_n, .in_valid(tr_v), .in_mode(1'b0), .in_data(tr_d),
    .out_valid, .out_mode(col_m), .out_data, .last_bypassed(col_b)
  );

  logic unused;
  assign unused = row_m ^ col_m ^ row_b ^ col_b;

endmodule

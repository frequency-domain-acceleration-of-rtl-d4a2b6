// tb_fp_pkg: testbench helpers to move between SystemVerilog `real` and the
// FP32 bit patterns of the accelerator, and to compare vectors with a
// tolerance. Conversions go through the IEEE-754 double layout, so they are
// exact for FP32 -> real and round to nearest for real -> FP32.
package tb_fp_pkg;
  import oaa_pkg::*;

  function automatic real f2r(fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic fp32_t r2f(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]};
    if (d[28]) begin
      if (m == 24'hff_ffff) begin m = 24'h80_0000; e = e + 1; end
      else m = m + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Random value in [-1, 1) with 12 fractional bits, exact in FP32.
  function automatic real rnd_unit();
    return (real'($urandom_range(0, 8191)) - 4096.0) / 4096.0;
  endfunction
endpackage

// fft3d_tb_pkg: helpers shared by the 3D FFT testbenches.
//
// Conversion between IEEE-754 binary32 bit patterns and simulator reals, done by
// repacking the binary64 pattern of $realtobits (exponent rebiased, mantissa
// rounded to nearest). Values below the smallest normal binary32 become zero,
// which is adequate for test data. Also a complex multiply-accumulate helper.
package fft3d_tb_pkg;
  import fft3d_pkg::*;

  function automatic logic [31:0] real_to_f32(real v);
    logic [63:0] d;
    int          e;
    logic [23:0] m;   // 23 bits of fraction plus carry
    d = $realtobits(v);
    e = int'(d[62:52]) - 1023 + 127;
    if (v == 0.0 || e <= 0) return {d[63], 31'd0};
    m = {1'b0, d[51:29]} + 24'(d[28]);
    if (m[23]) begin
      m = '0;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real f32_to_real(logic [31:0] f);
    logic [63:0] d;
    int          e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127 + 1023;
    d = {f[31], 11'(e), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic cplx_t to_cplx(real re, real im);
    return '{re: real_to_f32(re), im: real_to_f32(im)};
  endfunction

  function automatic real re_of(cplx_t c);
    return f32_to_real(c.re);
  endfunction

  function automatic real im_of(cplx_t c);
    return f32_to_real(c.im);
  endfunction

endpackage

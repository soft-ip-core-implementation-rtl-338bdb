// tb_fp_pkg: reference conversions between IEEE-754 single-precision words
// and SystemVerilog real (double) values, used by the testbenches to work
// out expected results independently of the hardware.
//   fp2real  exact conversion of a single-precision word (denormals as 0)
//   real2fp  round-to-nearest-even conversion of a double to single
//            precision (underflow flushes to 0, overflow gives infinity)
//   ulp      spacing of single-precision numbers at a given word
package tb_fp_pkg;

  function automatic real fp2real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2fp(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, s;
    int          e;
    logic [24:0] mr;
    if (r == 0.0) return 32'd0;
    d  = $realtobits(r);
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    s  = |d[27:0];
    mr = {1'b0, m} + 25'(g & (s | m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic real ulp(input logic [31:0] f);
    return 2.0 ** (int'(f[30:23]) - 127 - 23);
  endfunction

  // Random single-precision number with the biased exponent in [elo, ehi].
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom % 32'(ehi - elo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic real abs_r(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

endpackage

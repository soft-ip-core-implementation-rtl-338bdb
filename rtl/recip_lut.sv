// recip_lut: seed table for the reciprocal of a floating-point significand.
//
// The significand m = 1.f lies in [1, 2). The top ADDR_BITS bits of f
// select one of 2**ADDR_BITS equal intervals of m; the table holds the
// reciprocal of the interval's midpoint,
//     y0[k] = round( 2**(FRAC_BITS + ADDR_BITS + 1) / (2**(ADDR_BITS + 1) + 2k + 1) ),
// as an unsigned fixed-point number with FRAC_BITS fraction bits (value in
// (0.5, 1)). Taking the midpoint bounds the relative error of the seed,
// |1 - m * y0|, by 2**-(ADDR_BITS + 1), so every following Newton-Raphson
// or series iteration doubles the number of correct bits.
//
// Interface: idx in, y0 out; a combinational read-only memory whose
// contents are computed when the design is elaborated. Using a table for
// the first bits only, because its size grows as 2**ADDR_BITS, follows the
// design; the midpoint contents and the output format are this design's
// choice. The default of 10 address bits is one of the table sizes
// evaluated for the design.
module recip_lut #(
  parameter int unsigned ADDR_BITS = 10,
  parameter int unsigned FRAC_BITS = 30
) (
  input  logic [ADDR_BITS-1:0] idx,
  output logic [FRAC_BITS:0]   y0
);

  localparam int unsigned DEPTH = 1 << ADDR_BITS;

  function automatic logic [FRAC_BITS:0] seed(input int unsigned k);
    logic [63:0] num, den, q;
    num = 64'd1 << (FRAC_BITS + ADDR_BITS + 1);
    den = (64'd1 << (ADDR_BITS + 1)) + 64'd2 * 64'(k) + 64'd1;
    q   = (num + (den >> 1)) / den;
    return q[FRAC_BITS:0];
  endfunction

  logic [FRAC_BITS:0] rom [DEPTH];

  for (genvar k = 0; k < DEPTH; k++) begin : g_rom
    assign rom[k] = seed(k);
  end

  assign y0 = rom[idx];

endmodule

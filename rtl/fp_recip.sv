// fp_recip: pipelined floating-point reciprocal, y ~= 1 / a, built only from
// a seed table, multiplications and additions.
//
// The exponent is negated and only the significand m = 1.f in [1, 2) needs
// a reciprocal. A table (recip_lut) indexed by the top LUT_BITS fraction
// bits gives a seed y0 good to about LUT_BITS + 1 bits. ITERATIONS
// refinement steps then follow, in one of two forms selected by METHOD:
//   RECIP_NEWTON  Newton-Raphson: t = 2 - m*y, then y = y*t. The two
//                 multiplies depend on each other (two pipeline stages per
//                 iteration) and an error in one step is corrected by the
//                 next.
//   RECIP_SERIES  series expansion: e = 1 - m*y0 once at the start, then per
//                 stage y = y*(1 + e) and e = e*e, two independent multiplies
//                 in one pipeline stage.
// Each step roughly doubles the correct bits. The fixed-point datapath
// carries FRAC_BITS fraction bits, a few more than the 24-bit result, to
// absorb the truncation of the intermediate products. The result is
// rounded to 24 significant bits. A zero (or denormal) input gives
// infinity and an infinite input gives zero; results below the normal
// range flush to zero.
//
// Interface and timing: a and in_valid are sampled every clock; y and
// out_valid appear LATENCY clocks later (LATENCY = 2 + 2*ITERATIONS for
// Newton-Raphson, 2 + ITERATIONS + 1 for the series form with at least one
// iteration). A new operand may enter every clock.
//
// This is the unrolled form of the reciprocal circuit; the generic cell uses
// it when RECIP_PIPELINED is set, and otherwise uses fp_recip_iter, which
// runs the same steps on a single multiplier.
//
// Following the published design: the seed table followed by multiplicative iterations,
// the two iteration forms and the table sizes. The default of a 10-bit
// table with one iteration is one of the evaluated reciprocal options; the
// choice of it, the midpoint seed, the fixed-point widths and the rounding
// are this design's own.
module fp_recip
  import sgr_pkg::*;
#(
  parameter int unsigned   LUT_BITS   = 10,
  parameter int unsigned   ITERATIONS = 1,
  parameter recip_method_e METHOD     = RECIP_NEWTON,
  parameter int unsigned   FRAC_BITS  = 30
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  output logic  out_valid,
  output fp32_t y
);

  localparam int unsigned FW = FRAC_BITS;
  // Refinement stages between the table register and the output register.
  localparam int unsigned N_REF =
      (METHOD == RECIP_NEWTON) ? 2 * ITERATIONS :
      (ITERATIONS == 0)        ? 0 : ITERATIONS + 1;
  localparam int unsigned LATENCY = N_REF + 2;

  typedef struct packed {
    logic                  v;
    logic                  sign;
    logic [7:0]            ex;      // biased exponent of the input
    logic                  zero;    // input was zero or denormal
    logic                  inf;     // input was infinite or NaN
    logic [23:0]           m;       // significand, 1.23 fixed point
    logic [FW:0]           y;       // current reciprocal estimate, FW fraction bits
    logic signed [FW+1:0]  t;       // Newton: 2 - m*y; series: e
  } stage_t;

  stage_t st [N_REF + 1];

  // ---------------------------------------------------------------- seed
  logic [FW:0] seed;

  recip_lut #(.ADDR_BITS(LUT_BITS), .FRAC_BITS(FW)) u_lut (
    .idx(a[22 -: LUT_BITS]),
    .y0 (seed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].v    <= in_valid;
      st[0].sign <= a[31];
      st[0].ex   <= a[30:23];
      st[0].zero <= a[30:23] == 8'd0;
      st[0].inf  <= a[30:23] == 8'hFF;
      st[0].m    <= {1'b1, a[22:0]};
      st[0].y    <= seed;
      st[0].t    <= '0;
    end
  end

  // m * y with FW fraction bits kept (m has 23 fraction bits).
  function automatic logic [FW+1:0] mul_my(input logic [23:0] m, input logic [FW:0] yy);
    logic [63:0] p;
    p = 64'(m) * 64'(yy);
    return p[23 +: FW + 2];
  endfunction

  // ---------------------------------------------------------- refinement
  for (genvar s = 1; s <= N_REF; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s] <= '0;
      end else begin
        st[s] <= st[s-1];
        if (METHOD == RECIP_NEWTON) begin
          if (s % 2 == 1) begin
            // t = 2 - m*y
            st[s].t <= $signed((FW+2)'(2) << FW) - $signed(mul_my(st[s-1].m, st[s-1].y));
          end else begin
            // y = y * t
            st[s].y <= (FW+1)'((64'(st[s-1].y) * 64'(st[s-1].t)) >> FW);
          end
        end else begin
          if (s == 1) begin
            // e = 1 - m*y0
            st[s].t <= $signed((FW+2)'(1) << FW) - $signed(mul_my(st[s-1].m, st[s-1].y));
          end else begin
            // y = y * (1 + e) and e = e * e, independent of each other
            st[s].y <= (FW+1)'((64'(st[s-1].y) *
                               64'($signed(((FW+2)'(1) << FW)) + st[s-1].t)) >> FW);
            st[s].t <= (FW+2)'((64'(st[s-1].t) * 64'(st[s-1].t)) >>> FW);
          end
        end
      end
    end
  end

  // --------------------------------------------------------------- pack
  stage_t      last;
  logic [24:0] sig;
  logic        rnd;
  logic signed [9:0] ex_out;
  fp32_t       y_next;

  always_comb begin
    last = st[N_REF];
    if (last.y[FW]) begin
      sig    = {1'b0, last.y[FW -: 24]};
      rnd    = last.y[FW-24];
      ex_out = 10'sd254 - $signed({2'b00, last.ex});
    end else if (last.y[FW-1]) begin
      sig    = {1'b0, last.y[FW-1 -: 24]};
      rnd    = last.y[FW-25];
      ex_out = 10'sd253 - $signed({2'b00, last.ex});
    end else begin
      sig    = {1'b0, last.y[FW-2 -: 24]};
      rnd    = last.y[FW-26];
      ex_out = 10'sd252 - $signed({2'b00, last.ex});
    end
    sig = sig + {24'd0, rnd};
    if (sig[24]) begin
      sig    = sig >> 1;
      ex_out = ex_out + 10'sd1;
    end
    if (last.zero)             y_next = {last.sign, FP_INF[30:0]};
    else if (last.inf)         y_next = {last.sign, 31'd0};
    else if (ex_out <= 10'sd0) y_next = {last.sign, 31'd0};
    else                       y_next = {last.sign, ex_out[7:0], sig[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= last.v;
      y         <= y_next;
    end
  end

endmodule

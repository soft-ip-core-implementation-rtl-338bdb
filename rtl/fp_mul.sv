// fp_mul: IEEE-754 single-precision floating-point multiplier.
//
// The 24-bit significands (hidden one restored) are multiplied into a
// 48-bit product, which is normalised by at most one place and rounded to
// nearest, ties to even, using a guard bit and a sticky bit. Denormal
// inputs are read as zero and results that underflow are flushed to zero;
// results that overflow, and any infinite or NaN input, give infinity with
// the product's sign. NaN is never produced.
//
// Interface: clk, a, b in; y = a * b out. With STAGES = 0 (default) the
// unit is purely combinational and the result is valid in the same cycle;
// otherwise y is delayed by STAGES clock registers (no reset, no enable),
// so it shows the product of inputs held stable for STAGES clocks. Either
// way one product can start per clock.
//
// The design uses floating-point multipliers as one of its two building
// blocks; how they are built inside, their rounding and their exception
// handling are this design's own choices.
module fp_mul
  import sgr_pkg::*;
#(
  parameter int unsigned STAGES = 0   // output pipeline registers
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t y_c;   // combinational result

  logic        sign;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    sign  = a[31] ^ b[31];
    ea    = a[30:23];
    eb    = b[30:23];
    prod  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp_s = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (ea == 8'hFF || eb == 8'hFF) begin
      y_c = {sign, FP_INF[30:0]};
    end else if (ea == 8'd0 || eb == 8'd0) begin
      y_c = {sign, 31'd0};
    end else if (exp_s >= 11'sd255) begin
      y_c = {sign, FP_INF[30:0]};
    end else if (exp_s <= 11'sd0) begin
      y_c = {sign, 31'd0};
    end else begin
      y_c = {sign, exp_s[7:0], mant_r[22:0]};
    end
  end

  // Optional output registers; a retiming synthesis run can move them into
  // the logic above.
  if (STAGES == 0) begin : g_comb
    assign y = y_c;
  end else begin : g_pipe
    fp32_t pipe [STAGES];
    always_ff @(posedge clk) begin
      pipe[0] <= y_c;
      for (int k = 1; k < STAGES; k++) pipe[k] <= pipe[k-1];
    end
    assign y = pipe[STAGES-1];
  end

endmodule

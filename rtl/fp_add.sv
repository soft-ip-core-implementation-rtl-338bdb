// fp_add: IEEE-754 single-precision floating-point adder / subtractor.
//
// Computes y = a + b, or y = a - b when sub is high (the sign of b is
// flipped first). The operand of larger magnitude is put first; the other
// significand is shifted right by the exponent difference into a field
// with guard, round and sticky bits. After the add or subtract the sum is
// normalised (one place right, or left by its leading-zero count) and
// rounded to nearest, ties to even. Denormal inputs read as zero, results
// that underflow flush to zero, overflow and infinite inputs give
// infinity, and an exact cancellation gives +0.
//
// Interface: clk, a, b, sub in; y out. With STAGES = 0 (default) the unit
// is purely combinational; otherwise y is delayed by STAGES clock registers
// (no reset, no enable). Either way one sum can start per clock.
//
// The design uses floating-point adders as its second building block; the
// structure, rounding and exception handling here are this design's own.
module fp_add
  import sgr_pkg::*;
#(
  parameter int unsigned STAGES = 0   // output pipeline registers
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  fp32_t y_c;   // combinational result

  fp32_t       bb, op_big, op_sml;
  logic [7:0]  e_big, e_small, diff;
  logic [26:0] m_big, m_small, m_shift;  // 1.23 significand + guard, round, sticky
  logic        lost;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [9:0] exp_s;
  logic [23:0] mant;
  logic        guard, rs, round_up;
  logic [24:0] mant_r;
  logic        big_zero, small_zero;

  always_comb begin
    bb = {b[31] ^ sub, b[30:0]};
    if (a[30:0] >= bb[30:0]) begin
      op_big   = a;
      op_sml = bb;
    end else begin
      op_big   = bb;
      op_sml = a;
    end
    big_zero   = op_big[30:23] == 8'd0;
    small_zero = op_sml[30:23] == 8'd0;
    e_big      = op_big[30:23];
    e_small    = op_sml[30:23];
    diff       = e_big - e_small;
    m_big      = {1'b1, op_big[22:0], 3'b000};
    m_small    = small_zero ? 27'd0 : {1'b1, op_sml[22:0], 3'b000};

    // Align the smaller operand, folding shifted-out bits into the sticky bit.
    lost = 1'b0;
    if (diff >= 8'd27) begin
      m_shift = {26'd0, |m_small};
    end else begin
      m_shift = m_small >> diff;
      lost    = |(m_small & ((27'd1 << diff) - 27'd1));
      m_shift[0] = m_shift[0] | lost;
    end

    if (op_big[31] == op_sml[31]) sum = {1'b0, m_big} + {1'b0, m_shift};
    else                      sum = {1'b0, m_big} - {1'b0, m_shift};

    exp_s = $signed({2'b00, e_big});
    lz    = 5'd0;
    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      sum   = sum << lz;
      exp_s = exp_s - $signed({5'd0, lz});
    end

    mant     = sum[26:3];
    guard    = sum[2];
    rs       = sum[1] | sum[0];
    round_up = guard & (rs | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 10'sd1;
    end

    if (e_big == 8'hFF) begin
      y_c = {op_big[31], FP_INF[30:0]};
    end else if (big_zero) begin
      y_c = FP_ZERO;
    end else if (sum == 28'd0) begin
      y_c = FP_ZERO;
    end else if (exp_s >= 10'sd255) begin
      y_c = {op_big[31], FP_INF[30:0]};
    end else if (exp_s <= 10'sd0) begin
      y_c = {op_big[31], 31'd0};
    end else begin
      y_c = {op_big[31], exp_s[7:0], mant_r[22:0]};
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

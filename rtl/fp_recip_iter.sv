// fp_recip_iter: floating-point reciprocal, y ~= 1 / a, computed on a single
// dedicated fixed-point multiplier that is reused for every step.
//
// It performs the same computation as fp_recip: a seed from recip_lut, the
// top LUT_BITS fraction bits of the significand m selecting it, then
// ITERATIONS refinement steps, and a rounded result with the exponent
// negated. Here the steps run one after another on one multiplier instead
// of in a pipeline of separate multipliers:
//   RECIP_NEWTON  per iteration: t = 2 - m*y (one clock), y = y*t (one clock)
//   RECIP_SERIES  e = 1 - m*y0 (one clock); per stage y = y*(1 + e) (one
//                 clock) and, except after the last stage, e = e*e (one clock)
// Both forms take 2*ITERATIONS multiplier clocks, so the latency is
// LATENCY = 2 + 2*ITERATIONS clocks (table read, multiplies, rounding).
// Zero input gives infinity, infinite input gives zero, and results below
// the normal range flush to zero.
//
// Interface and timing: a is taken when in_valid is high and busy is low;
// y is valid with the one-clock out_valid pulse LATENCY clocks later and is
// held until the next result. busy is high from the clock after in_valid
// up to and including the out_valid clock minus one, so a new operand may
// enter in the clock where out_valid is high. An operand offered while
// busy is an error (assertion).
//
// Following the published design: a generic cell uses "a dedicated
// multiplier and LUT" for its reciprocal, and a reciprocal unit built on one
// multiplication; the seed-plus-iteration algorithm is the one of fp_recip.
// Using a fixed-point multiplier, the sequencing and the widths are this
// design's own choices.
module fp_recip_iter
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
  output logic  busy,
  output logic  out_valid,
  output fp32_t y
);

  localparam int unsigned FW     = FRAC_BITS;
  localparam int unsigned N_MUL  = 2 * ITERATIONS;           // multiplier clocks
  localparam int unsigned CW     = $clog2(N_MUL + 3);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_PACK} state_e;

  state_e               state;
  logic [CW-1:0]        k;          // multiplier step number
  logic                 sign_q, zero_q, inf_q;
  logic [7:0]           ex_q;
  logic [23:0]          m_q;
  logic [FW:0]          y_q;        // estimate, FW fraction bits
  logic signed [FW+1:0] t_q;        // Newton: 2 - m*y; series: e

  // ---------------------------------------------------------------- seed
  logic [FW:0] seed;

  recip_lut #(.ADDR_BITS(LUT_BITS), .FRAC_BITS(FW)) u_lut (
    .idx(a[22 -: LUT_BITS]),
    .y0 (seed)
  );

  // ------------------------------------------------- the one multiplier
  logic [63:0] op_x, op_y, prod;
  logic        first;               // step k == 0
  logic        odd;                 // second multiply of a pair

  assign first = (k == '0);
  assign odd   = k[0];

  always_comb begin
    op_x = 64'd0;
    op_y = 64'd0;
    if (METHOD == RECIP_NEWTON) begin
      if (!odd) begin op_x = 64'(m_q); op_y = 64'(y_q); end           // m*y
      else      begin op_x = 64'(y_q); op_y = 64'(t_q); end           // y*t
    end else begin
      if (first)     begin op_x = 64'(m_q); op_y = 64'(y_q); end      // m*y0
      else if (odd)  begin op_x = 64'(y_q);                           // y*(1+e)
                           op_y = 64'($signed(((FW+2)'(1) << FW)) + t_q); end
      else           begin op_x = 64'(t_q); op_y = 64'(t_q); end      // e*e
    end
    prod = op_x * op_y;
  end

  // ---------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k      <= '0;
      {sign_q, zero_q, inf_q} <= '0;
      ex_q   <= '0;
      m_q    <= '0;
      y_q    <= '0;
      t_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          sign_q <= a[31];
          ex_q   <= a[30:23];
          zero_q <= a[30:23] == 8'd0;
          inf_q  <= a[30:23] == 8'hFF;
          m_q    <= {1'b1, a[22:0]};
          y_q    <= seed;
          k      <= '0;
          state  <= (N_MUL == 0) ? S_PACK : S_MUL;
        end
        S_MUL: begin
          if (METHOD == RECIP_NEWTON) begin
            if (!odd) t_q <= $signed((FW+2)'(2) << FW) - $signed((FW+2)'(prod >> 23));
            else      y_q <= (FW+1)'(prod >> FW);
          end else begin
            if (first)    t_q <= $signed((FW+2)'(1) << FW) - $signed((FW+2)'(prod >> 23));
            else if (odd) y_q <= (FW+1)'(prod >> FW);
            else          t_q <= (FW+2)'($signed(prod) >>> FW);
          end
          if (k == CW'(N_MUL - 1)) state <= S_PACK;
          k <= k + CW'(1);
        end
        S_PACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // --------------------------------------------------------------- pack
  logic [24:0] sig;
  logic        rnd;
  logic signed [9:0] ex_out;
  fp32_t       y_next;

  always_comb begin
    if (y_q[FW]) begin
      sig    = {1'b0, y_q[FW -: 24]};
      rnd    = y_q[FW-24];
      ex_out = 10'sd254 - $signed({2'b00, ex_q});
    end else if (y_q[FW-1]) begin
      sig    = {1'b0, y_q[FW-1 -: 24]};
      rnd    = y_q[FW-25];
      ex_out = 10'sd253 - $signed({2'b00, ex_q});
    end else begin
      sig    = {1'b0, y_q[FW-2 -: 24]};
      rnd    = y_q[FW-26];
      ex_out = 10'sd252 - $signed({2'b00, ex_q});
    end
    sig = sig + {24'd0, rnd};
    if (sig[24]) begin
      sig    = sig >> 1;
      ex_out = ex_out + 10'sd1;
    end
    if (zero_q)                y_next = {sign_q, FP_INF[30:0]};
    else if (inf_q)            y_next = {sign_q, 31'd0};
    else if (ex_out <= 10'sd0) y_next = {sign_q, 31'd0};
    else                       y_next = {sign_q, ex_out[7:0], sig[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= (state == S_PACK);
      if (state == S_PACK) y <= y_next;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("fp_recip_iter: in_valid while busy");

endmodule

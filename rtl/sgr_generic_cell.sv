// sgr_generic_cell: one generic cell of a complex squared-Givens-rotation
// (SGR) QR-RLS array. The same hardware performs either the boundary-cell
// or the internal-cell update, chosen by the mode input, by running a fixed
// schedule over two floating-point multipliers, two floating-point adders
// and a reciprocal unit (seed table plus multiplier iterations; by default
// on one dedicated multiplier, fp_recip_iter, or the pipelined fp_recip when
// RECIP_PIPELINED is set).
//
// Boundary cell (mode = MODE_BC), state d (real, kept in r.re):
//     d'        = beta2 * d + delta_in * |x|^2
//     a_out     = x
//     b_out     = delta_in * conj(x) / d'
//     delta_out = delta_in * beta2 * d / d'
// If d' is zero (no energy seen yet) the rotation is the identity:
// b_out = 0, delta_out = delta_in, and the event output dzero is raised.
// Internal cell (mode = MODE_IC), state r (complex):
//     x_out = x_in - a_in * r
//     r'    = r + b_in * x_out
//     a_out = a_in, b_out = b_in, delta_out = delta_in (passed on)
// The only division, 1/d', is done by the reciprocal unit, so the cell is
// made of multiplications and additions alone.
//
// Schedule (one row per step; M = multiplier, A = adder):
//   BC  0: M x.re^2, x.im^2          IC  0: M a.re*r.re, a.im*r.im
//       1: A |x|^2; M beta2*d            1: A Re(a*r); M a.re*r.im, a.im*r.re
//       2: M delta*|x|^2, delta*beta2*d  2: A Im(a*r), x_out.re
//       3: A d'                          3: A x_out.im; M b.re*xo.re, b.im*xo.re
//       4: reciprocal of d' starts       4: M b.im*xo.im, b.re*xo.im
//   4+RS: M delta/d', delta_out          5: A Re(b*xo), Im(b*xo)
//   5+RS: M b.re, b.im                   6: A r' (both parts)
// A step lasts FP_STAGES + 1 clocks: the unit inputs stay steady through the
// step and the results are written back in its last clock (FP_STAGES = 0,
// the default, gives one clock per step with combinational units). RS is
// the reciprocal latency LR (4 clocks by default) rounded up to whole steps;
// the reciprocal result is held in a register once it appears. Both
// schedules are padded to the longer one, STEPS steps, so every cell of an
// array has the same timing.
//
// Interface and timing: inputs are sampled in the clock where in_valid is
// high and busy is low. Outputs are registers; out_valid pulses for one
// clock LATENCY = STEPS * (FP_STAGES + 1) + 1 clocks after in_valid (11 by
// default), and the outputs hold their values through that clock. A new
// operation may start in the clock where out_valid is high, so one cell
// update takes LATENCY clocks.
//
// Following the published design: the SGR cell equations in complex arithmetic broken into
// real multiplies and adds, the generic cell covering both cell types, a
// schedule on two multipliers and two adders, and a dedicated multiplier
// and table for the reciprocal. The exact step order, the identity rotation
// for d' = 0, the zero reset of the state, the handshake and the way
// pipelining stretches the steps are this design's own choices.
module sgr_generic_cell
  import sgr_pkg::*;
#(
  parameter int unsigned   LUT_BITS     = 10,
  parameter int unsigned   RECIP_ITERS  = 1,
  parameter recip_method_e RECIP_METHOD = RECIP_NEWTON,
  parameter bit            RECIP_PIPELINED = 1'b0,
  parameter int unsigned   FP_STAGES    = 0      // pipeline registers per FP unit
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cell_mode_e mode,
  input  fp32_t      beta2,      // forgetting factor squared
  input  logic       in_valid,
  input  cplx_t      x_in,       // data from the cell above
  input  cplx_t      a_in,       // rotation from the left (IC only)
  input  cplx_t      b_in,
  input  fp32_t      delta_in,   // likelihood factor (BC only)
  output logic       busy,
  output logic       out_valid,
  output cplx_t      x_out,      // to the cell below (IC only)
  output cplx_t      a_out,      // rotation to the right
  output cplx_t      b_out,
  output fp32_t      delta_out,  // to the next boundary cell (BC only)
  output cplx_t      state,      // r (IC) or d in state.re (BC)
  output logic       dzero       // with out_valid: BC saw d' = 0
);

  localparam int unsigned LR = recip_latency(RECIP_ITERS, RECIP_METHOD, RECIP_PIPELINED);
  localparam int unsigned SL = FP_STAGES + 1;             // clocks per step
  localparam int unsigned RS = (LR + SL - 1) / SL;         // steps spent waiting for 1/d'
  localparam int unsigned BC_STEPS = 6 + RS;
  localparam int unsigned IC_STEPS = 7;
  localparam int unsigned STEPS    = (BC_STEPS > IC_STEPS) ? BC_STEPS : IC_STEPS;
  localparam int unsigned LATENCY  = STEPS * SL + 1;
  localparam int unsigned SW       = $clog2(STEPS + 1);
  localparam int unsigned PW       = (SL > 1) ? $clog2(SL) : 1;

  localparam logic [SW-1:0] S_RCP = SW'(4);
  localparam logic [SW-1:0] S_DIV = SW'(4 + RS);
  localparam logic [SW-1:0] S_BO  = SW'(5 + RS);
  localparam logic [SW-1:0] S_END = SW'(STEPS - 1);
  localparam logic [PW-1:0] P_END = PW'(SL - 1);

  // ------------------------------------------------------------ registers
  cell_mode_e    mode_q;
  logic [SW-1:0] step;
  logic [PW-1:0] phase;                // clock within the step
  logic          step_end;             // last clock of the step: write back
  fp32_t xr, xi, ar, ai, br, bi, dl;   // operands latched at the start
  fp32_t t1, t2, t3, t4;               // temporaries
  fp32_t rr, ri;                       // cell state
  fp32_t xor_q, xoi_q;                 // IC: x_out
  fp32_t bro_q, bio_q, dout_q, dn_q;   // BC: b_out, delta_out, d'
  logic  dzero_q;

  // ------------------------------------------------------------ datapath
  fp32_t m1a, m1b, m2a, m2b, m1y, m2y;
  fp32_t a1a, a1b, a2a, a2b, a1y, a2y;
  logic  a1s, a2s;
  logic  rcp_in_valid, rcp_out_valid;
  fp32_t rcp_y, rcp_q, rcp_val;
  logic  rcp_have;                     // a result of the current start is held

  assign step_end = (phase == P_END);
  assign rcp_val  = rcp_out_valid ? rcp_y : rcp_q;

  fp_mul #(.STAGES(FP_STAGES)) u_m1  (.clk(clk), .a(m1a), .b(m1b), .y(m1y));
  fp_mul #(.STAGES(FP_STAGES)) u_m2  (.clk(clk), .a(m2a), .b(m2b), .y(m2y));
  fp_add #(.STAGES(FP_STAGES)) u_a1  (.clk(clk), .a(a1a), .b(a1b), .sub(a1s), .y(a1y));
  fp_add #(.STAGES(FP_STAGES)) u_a2  (.clk(clk), .a(a2a), .b(a2b), .sub(a2s), .y(a2y));

  // The reciprocal: by default on its own single multiplier (fp_recip_iter);
  // optionally the fully pipelined circuit (fp_recip).
  if (RECIP_PIPELINED) begin : g_rcp_pipe
    fp_recip #(
      .LUT_BITS(LUT_BITS), .ITERATIONS(RECIP_ITERS), .METHOD(RECIP_METHOD)
    ) u_rcp (
      .clk(clk), .rst_n(rst_n), .in_valid(rcp_in_valid), .a(dn_q),
      .out_valid(rcp_out_valid), .y(rcp_y)
    );
  end else begin : g_rcp_iter
    logic rcp_busy;
    fp_recip_iter #(
      .LUT_BITS(LUT_BITS), .ITERATIONS(RECIP_ITERS), .METHOD(RECIP_METHOD)
    ) u_rcp (
      .clk(clk), .rst_n(rst_n), .in_valid(rcp_in_valid), .a(dn_q),
      .busy(rcp_busy), .out_valid(rcp_out_valid), .y(rcp_y)
    );
  end

  // Operand selection for the step being executed.
  always_comb begin
    m1a = FP_ZERO; m1b = FP_ZERO; m2a = FP_ZERO; m2b = FP_ZERO;
    a1a = FP_ZERO; a1b = FP_ZERO; a2a = FP_ZERO; a2b = FP_ZERO;
    a1s = 1'b0;    a2s = 1'b0;
    rcp_in_valid = 1'b0;
    if (busy) begin
      if (mode_q == MODE_BC) begin
        unique case (step)
          SW'(0): begin m1a = xr; m1b = xr; m2a = xi; m2b = xi; end
          SW'(1): begin a1a = t1; a1b = t2; m1a = beta2; m1b = rr; end
          SW'(2): begin m1a = dl; m1b = t3; m2a = dl; m2b = t4; end
          SW'(3): begin a1a = t4; a1b = t1; end
          S_RCP:  rcp_in_valid = (phase == '0);
          S_DIV:  begin m1a = dl; m1b = rcp_val; m2a = t2; m2b = rcp_val; end
          S_BO:   begin m1a = t1; m1b = xr; m2a = t1; m2b = xi; end
          default: ;
        endcase
      end else begin
        unique case (step)
          SW'(0): begin m1a = ar; m1b = rr; m2a = ai; m2b = ri; end
          SW'(1): begin a1a = t1; a1b = t2; a1s = 1'b1;
                        m1a = ar; m1b = ri; m2a = ai; m2b = rr; end
          SW'(2): begin a1a = t1; a1b = t2; a2a = xr; a2b = t3; a2s = 1'b1; end
          SW'(3): begin a1a = xi; a1b = t4; a1s = 1'b1;
                        m1a = br; m1b = xor_q; m2a = bi; m2b = xor_q; end
          SW'(4): begin m1a = bi; m1b = xoi_q; m2a = br; m2b = xoi_q; end
          SW'(5): begin a1a = t1; a1b = t3; a1s = 1'b1; a2a = t2; a2b = t4; end
          SW'(6): begin a1a = rr; a1b = t1; a2a = ri; a2b = t2; end
          default: ;
        endcase
      end
    end
  end

  // Sequencing and result write-back.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_IC;
      step   <= '0;
      phase  <= '0;
      busy   <= 1'b0;
      out_valid <= 1'b0;
      {xr, xi, ar, ai, br, bi, dl} <= '0;
      {t1, t2, t3, t4}             <= '0;
      {rr, ri}                     <= '0;
      {xor_q, xoi_q}               <= '0;
      {bro_q, bio_q, dout_q, dn_q} <= '0;
      dzero_q <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          mode_q <= mode;
          xr <= x_in.re;  xi <= x_in.im;
          ar <= a_in.re;  ai <= a_in.im;
          br <= b_in.re;  bi <= b_in.im;
          dl <= delta_in;
          step  <= '0;
          phase <= '0;
          busy  <= 1'b1;
        end
      end else if (!step_end) begin
        phase <= phase + PW'(1);
      end else begin
        phase <= '0;
        if (mode_q == MODE_BC) begin
          unique case (step)
            SW'(0): begin t1 <= m1y; t2 <= m2y; end
            SW'(1): begin t3 <= a1y; t4 <= m1y; end
            SW'(2): begin t1 <= m1y; t2 <= m2y; end
            SW'(3): dn_q <= a1y;
            S_DIV:  begin t1 <= m1y; dout_q <= m2y; end
            S_BO: begin
              rr <= dn_q;
              ri <= FP_ZERO;
              if (fp_is_zero(dn_q)) begin
                bro_q <= FP_ZERO; bio_q <= FP_ZERO; dout_q <= dl; dzero_q <= 1'b1;
              end else begin
                bro_q <= m1y; bio_q <= fp_neg(m2y); dzero_q <= 1'b0;
              end
            end
            default: ;
          endcase
        end else begin
          unique case (step)
            SW'(0): begin t1 <= m1y; t2 <= m2y; end
            SW'(1): begin t3 <= a1y; t1 <= m1y; t2 <= m2y; end
            SW'(2): begin t4 <= a1y; xor_q <= a2y; end
            SW'(3): begin xoi_q <= a1y; t1 <= m1y; t2 <= m2y; end
            SW'(4): begin t3 <= m1y; t4 <= m2y; end
            SW'(5): begin t1 <= a1y; t2 <= a2y; end
            SW'(6): begin rr <= a1y; ri <= a2y; dzero_q <= 1'b0; end
            default: ;
          endcase
        end
        if (step == S_END) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          step <= step + SW'(1);
        end
      end
    end
  end

  // Hold the reciprocal so that it stays stable for a whole step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcp_q    <= '0;
      rcp_have <= 1'b0;
    end else if (rcp_out_valid) begin
      rcp_q    <= rcp_y;
      rcp_have <= 1'b1;
    end else if (rcp_in_valid) begin
      rcp_have <= 1'b0;
    end
  end

  // ------------------------------------------------------------- outputs
  always_comb begin
    if (mode_q == MODE_BC) begin
      x_out     = '0;
      a_out     = '{re: xr, im: xi};
      b_out     = '{re: bro_q, im: bio_q};
      delta_out = dout_q;
      state     = '{re: rr, im: ri};
    end else begin
      x_out     = '{re: xor_q, im: xoi_q};
      a_out     = '{re: ar, im: ai};
      b_out     = '{re: br, im: bi};
      delta_out = dl;
      state     = '{re: rr, im: ri};
    end
  end
  assign dzero = dzero_q;

  // A new operation must not arrive while the schedule is running.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("sgr_generic_cell: in_valid while busy");

  // The reciprocal must be ready exactly when the schedule reads it.
  a_rcp_on_time: assert property (@(posedge clk) disable iff (!rst_n)
      (busy && mode_q == MODE_BC && step == S_DIV) |-> (rcp_out_valid || rcp_have))
    else $error("sgr_generic_cell: reciprocal result not ready");

endmodule

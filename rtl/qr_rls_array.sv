// qr_rls_array: complex QR-decomposition recursive-least-squares (RLS)
// filter on a triangular systolic array of generic SGR cells.
//
// The array solves, sample by sample, the exponentially weighted least
// squares problem  min_w sum_k beta2^(n-k) |y_k - sum_j w_j x_k,j|^2  for
// N_INPUTS complex inputs. Row i (0 .. N_INPUTS-1) holds one boundary cell (BC) at
// column i and internal cells (IC) at columns i+1 .. N_INPUTS; the last
// column carries the desired signal y. Each BC turns the element it
// receives into rotation parameters (a, b) that travel right along its row,
// and a likelihood factor delta that goes down the diagonal to the next BC.
// The ICs rotate the data they receive and pass the result down. The value
// leaving the bottom of the last column is the a-priori error alpha; the
// final delta is the conversion factor gamma, and the output multiplier
// forms the a-posteriori error e = gamma * alpha. All cells are the same
// generic cell (sgr_generic_cell) with its mode fixed by its position.
//
// Timing: every cell takes L = sgr_generic_cell LATENCY clocks (11 with the
// default parameters, from sgr_pkg::cell_latency). Cell (i, j)
// starts sample k at t_k + (i + j) * L, so an input sample is skewed by
// delaying column j by j * L clocks, and each delta is held for one cell
// period between consecutive boundary cells. A sample is accepted when
// in_valid and in_ready are both high; in_ready then stays low for L - 1
// clocks, so the array takes one sample every L clocks and every cell is
// busy all the time at that rate. alpha, gamma and e appear with out_valid
// 2 * N_INPUTS * L + 1 clocks after the sample was accepted.
//
// Following the published design: the triangular SGR array with BCs on the diagonal and
// ICs elsewhere, the complex data, the generic cell, and array size and
// cell pipelining (FP_STAGES) as the core's parameters. The number of
// inputs, the residual output cell, the input skew buffers, the rate
// control and delta_in = 1 at the top are this design's own choices.
module qr_rls_array
  import sgr_pkg::*;
#(
  parameter int unsigned   N_INPUTS     = 3,
  parameter int unsigned   LUT_BITS     = 10,
  parameter int unsigned   RECIP_ITERS  = 1,
  parameter recip_method_e RECIP_METHOD = RECIP_NEWTON,
  parameter bit            RECIP_PIPELINED = 1'b0,
  parameter int unsigned   FP_STAGES    = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t beta2,                 // forgetting factor squared, e.g. 0.99
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t x_in [N_INPUTS],       // input vector (one sample)
  input  cplx_t y_in,                  // desired signal
  output logic  out_valid,
  output cplx_t alpha,                 // a-priori error
  output fp32_t gamma,                 // conversion factor
  output cplx_t e_out                  // a-posteriori error
);

  localparam int unsigned N  = N_INPUTS;
  localparam int unsigned NC = N_INPUTS + 1;   // columns incl. desired signal
  localparam int unsigned L  = cell_latency(RECIP_ITERS, RECIP_METHOD, RECIP_PIPELINED, FP_STAGES);
  localparam int unsigned CW    = $clog2(L + 1);

  // -------------------------------------------------------- rate control
  logic [CW-1:0] hold;
  logic          accept;

  assign in_ready = (hold == '0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            hold <= '0;
    else if (accept)       hold <= CW'(L - 1);
    else if (hold != '0)   hold <= hold - CW'(1);
  end

  // ---------------------------------------------------------- input skew
  cplx_t top_x [NC];
  logic  top_v [NC];

  for (genvar j = 0; j < NC; j++) begin : g_skew
    cplx_t col_in;
    assign col_in = (j == N) ? y_in : x_in[(j == N) ? 0 : j];
    if (j == 0) begin : g_direct
      assign top_x[j] = col_in;
      assign top_v[j] = accept;
    end else begin : g_delay
      localparam int unsigned D = j * L;
      cplx_t dx [D];
      logic  dv [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) begin
            dx[k] <= '0;
            dv[k] <= 1'b0;
          end
        end else begin
          dx[0] <= col_in;
          dv[0] <= accept;
          for (int k = 1; k < D; k++) begin
            dx[k] <= dx[k-1];
            dv[k] <= dv[k-1];
          end
        end
      end
      assign top_x[j] = dx[D-1];
      assign top_v[j] = dv[D-1];
    end
  end

  // --------------------------------------------------------------- cells
  cplx_t xo  [N][NC];
  cplx_t ao  [N][NC];
  cplx_t bo  [N][NC];
  logic  ov  [N][NC];
  fp32_t dhold [N];       // delta of each BC, held for one cell period

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = i; j < NC; j++) begin : g_col
      cplx_t x_src, a_src, b_src;
      fp32_t d_src;
      logic  v_src;
      fp32_t d_out;
      cplx_t st_unused;
      logic  busy_unused, dz_unused;

      assign x_src = (i == 0) ? top_x[j] : xo[(i == 0) ? 0 : i-1][j];
      assign v_src = (i == 0) ? top_v[j] : ov[(i == 0) ? 0 : i-1][j];
      assign a_src = (j == i) ? '0 : ao[i][(j == i) ? 0 : j-1];
      assign b_src = (j == i) ? '0 : bo[i][(j == i) ? 0 : j-1];
      assign d_src = (i == 0) ? FP_ONE : dhold[(i == 0) ? 0 : i-1];

      sgr_generic_cell #(
        .LUT_BITS(LUT_BITS), .RECIP_ITERS(RECIP_ITERS), .RECIP_METHOD(RECIP_METHOD),
        .RECIP_PIPELINED(RECIP_PIPELINED), .FP_STAGES(FP_STAGES)
      ) u_cell (
        .clk(clk), .rst_n(rst_n),
        .mode((j == i) ? MODE_BC : MODE_IC),
        .beta2(beta2),
        .in_valid(v_src),
        .x_in(x_src), .a_in(a_src), .b_in(b_src), .delta_in(d_src),
        .busy(busy_unused),
        .out_valid(ov[i][j]),
        .x_out(xo[i][j]), .a_out(ao[i][j]), .b_out(bo[i][j]),
        .delta_out(d_out),
        .state(st_unused),
        .dzero(dz_unused)
      );

      if (j == i) begin : g_dhold
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)         dhold[i] <= FP_ZERO;
          else if (ov[i][j])  dhold[i] <= d_out;
        end
      end
    end
    // Entries left of the diagonal do not exist; tie them off.
    for (genvar j = 0; j < i; j++) begin : g_none
      assign xo[i][j] = '0;
      assign ao[i][j] = '0;
      assign bo[i][j] = '0;
      assign ov[i][j] = 1'b0;
    end
  end

  // --------------------------------------------------------- output cell
  fp32_t e_re, e_im;
  cplx_t alpha_w;

  assign alpha_w = xo[N-1][N];

  fp_mul u_ore (.clk(clk), .a(dhold[N-1]), .b(alpha_w.re), .y(e_re));
  fp_mul u_oim (.clk(clk), .a(dhold[N-1]), .b(alpha_w.im), .y(e_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      alpha     <= '0;
      gamma     <= FP_ZERO;
      e_out     <= '0;
    end else begin
      out_valid <= ov[N-1][N];
      if (ov[N-1][N]) begin
        alpha <= alpha_w;
        gamma <= dhold[N-1];
        e_out <= '{re: e_re, im: e_im};
      end
    end
  end

endmodule

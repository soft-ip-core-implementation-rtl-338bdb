// tb_qr_rls_array: end-to-end test of the QR-RLS array at its default size
// (3 complex inputs plus the desired signal, 9 generic cells).
//
// The desired signal is an exact linear combination y = sum_j w_j x_j of
// random complex inputs, so a least-squares filter must drive its error to
// zero. The testbench:
//   * runs its own double-precision model of the SGR array on the same
//     samples and compares alpha, gamma and e from the hardware with it;
//   * checks independently that the a-posteriori error e falls below 1e-3
//     once the array has seen enough samples to determine w;
//   * changes w half way through and checks that, with forgetting factor
//     beta2 = 0.9, the error first jumps and then falls back below 2e-2
//     (the filter tracks the new weights);
//   * offers samples on random clocks, so the rate control has to hold
//     some back (in_ready low), and checks that each result comes out
//     2*N*L + 1 = 67 clocks after its sample was accepted;
//   * starts with an all-zero sample, for which every boundary cell sees
//     d' = 0 and must apply the identity rotation.
// Each of these events is counted, and one that never happens counts as a
// failure.
module tb_qr_rls_array;
  import tb_fp_pkg::*;
  import sgr_pkg::*;

  localparam int N       = 3;
  localparam int L       = 11;
  localparam int OUT_LAT = 2 * N * L + 1;
  localparam int NSAMP   = 240;
  localparam int SWITCH  = 120;

  logic clk = 0, rst_n = 0;
  fp32_t beta2;
  logic  in_valid, in_ready, out_valid;
  cplx_t x_in [N];
  cplx_t y_in, alpha, e_out;
  fp32_t gamma;
  int checks = 0, failures = 0;

  qr_rls_array dut (
    .clk(clk), .rst_n(rst_n), .beta2(beta2), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .y_in(y_in), .out_valid(out_valid), .alpha(alpha), .gamma(gamma),
    .e_out(e_out)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------ model
  real md [N];
  real mrr [N][N+1];
  real mri [N][N+1];
  real ex_ar [NSAMP], ex_ai [NSAMP], ex_g [NSAMP], ex_er [NSAMP], ex_ei [NSAMP];

  task automatic model_step(input int k, input real vr_in [N+1], input real vi_in [N+1],
                            input real b2);
    real vr [N+1], vi [N+1];
    real dl, dn, dnext, ar, ai, br, bi, xor_, xoi;
    vr = vr_in; vi = vi_in;
    dl = 1.0;
    for (int i = 0; i < N; i++) begin
      ar = vr[i]; ai = vi[i];
      dn = b2 * md[i] + dl * (ar * ar + ai * ai);
      if (dn == 0.0) begin
        br = 0.0; bi = 0.0; dnext = dl;
      end else begin
        br = dl * ar / dn; bi = -dl * ai / dn; dnext = dl * b2 * md[i] / dn;
      end
      md[i] = dn;
      for (int j = i + 1; j <= N; j++) begin
        xor_ = vr[j] - (ar * mrr[i][j] - ai * mri[i][j]);
        xoi  = vi[j] - (ar * mri[i][j] + ai * mrr[i][j]);
        mrr[i][j] = mrr[i][j] + (br * xor_ - bi * xoi);
        mri[i][j] = mri[i][j] + (br * xoi + bi * xor_);
        vr[j] = xor_; vi[j] = xoi;
      end
      dl = dnext;
    end
    ex_ar[k] = vr[N]; ex_ai[k] = vi[N]; ex_g[k] = dl;
    ex_er[k] = dl * vr[N]; ex_ei[k] = dl * vi[N];
  endtask

  // --------------------------------------------------- event counters
  int n_bc = 0, n_ic = 0, n_dzero = 0, n_stall = 0, n_out = 0;
  int n_converged = 0, n_jump = 0, n_retrack = 0;
  int cyc = 0;
  int acc_cyc [NSAMP];
  int n_acc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.g_row[0].g_col[0].u_cell.out_valid) n_bc++;
      if (dut.g_row[0].g_col[1].u_cell.out_valid) n_ic++;
      if (dut.g_row[0].g_col[0].u_cell.out_valid && dut.g_row[0].g_col[0].u_cell.dzero)
        n_dzero++;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        acc_cyc[n_acc] <= cyc;
        n_acc <= n_acc + 1;
      end
    end
  end

  task automatic chk(input real got, input real want, input string what, input int k);
    checks++;
    if (abs_r(got - want) > 1e-3 * (1.0 + abs_r(want))) begin
      failures++;
      if (failures < 20) $display("FAIL sample %0d %s: got %e expected %e", k, what, got, want);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real emag;
      int k;
      k = n_out;
      n_out <= n_out + 1;
      checks++;
      if (cyc - acc_cyc[k] != OUT_LAT) begin
        failures++;
        $display("FAIL latency sample %0d: %0d clocks, expected %0d", k, cyc - acc_cyc[k], OUT_LAT);
      end
      chk(fp2real(alpha.re), ex_ar[k], "alpha.re", k);
      chk(fp2real(alpha.im), ex_ai[k], "alpha.im", k);
      chk(fp2real(gamma),    ex_g[k],  "gamma", k);
      chk(fp2real(e_out.re), ex_er[k], "e.re", k);
      chk(fp2real(e_out.im), ex_ei[k], "e.im", k);
      emag = abs_r(fp2real(e_out.re)) + abs_r(fp2real(e_out.im));
      // Least-squares behaviour, independent of the model.
      if (k >= 2 * N + 4 && k < SWITCH) begin
        checks++;
        if (emag > 1e-3) begin
          failures++;
          $display("FAIL sample %0d: |e| = %e after convergence", k, emag);
        end else n_converged++;
      end
      if (k == SWITCH && abs_r(fp2real(alpha.re)) + abs_r(fp2real(alpha.im)) > 0.1) n_jump++;
      if (k >= NSAMP - 20) begin
        checks++;
        if (emag > 2e-2) begin
          failures++;
          $display("FAIL sample %0d: |e| = %e, new weights not tracked", k, emag);
        end else n_retrack++;
      end
    end
  end

  initial begin
    repeat (NSAMP * L * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wr [N], wi [N];
    real vr [N+1], vi [N+1];
    real b2;
    b2 = 0.9;
    beta2 = real2fp(b2);
    in_valid = 0;
    for (int j = 0; j < N; j++) x_in[j] = '0;
    y_in = '0;
    for (int i = 0; i < N; i++) begin
      md[i] = 0.0;
      for (int j = 0; j <= N; j++) begin mrr[i][j] = 0.0; mri[i][j] = 0.0; end
    end
    for (int j = 0; j < N; j++) begin
      wr[j] = real'(int'($urandom % 2001) - 1000) / 1000.0;
      wi[j] = real'(int'($urandom % 2001) - 1000) / 1000.0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NSAMP; k++) begin
      if (k == SWITCH) begin
        for (int j = 0; j < N; j++) begin
          wr[j] = -wr[j] + 0.5;
          wi[j] = wi[j] * 0.5 - 0.25;
        end
      end
      vr[N] = 0.0; vi[N] = 0.0;
      for (int j = 0; j < N; j++) begin
        if (k == 0) begin
          x_in[j] = '0;
        end else begin
          x_in[j] = '{re: real2fp(real'(int'($urandom % 2001) - 1000) / 1000.0),
                      im: real2fp(real'(int'($urandom % 2001) - 1000) / 1000.0)};
        end
        vr[j] = fp2real(x_in[j].re);
        vi[j] = fp2real(x_in[j].im);
        vr[N] += wr[j] * vr[j] - wi[j] * vi[j];
        vi[N] += wr[j] * vi[j] + wi[j] * vr[j];
      end
      y_in = '{re: real2fp(vr[N]), im: real2fp(vi[N])};
      vr[N] = fp2real(y_in.re);
      vi[N] = fp2real(y_in.im);
      model_step(k, vr, vi, b2);
      // Offer the sample, sometimes after a gap, and hold it until taken.
      @(negedge clk);
      repeat ($urandom % 3) @(negedge clk);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (n_out < NSAMP) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("events: bc_ops=%0d ic_ops=%0d identity_rotations=%0d stall_cycles=%0d",
             n_bc, n_ic, n_dzero, n_stall);
    $display("events: converged=%0d error_jump=%0d retracked=%0d outputs=%0d",
             n_converged, n_jump, n_retrack, n_out);
    checks++;
    if (n_bc == 0 || n_ic == 0 || n_dzero == 0 || n_stall == 0 ||
        n_converged == 0 || n_jump == 0 || n_retrack == 0 || n_out != NSAMP) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

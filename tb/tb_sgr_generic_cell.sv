// tb_sgr_generic_cell: self-checking test of the generic SGR cell in both
// modes. A random mix of boundary-cell and internal-cell operations is
// issued back to back (the next one enters in the clock where the previous
// result appears). Before each operation the testbench reads the cell
// state, works out the expected outputs and new state in double precision
// from the SGR equations, and compares them with a tolerance of 1e-5. The
// first operation is a boundary update with d = 0 and x = 0, which must
// give the identity rotation. The clock count from in_valid to out_valid
// must be the cell latency, 11 clocks with the default reciprocal. A
// second cell, built with the pipelined reciprocal, runs on the same inputs
// and must give identical outputs.
module tb_sgr_generic_cell;
  import tb_fp_pkg::*;
  import sgr_pkg::*;

  localparam int LATENCY = 11;
  localparam real TOL = 1e-5;

  logic clk = 0, rst_n = 0;
  cell_mode_e mode;
  fp32_t beta2, delta_in, delta_out;
  logic  in_valid, busy, out_valid, dzero;
  cplx_t x_in, a_in, b_in, x_out, a_out, b_out, state;
  int checks = 0, failures = 0;
  int n_bc = 0, n_ic = 0, n_dzero = 0;

  sgr_generic_cell dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .beta2(beta2), .in_valid(in_valid),
    .x_in(x_in), .a_in(a_in), .b_in(b_in), .delta_in(delta_in),
    .busy(busy), .out_valid(out_valid), .x_out(x_out), .a_out(a_out),
    .b_out(b_out), .delta_out(delta_out), .state(state), .dzero(dzero)
  );

  // Second cell with the pipelined reciprocal on the same inputs: it
  // computes the same fixed-point steps, so its outputs must be identical.
  fp32_t p_delta_out;
  logic  p_busy, p_out_valid, p_dzero;
  cplx_t p_x_out, p_a_out, p_b_out, p_state;

  sgr_generic_cell #(.RECIP_PIPELINED(1'b1)) dut_pipe (
    .clk(clk), .rst_n(rst_n), .mode(mode), .beta2(beta2), .in_valid(in_valid),
    .x_in(x_in), .a_in(a_in), .b_in(b_in), .delta_in(delta_in),
    .busy(p_busy), .out_valid(p_out_valid), .x_out(p_x_out), .a_out(p_a_out),
    .b_out(p_b_out), .delta_out(p_delta_out), .state(p_state), .dzero(p_dzero)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && (out_valid || p_out_valid)) begin
      checks++;
      if (p_out_valid !== out_valid || p_x_out !== x_out || p_a_out !== a_out ||
          p_b_out !== b_out || p_delta_out !== delta_out || p_state !== state ||
          p_dzero !== dzero) begin
        failures++;
        $display("FAIL pipelined-reciprocal cell differs");
      end
    end
  end

  task automatic chk(input real got, input real want, input string what);
    checks++;
    if (abs_r(got - want) > TOL * (1.0 + abs_r(want))) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %e expected %e", what, got, want);
    end
  endtask

  task automatic chk_bit(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, want);
    end
  endtask

  function automatic logic [31:0] rnd_val();
    return real2fp((real'($urandom % 20001) - 10000.0) / 5000.0);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, xi, ar_, ai_, br_, bi_, dl, b2, d, dn, rr, ri, xor_, xoi, rnr, rni;
    real e_br, e_bi, e_dout;
    logic e_dz;
    int lat;
    in_valid = 0;
    mode     = MODE_BC;
    beta2    = real2fp(0.99);
    x_in = '0; a_in = '0; b_in = '0; delta_in = FP_ONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      // ---- choose operands
      mode = (n == 0 || ($urandom % 2)) ? MODE_BC : MODE_IC;
      if (n == 0) x_in = '0;
      else        x_in = '{re: rnd_val(), im: rnd_val()};
      a_in     = '{re: rnd_val(), im: rnd_val()};
      b_in     = '{re: rnd_val(), im: rnd_val()};
      delta_in = real2fp(real'(1 + $urandom % 1000) / 1000.0);
      // ---- expected values from the current state
      xr = fp2real(x_in.re); xi = fp2real(x_in.im);
      ar_ = fp2real(a_in.re); ai_ = fp2real(a_in.im);
      br_ = fp2real(b_in.re); bi_ = fp2real(b_in.im);
      dl = fp2real(delta_in); b2 = fp2real(beta2);
      rr = fp2real(state.re); ri = fp2real(state.im);
      if (mode == MODE_BC) begin
        d  = rr;
        dn = b2 * d + dl * (xr * xr + xi * xi);
        e_dz = (dn == 0.0);
        if (e_dz) begin
          e_br = 0.0; e_bi = 0.0; e_dout = dl;
        end else begin
          e_br = dl * xr / dn; e_bi = -dl * xi / dn; e_dout = dl * b2 * d / dn;
        end
      end else begin
        xor_ = xr - (ar_ * rr - ai_ * ri);
        xoi  = xi - (ar_ * ri + ai_ * rr);
        rnr  = rr + (br_ * xor_ - bi_ * xoi);
        rni  = ri + (br_ * xoi + bi_ * xor_);
      end
      // ---- issue and time it
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != LATENCY) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", lat, LATENCY);
      end
      chk_bit(busy, 1'b0, "busy low with out_valid");
      if (mode == MODE_BC) begin
        n_bc++;
        if (dzero) n_dzero++;
        chk(fp2real(a_out.re), xr, "bc a.re");
        chk(fp2real(a_out.im), xi, "bc a.im");
        chk(fp2real(b_out.re), e_br, "bc b.re");
        chk(fp2real(b_out.im), e_bi, "bc b.im");
        chk(fp2real(delta_out), e_dout, "bc delta_out");
        chk(fp2real(state.re), dn, "bc d'");
        chk_bit(dzero, e_dz, "bc dzero");
      end else begin
        n_ic++;
        chk(fp2real(x_out.re), xor_, "ic x_out.re");
        chk(fp2real(x_out.im), xoi, "ic x_out.im");
        chk(fp2real(a_out.re), ar_, "ic a.re");
        chk(fp2real(b_out.im), bi_, "ic b.im");
        chk(fp2real(state.re), rnr, "ic r.re");
        chk(fp2real(state.im), rni, "ic r.im");
      end
      // Keep the state bounded so the IC tests stay well conditioned.
      if (mode == MODE_IC && (abs_r(rnr) > 50.0 || abs_r(rni) > 50.0)) begin
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
      end
    end
    checks++;
    if (n_bc == 0 || n_ic == 0 || n_dzero == 0) begin
      failures++;
      $display("FAIL coverage: bc=%0d ic=%0d dzero=%0d", n_bc, n_ic, n_dzero);
    end
    $display("bc ops %0d, ic ops %0d, identity rotations %0d", n_bc, n_ic, n_dzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_recip_iter: self-checking test of the reciprocal that reuses one
// multiplier. Three instances run on the same operands: the default
// (10-bit table, one Newton-Raphson iteration, 4 clocks), a 6-bit table
// with two Newton-Raphson iterations (6 clocks) and a 6-bit table with two
// series-expansion stages (6 clocks). Operands are offered whenever all
// three are idle, sometimes back to back with the previous result. Each
// result is compared with 1/a in double precision (relative error at most
// 2^-21) and its latency is checked; zero and infinity inputs are covered.
module tb_fp_recip_iter;
  import tb_fp_pkg::*;
  import sgr_pkg::*;

  localparam int NV = 3;
  localparam int LAT [NV] = '{4, 6, 6};
  localparam real TOL = 2.0 ** -21;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [31:0] a, a_hold;
  logic        ov [NV];
  logic        bz [NV];
  logic [31:0] y  [NV];
  int checks = 0, failures = 0;
  int issue_cyc, cyc = 0;

  fp_recip_iter u0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a),
    .busy(bz[0]), .out_valid(ov[0]), .y(y[0]));
  fp_recip_iter #(.LUT_BITS(6), .ITERATIONS(2), .METHOD(RECIP_NEWTON)) u1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .busy(bz[1]), .out_valid(ov[1]), .y(y[1]));
  fp_recip_iter #(.LUT_BITS(6), .ITERATIONS(2), .METHOD(RECIP_SERIES)) u2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .busy(bz[2]), .out_valid(ov[2]), .y(y[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int v = 0; v < NV; v++) begin
        if (ov[v]) begin
          real r, exp_r;
          checks++;
          if (cyc - issue_cyc != LAT[v]) begin
            failures++;
            $display("FAIL latency variant %0d: %0d", v, cyc - issue_cyc);
          end
          checks++;
          if (a_hold[30:23] == 8'd0) begin
            if (y[v][30:0] !== 31'h7F80_0000) begin failures++; $display("FAIL zero"); end
          end else if (a_hold[30:23] == 8'hFF) begin
            if (y[v][30:0] !== 31'd0) begin failures++; $display("FAIL inf"); end
          end else begin
            exp_r = 1.0 / fp2real(a_hold);
            r     = fp2real(y[v]);
            if (abs_r(r - exp_r) > TOL * abs_r(exp_r)) begin
              failures++;
              if (failures < 10)
                $display("FAIL variant %0d: 1/%h got %h expected %e", v, a_hold, y[v], exp_r);
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    a = 32'h3F80_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      while (bz[0] || bz[1] || bz[2]) @(negedge clk);
      repeat ($urandom % 2) @(negedge clk);
      case (n)
        3:       a = 32'h0000_0000;
        4:       a = 32'hFF80_0000;
        5:       a = 32'h3F80_0000;
        6:       a = 32'h3FFF_FFFF;
        default: a = rand_fp(2, 250);
      endcase
      a_hold    = a;
      in_valid  = 1;
      issue_cyc = cyc;
      @(negedge clk);
      in_valid = 0;
      // Wait for the slowest instance so that results belong to a_hold.
      while (!ov[1]) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_recip: self-checking test of the pipelined reciprocal unit.
// Six instances run side by side: the default (10-bit table, one
// Newton-Raphson iteration), a 6-bit table with two Newton-Raphson
// iterations, a 6-bit table with two series-expansion stages, a 6-bit
// table with one Newton-Raphson iteration (the small-table option, good to
// about 14 bits), a 3-bit table with two iterations (required to reach at
// least 12 bits) and a 12-bit table with one iteration (required to reach
// the full 24 bits, within one unit in the last place). A stream
// of random operands, one per clock, goes into each; every result is
// compared with 1/a worked out in double precision against the accuracy
// the table size and iteration count promise, and the clock count from
// in_valid to out_valid is checked against the latency (4 for the default,
// 6, 5, 4, 6 and 4 for the others). Zero and infinity inputs are also checked.
module tb_fp_recip;
  import tb_fp_pkg::*;
  import sgr_pkg::*;

  localparam int NV = 6;
  localparam int LAT [NV] = '{4, 6, 5, 4, 6, 4};
  // Relative error allowed: seed error 2^-(B+1) squared per iteration,
  // limited by the 24-bit result.
  localparam real TOL [NV] = '{2.0 ** -21, 2.0 ** -21, 2.0 ** -21, 2.0 ** -13,
                            2.0 ** -12, 2.0 ** -23};

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [31:0] a;
  logic        ov [NV];
  logic [31:0] y  [NV];
  int checks = 0, failures = 0;

  fp_recip u0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[0]), .y(y[0]));
  fp_recip #(.LUT_BITS(6), .ITERATIONS(2), .METHOD(RECIP_NEWTON)) u1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[1]), .y(y[1]));
  fp_recip #(.LUT_BITS(6), .ITERATIONS(2), .METHOD(RECIP_SERIES)) u2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[2]), .y(y[2]));
  fp_recip #(.LUT_BITS(6), .ITERATIONS(1), .METHOD(RECIP_NEWTON)) u3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[3]), .y(y[3]));
  fp_recip #(.LUT_BITS(3), .ITERATIONS(2), .METHOD(RECIP_NEWTON)) u4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[4]), .y(y[4]));
  fp_recip #(.LUT_BITS(12), .ITERATIONS(1), .METHOD(RECIP_NEWTON)) u5 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .out_valid(ov[5]), .y(y[5]));

  always #5 clk = ~clk;

  // Record of issued operands, indexed by issue cycle.
  logic [31:0] hist_a [0:4095];
  logic        hist_v [0:4095];
  int cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      hist_a[cyc] <= a;
      hist_v[cyc] <= in_valid;
      for (int v = 0; v < NV; v++) begin
        if (cyc >= LAT[v]) begin
          checks++;
          if (ov[v] !== hist_v[cyc - LAT[v]]) begin
            failures++;
            $display("FAIL latency: variant %0d cycle %0d", v, cyc);
          end else if (ov[v]) begin
            logic [31:0] op;
            real r, exp_r;
            op = hist_a[cyc - LAT[v]];
            checks++;
            if (op[30:23] == 8'd0) begin
              if (y[v][30:0] !== 31'h7F80_0000) begin
                failures++;
                $display("FAIL zero: variant %0d got %h", v, y[v]);
              end
            end else if (op[30:23] == 8'hFF) begin
              if (y[v][30:0] !== 31'd0) begin
                failures++;
                $display("FAIL inf: variant %0d got %h", v, y[v]);
              end
            end else begin
              exp_r = 1.0 / fp2real(op);
              r     = fp2real(y[v]);
              if (abs_r(r - exp_r) > TOL[v] * abs_r(exp_r)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL variant %0d: 1/%h got %h (%e) expected %e", v, op, y[v], r, exp_r);
              end
            end
          end
        end
      end
      cyc <= cyc + 1;
    end
  end

  initial begin
    #200000;
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
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      case (n)
        10:      a = 32'h0000_0000;
        11:      a = 32'h7F80_0000;
        12:      a = 32'h3F80_0000;
        13:      a = 32'h3FFF_FFFF;
        default: a = rand_fp(2, 250);
      endcase
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_recip_lut: checks every entry of the reciprocal seed table. Each entry
// must equal 1 / (interval midpoint) to within half a step of its
// fixed-point format, and the seed's relative error anywhere in its
// interval (checked at both ends) must not exceed 2**-(ADDR_BITS + 1).
module tb_recip_lut;
  import tb_fp_pkg::*;

  localparam int unsigned B  = 10;
  localparam int unsigned FW = 30;

  logic [B-1:0] idx;
  logic [FW:0]  y0;
  int checks = 0, failures = 0;

  recip_lut dut (.idx(idx), .y0(y0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real y, mid, lo, hi, step, bound;
    step  = 2.0 ** (-real'(B));
    bound = 2.0 ** (-real'(B + 1));
    for (int k = 0; k < (1 << B); k++) begin
      idx = B'(k);
      #1;
      y   = real'(y0) / (2.0 ** FW);
      lo  = 1.0 + k * step;
      hi  = lo + step;
      mid = lo + step / 2.0;
      checks++;
      if (abs_r(y - 1.0 / mid) > 0.5 / (2.0 ** FW) + 1e-15) begin
        failures++;
        $display("FAIL entry %0d: %f vs %f", k, y, 1.0 / mid);
      end
      checks++;
      if (abs_r(1.0 - lo * y) > bound || abs_r(1.0 - hi * y) > bound) begin
        failures++;
        $display("FAIL seed error at entry %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

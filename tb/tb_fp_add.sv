// tb_fp_add: self-checking test of the single-precision adder/subtractor.
// For operands whose exponents differ by at most 24 the exact sum fits in
// double precision, so the testbench rounds it to nearest-even and the
// hardware must match bit for bit; additions, subtractions, near-total
// cancellation, a large exponent gap, zeros and overflow are covered. A
// second adder with two output pipeline registers must give the same
// results two clocks after its inputs settle.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [31:0] y_p;

  always #2 clk = ~clk;

  fp_add dut (.clk(clk), .a(a), .b(b), .sub(sub), .y(y));
  // Same unit with two output pipeline registers: after two clocks with
  // steady inputs it must show the same result.
  fp_add #(.STAGES(2)) dut_p (.clk(clk), .a(a), .b(b), .sub(sub), .y(y_p));

  task automatic check(input logic [31:0] exp_y, input string what);
    #1;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (y_p !== y) begin
      failures++;
      if (failures < 10) $display("FAIL pipelined %s: %h vs %h", what, y_p, y);
    end
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: %h %s %h = %h, expected %h", what, a, sub ? "-" : "+", b, y, exp_y);
    end
  endtask

  function automatic real ref_sum();
    return sub ? fp2real(a) - fp2real(b) : fp2real(a) + fp2real(b);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ea;
      ea  = 60 + int'($urandom % 120);
      a   = rand_fp(ea, ea);
      b   = rand_fp(ea - int'($urandom % 25), ea);
      if ($urandom % 2) begin
        logic [31:0] t; t = a; a = b; b = t;
      end
      sub = 1'($urandom);
      check(real2fp(ref_sum()), "random");
    end
    // Near-total cancellation: same exponent, close significands.
    for (int n = 0; n < 1000; n++) begin
      a   = rand_fp(127, 127);
      b   = {a[31], a[30:8], 8'($urandom)};
      sub = 1'b1;
      check(real2fp(ref_sum()), "cancel");
    end
    // Large exponent gap: the small operand only affects rounding.
    for (int n = 0; n < 200; n++) begin
      a   = rand_fp(150, 150);
      b   = rand_fp(100, 110);
      sub = 1'($urandom);
      check(a, "gap");
    end
    sub = 0;
    a = 32'h3F80_0000; b = 32'h3F80_0000; check(32'h4000_0000, "1+1");
    sub = 1;
    a = 32'h3F80_0000; b = 32'h3F80_0000; check(32'h0000_0000, "1-1");
    sub = 0;
    a = 32'h0000_0000; b = 32'hC0A0_0000; check(32'hC0A0_0000, "0+x");
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; check(32'h7F80_0000, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

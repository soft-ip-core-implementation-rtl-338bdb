// tb_fp_mul: self-checking test of the single-precision multiplier.
// Random operands are multiplied; the exact product is formed in double
// precision (24-bit by 24-bit fits exactly) and rounded to nearest-even in
// the testbench, and the hardware result must match it bit for bit.
// Zero, overflow-to-infinity and underflow-to-zero cases are also checked.
// A second multiplier with two output pipeline registers must give the same
// results two clocks after its inputs settle.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [31:0] y_p;

  always #2 clk = ~clk;

  fp_mul dut (.clk(clk), .a(a), .b(b), .y(y));
  // Same unit with two output pipeline registers: after two clocks with
  // steady inputs it must show the same result.
  fp_mul #(.STAGES(2)) dut_p (.clk(clk), .a(a), .b(b), .y(y_p));

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
        $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = rand_fp(70, 184);
      b = rand_fp(70, 184);
      check(real2fp(fp2real(a) * fp2real(b)), "random");
    end
    // Significands close to 2 so the product needs the one-place shift.
    for (int n = 0; n < 500; n++) begin
      a = {1'($urandom), 8'd127, 9'h1FF, 14'($urandom)};
      b = {1'($urandom), 8'd130, 9'h1FF, 14'($urandom)};
      check(real2fp(fp2real(a) * fp2real(b)), "carry");
    end
    // Short significands so that products often land exactly half way
    // between two representable numbers (ties must round to even).
    for (int n = 0; n < 2000; n++) begin
      a = {1'($urandom), 8'd120 + 8'($urandom % 16), 12'($urandom), 11'd0};
      b = {1'($urandom), 8'd120 + 8'($urandom % 16), 12'($urandom), 11'd0};
      check(real2fp(fp2real(a) * fp2real(b)), "tie");
    end
    a = 32'h0000_0000; b = 32'h4049_0FDB; check(32'h0000_0000, "zero");
    a = 32'h8000_0000; b = 32'h4049_0FDB; check(32'h8000_0000, "neg zero");
    a = 32'h7F00_0000; b = 32'h7F00_0000; check(32'h7F80_0000, "overflow");
    a = 32'h0080_0000; b = 32'h3E80_0000; check(32'h0000_0000, "underflow");
    a = 32'h3F80_0000; b = 32'hC0A0_0000; check(32'hC0A0_0000, "one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ripple_carry_adder_tb: exhaustive check of the 4-bit ripple-carry adder
// (all x, y and carry-in values) and a random check of a 10-bit instance,
// against {cout, sum} = x + y + cin computed with a plain addition.
module ripple_carry_adder_tb;
  int checks = 0, failures = 0;
  logic [3:0] x4, y4, s4;
  logic       ci4, co4;
  logic [9:0] x10, y10, s10;
  logic       ci10, co10;

  ripple_carry_adder dut4 (.x(x4), .y(y4), .cin(ci4), .sum(s4), .cout(co4));
  ripple_carry_adder #(.WIDTH(10)) dut10 (.x(x10), .y(y10), .cin(ci10), .sum(s10), .cout(co10));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x10 = '0; y10 = '0; ci10 = 0;
    for (int k = 0; k < 512; k++) begin
      {ci4, x4, y4} = 9'(k);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(x4) + int'(y4) + int'(ci4))) begin
        failures++;
        $display("FAIL 4-bit: %0d + %0d + %0d = %0d", x4, y4, ci4, {co4, s4});
      end
    end
    for (int k = 0; k < 2000; k++) begin
      x10 = 10'($urandom); y10 = 10'($urandom); ci10 = 1'($urandom);
      #1;
      checks++;
      if ({co10, s10} !== 11'(int'(x10) + int'(y10) + int'(ci10))) begin
        failures++;
        $display("FAIL 10-bit: %0d + %0d + %0d = %0d", x10, y10, ci10, {co10, s10});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

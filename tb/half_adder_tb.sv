// half_adder_tb: exhaustive check of the half_adder cell against the arithmetic sum of its
// inputs. Every input combination is applied and held 1 ns.
module half_adder_tb;
  int checks = 0, failures = 0;
  logic [1:0] v;
  logic s, co;
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 4; k++) begin
      int total;
      v = 2'(k);
      #1;
      total = $countones(v);
      checks++;
      if (co !== total[1] || s !== total[0]) begin
        failures++;
        $display("FAIL: inputs=%b co=%b s=%b", v, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  half_adder dut (.a(v[0]), .b(v[1]), .s(s), .co(co));
endmodule

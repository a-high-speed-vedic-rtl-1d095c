// Exhaustive test of the half adder: for all four input combinations,
// a + b must equal sum + 2*carry. A watchdog ends the run if it hangs.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> sum=%b carry=%b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

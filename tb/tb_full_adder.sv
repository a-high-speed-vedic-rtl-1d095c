// Exhaustive test of the full adder: for all eight input combinations,
// a + b + c must equal sum + 2*carry. A watchdog ends the run if it hangs.
module tb_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> sum=%b carry=%b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

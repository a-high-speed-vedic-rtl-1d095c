// Exhaustive test of the 4:2 compressor. All 32 input combinations are
// applied; for each the outputs must satisfy
//     x0 + x1 + x2 + x3 + cin = sum + 2*(cout + carry),
// the sum must be the parity of the five inputs, and cout must not change
// when only cin changes (so a row of compressors has no carry ripple through
// cout). A watchdog ends the run if it hangs.
module tb_compressor_4_2;
  logic x0, x1, x2, x3, cin;
  logic sum, cout, carry;
  int checks = 0, failures = 0;

  compressor_4_2 dut (
    .x0(x0), .x1(x1), .x2(x2), .x3(x3), .cin(cin),
    .sum(sum), .cout(cout), .carry(carry)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_c0;
    int   total;
    for (int v = 0; v < 16; v++) begin
      {x3, x2, x1, x0} = 4'(v);
      cin = 1'b0;
      #1;
      cout_c0 = cout;
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c);
        #1;
        total = int'(x0) + int'(x1) + int'(x2) + int'(x3) + int'(cin);
        checks++;
        if (int'(sum) + 2 * (int'(cout) + int'(carry)) != total) begin
          failures++;
          $display("FAIL value: in=%b cin=%b -> sum=%b cout=%b carry=%b",
                   4'(v), cin, sum, cout, carry);
        end
        checks++;
        if (sum != 1'(total % 2)) begin
          failures++;
          $display("FAIL parity: in=%b cin=%b sum=%b", 4'(v), cin, sum);
        end
        checks++;
        if (cout != cout_c0) begin
          failures++;
          $display("FAIL cout depends on cin: in=%b", 4'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

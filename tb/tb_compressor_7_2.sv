// Exhaustive test of the 7:2 compressor: all 1024 combinations of a[7:0],
// cin1 and cin2. The outputs must satisfy
//     popcount(a) + cin1 + cin2 = sum + 2*c2 + 4*(c1 + c3)
// and sum must be the parity of the inputs. Every output is also required to
// have been 1 at least once. A watchdog ends the run if it hangs.
module tb_compressor_7_2;
  logic [7:0] a;
  logic       cin1, cin2;
  logic       sum, c1, c2, c3;
  int checks = 0, failures = 0;
  int seen_c1 = 0, seen_c2 = 0, seen_c3 = 0;

  compressor_7_2 dut (
    .a(a), .cin1(cin1), .cin2(cin2),
    .sum(sum), .c1(c1), .c2(c2), .c3(c3)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 1024; v++) begin
      {cin2, cin1, a} = 10'(v);
      #1;
      total = 0;
      for (int i = 0; i < 10; i++) total += (v >> i) & 1;
      checks++;
      if (int'(sum) + 2 * int'(c2) + 4 * (int'(c1) + int'(c3)) != total) begin
        failures++;
        $display("FAIL value: in=%b -> sum=%b c1=%b c2=%b c3=%b (want %0d)",
                 10'(v), sum, c1, c2, c3, total);
      end
      checks++;
      if (sum != 1'(total % 2)) begin
        failures++;
        $display("FAIL parity: in=%b", 10'(v));
      end
      seen_c1 += int'(c1);
      seen_c2 += int'(c2);
      seen_c3 += int'(c3);
    end
    checks++;
    if (seen_c1 == 0 || seen_c2 == 0 || seen_c3 == 0) begin
      failures++;
      $display("FAIL an output never went high: c1=%0d c2=%0d c3=%0d",
               seen_c1, seen_c2, seen_c3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

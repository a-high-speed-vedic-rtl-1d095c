// Test of the partial-product generator at its default width of 8. For
// corner operands and 2000 random pairs it checks every partial product
// against a[i] & b[j] taken from the operands, and checks that the weighted
// sum of all partial products, sum of pp[i][j] * 2**(i+j), equals a * b.
// A watchdog ends the run if it hangs.
module tb_urdhwa_pp_gen;
  localparam int unsigned N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  urdhwa_pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    longint weighted;
    a = ta;
    b = tb_;
    #1;
    weighted = 0;
    for (int i = 0; i < int'(N); i++) begin
      for (int j = 0; j < int'(N); j++) begin
        checks++;
        if (pp[i][j] != (((ta >> i) & 1) == 1 && ((tb_ >> j) & 1) == 1)) begin
          failures++;
          $display("FAIL pp[%0d][%0d] a=%h b=%h", i, j, ta, tb_);
        end
        if (pp[i][j]) weighted += longint'(1) << (i + j);
      end
    end
    checks++;
    if (weighted != longint'(ta) * longint'(tb_)) begin
      failures++;
      $display("FAIL weighted sum a=%h b=%h got %0d", ta, tb_, weighted);
    end
  endtask

  initial begin
    check_pair('0, '0);
    check_pair('1, '1);
    check_pair('1, '0);
    check_pair(N'(1), '1);
    for (int k = 0; k < 2000; k++) check_pair(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

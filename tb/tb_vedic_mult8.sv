// End-to-end test of the 8x8 compressor-based Urdhwa multiplier at its only
// size. All 65,536 operand pairs are applied and every product is compared
// with a * b computed by the simulator. Alongside, it counts how often each
// reduction mechanism of the datapath was exercised, and fails if one never
// was:
//   * a 4:2 compressor producing both of its carries (column 2, 13 or 14);
//   * a 7:2 compressor producing a carry two columns up (c1 or c3 set);
//   * the extra half adder of column 7 or 8 producing a carry;
//   * the top column XOR producing product bit 15.
// It also checks, on every vector, that the two carries reaching column 15
// are never both 1, which is what lets that column be a plain XOR.
// The datapath is combinational; each vector is given 1 time unit to settle.
// A watchdog ends the run if it hangs.
module tb_vedic_mult8;
  import vedic_pkg::*;

  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;
  int n_c42_both = 0, n_c72_w4 = 0, n_ha7 = 0, n_ha8 = 0, n_xor15 = 0;

  vedic_mult8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    product_t expected;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        expected = product_t'(va * vb);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 20)
            $display("FAIL %0d * %0d = %0d, got %0d", va, vb, expected, p);
        end
        checks++;
        if (dut.k14_co && dut.k14_ca) begin
          failures++;
          $display("FAIL both carries into column 15 set for %0d * %0d", va, vb);
        end
        if ((dut.u_col2.cout && dut.u_col2.carry) ||
            (dut.u_col13.cout && dut.u_col13.carry) ||
            (dut.u_col14.cout && dut.u_col14.carry))
          n_c42_both++;
        if (dut.u_col7.c1 || dut.u_col7.c3 || dut.u_col8.c1 || dut.u_col8.c3)
          n_c72_w4++;
        if (dut.k7_h) n_ha7++;
        if (dut.k8_h) n_ha8++;
        if (p[15]) n_xor15++;
      end
    end
    $display("mechanisms: 4:2 both carries=%0d  7:2 two-column carry=%0d  col7 HA carry=%0d  col8 HA carry=%0d  bit15 set=%0d",
             n_c42_both, n_c72_w4, n_ha7, n_ha8, n_xor15);
    checks++;
    if (n_c42_both == 0) begin failures++; $display("FAIL 4:2 double carry never seen"); end
    checks++;
    if (n_c72_w4 == 0) begin failures++; $display("FAIL 7:2 two-column carry never seen"); end
    checks++;
    if (n_ha7 == 0) begin failures++; $display("FAIL column 7 half-adder carry never seen"); end
    checks++;
    if (n_ha8 == 0) begin failures++; $display("FAIL column 8 half-adder carry never seen"); end
    checks++;
    if (n_xor15 == 0) begin failures++; $display("FAIL product bit 15 never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Half adder: adds two bits of equal weight. sum = a ^ b carries weight 1,
// carry = a & b carries weight 2. Purely combinational; one gate delay.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule

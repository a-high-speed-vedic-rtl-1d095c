// Full adder: adds three bits of equal weight into sum (weight 1) and
// carry (weight 2), i.e. a + b + c = sum + 2*carry. Purely combinational;
// two gate delays on the sum path.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic p;
  assign p     = a ^ b;
  assign sum   = p ^ c;
  assign carry = (a & b) | (p & c);
endmodule

// 4:2 compressor: adds four bits x0..x3 of one column and a carry-in cin,
// all of equal weight, and returns
//     x0 + x1 + x2 + x3 + cin = sum + 2*(cout + carry).
// It is built from three XOR stages and two 2:1 multiplexers:
//     y1 = x0 ^ x1,  y2 = x2 ^ x3,  y3 = y1 ^ y2,  sum = y3 ^ cin
//     cout  = y1 ? x2  : x0      (does not depend on cin)
//     carry = y3 ? cin : x3
// so the longest path is three gate delays (XOR, XOR, XOR/MUX) instead of
// the chain of full and half adders that would otherwise add five bits.
// The port names, the XOR/MUX structure and which signals meet at each gate
// follow the published gate diagram; the select and data roles of the two
// multiplexer inputs are the usual ones for this circuit.
// Purely combinational, no clock.
module compressor_4_2 (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic carry
);
  logic y1, y2, y3;

  assign y1    = x0 ^ x1;
  assign y2    = x2 ^ x3;
  assign y3    = y1 ^ y2;
  assign sum   = y3 ^ cin;
  assign cout  = y1 ? x2 : x0;
  assign carry = y3 ? cin : x3;
endmodule

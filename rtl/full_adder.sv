// full_adder: 3-2 counter, the cell of the 3-2 rows of the CSA tree and of
// the 4-2 compressor. sum + 2*carry = a + b + c. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule

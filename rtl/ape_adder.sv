// ape_adder: the APE's single-bit full adder (the sigma unit).
//
// Bit-serial arithmetic runs one bit position per step: the APE feeds the
// two operand bits and its carry flag C, writes the sum bit back into its
// data register and keeps the carry-out in C for the next step. An n-bit
// addition therefore takes n steps. Combinational.
module ape_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule

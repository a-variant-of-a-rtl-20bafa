// full_adder: one-bit binary full adder, the 3-to-2 counter of the column
// adder dot schemes. s is the sum bit, same weight as the inputs; co is the
// carry, one binary weight higher. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule

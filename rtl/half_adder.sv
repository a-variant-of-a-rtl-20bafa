// half_adder: one-bit binary half adder, the 2-to-2 counter of the column
// adder dot schemes. s has the weight of the inputs, co one binary weight
// higher. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule

// full_adder: one-bit full adder cell (3 inputs of equal weight -> sum, carry).
// It is the basic cell of every counter tree and ripple-carry adder in this
// design. Purely combinational.
// The full-adder cell is the original design's building block.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule

// half_adder: one-bit half adder cell (2 inputs -> sum, carry). Used for the
// upper bits of a parallel incrementer, where only the stored word and the
// incoming carry have to be added, as in the original design. Purely
// combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule

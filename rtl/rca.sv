// rca: W-bit ripple-carry adder built from full_adder cells.
// s + 2^W * co = a + b + ci. Purely combinational; the carry ripples from bit 0
// to bit W-1, one full-adder delay per bit. Ripple-carry adders are what the
// original design uses throughout.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar j = 0; j < W; j++) begin : g_bit
    full_adder u_fa (.a(a[j]), .b(b[j]), .ci(c[j]), .s(s[j]), .co(c[j+1]));
  end
  assign co = c[W];
endmodule

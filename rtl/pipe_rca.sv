// pipe_rca: W-bit ripple-carry adder pipelined at the bit level, the building
// block of the pipelined counter tree.
//
// Operand bits arrive skewed: bit j of a and b is presented j cycles after
// bit 0, and the carry-in together with bit 0. Every full adder's sum and
// carry outputs go into flip-flops, so the carry into bit j+1 is ready exactly
// when bit j+1 of the operands arrives. The result is skewed the same way,
// one cycle later: s[j] (0 <= j < W) is valid j+1 cycles after operand bit 0.
// The carry out of the top cell passes through a second flip-flop and becomes
// s[W], valid W+1 cycles after operand bit 0, so the result keeps the skew of
// one cycle per bit. This latch placement follows the original design.
//
// Reset: asynchronous, active low, clears all flip-flops.
module pipe_rca #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W:0]   s
);
  logic [W-1:0] c;       // carry into each cell (c[0] = ci, others registered)
  logic [W-1:0] sum_d, co_d, sum_q;
  logic [W:1]   c_q;
  logic         top_q;   // second flip-flop on the top carry

  assign c[0] = ci;
  for (genvar j = 0; j < int'(W); j++) begin : g_bit
    full_adder u_fa (.a(a[j]), .b(b[j]), .ci(c[j]), .s(sum_d[j]), .co(co_d[j]));
    if (j > 0) begin : g_c
      assign c[j] = c_q[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      c_q   <= '0;
      top_q <= 1'b0;
    end else begin
      sum_q <= sum_d;
      c_q   <= co_d;
      top_q <= c_q[W];
    end
  end

  assign s = {top_q, sum_q};
endmodule

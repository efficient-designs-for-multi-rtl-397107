// mic: (N, Q) multi-input counter (accumulative parallel counter).
// Each clock edge adds the number of 1s among the N inputs x to the stored
// Q-bit count (mod 2^Q).
//
// Instead of a Q-bit parallel incrementer and a Q-bit register, the count is
// split. The low L = cpc_width(N-1) bits live in an L-bit register fed by an
// (N, L) parallel incrementer whose y input is that register; the
// incrementer's overflow is at most one per cycle and drives the increment of
// a (Q-L)-bit sequential fast counter that holds the upper bits. The critical
// path therefore depends on N only, not on Q. This split is the original design's; the
// widths Q and the reset are this implementation's choice.
//
// Interface: x[N-1:0] in (sampled on each rising edge), count[Q-1:0] out
// (registered; an input set sampled at an edge is in count right after it),
// wrap out (1 for one cycle after the count passed 2^Q - 1 -> 0).
// Reset: asynchronous, active low, clears the count.
module mic
  import mic_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned Q = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count,
  output logic         wrap
);
  localparam int unsigned L = cpc_width(N - 1);

  if (Q <= L) begin : g_bad_q
    $error("mic: Q must exceed the register width");
  end

  logic [L-1:0] low_q, low_d;
  logic         carry;

  parallel_incrementer #(.N(N), .M(L)) u_inc (
    .x(x), .y(low_q), .z(low_d), .ovf(carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) low_q <= '0;
    else        low_q <= low_d;
  end

  logic [Q-L-1:0] high_q;
  fast_counter #(.W(Q - L)) u_fc (
    .clk(clk), .rst_n(rst_n), .inc(carry), .count(high_q), .wrap(wrap)
  );

  assign count = {high_q, low_q};
endmodule

// pipe_mic: pipelined (N, Q) multi-input counter, N = 2^L inputs, count kept
// modulo 2^Q.
//
// Each clock edge takes a new set of N single-bit inputs. A pipelined
// (N-1)-input counter tree (pipe_cpc) produces the L-bit count of x[N-1:1],
// skewed one cycle per bit. The last level is an L-bit accumulator built as a
// bit-pipelined ripple-carry adder: cell j adds count bit j, its own stored sum
// bit (fed back from its sum flip-flop) and the registered carry of cell j-1;
// x[0], delayed to meet bit 0, is the carry-in of cell 0. Because every input
// of cell j is delayed by exactly j cycles, each sum flip-flop accumulates its
// bit correctly although the carries reach it later. The registered carry out
// of the top cell increments a fast counter of latency d = 1 that holds count
// bits Q-1..L. Delay chains on the sum bits (L - j extra
// flip-flops for bit j, so d+1 in all on the top bit) line them up with the
// fast counter. This arrangement follows the original design; which input bit goes to
// which leaf is this implementation's choice.
//
// Timing: a set presented in cycle s is included in count from cycle
// s + 2L - 1 + d = s + 2L on (8 cycles for N = 16), whatever Q is. Throughput is
// one set per cycle; the clock period is one full adder plus a flip-flop.
// wrap is 1 in the cycle whose count passed 2^Q - 1 -> 0 (the dropped bit Q).
// Reset: asynchronous, active low, clears the count and the pipeline.
module pipe_mic
  import mic_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 16,
  localparam int unsigned L = cpc_width(N - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count,
  output logic         wrap
);
  if (N < 4 || N != (1 << L)) begin : g_bad_n
    $error("pipe_mic: N must be a power of two, at least 4");
  end
  if (Q <= L) begin : g_bad_q
    $error("pipe_mic: Q must exceed log2(N)");
  end

  // counter tree over x[N-1:1]; bit j valid L-1+j cycles after the set
  logic [L-1:0] cnt;
  pipe_cpc #(.K(L)) u_tree (.clk(clk), .rst_n(rst_n), .x(x[N-1:1]), .count(cnt));

  // x[0] is the carry-in of the accumulator, delayed to meet count bit 0
  logic x0_d;
  delay_line #(.W(1), .D(L-1)) u_x0 (.clk(clk), .rst_n(rst_n), .d(x[0]), .q(x0_d));

  // bit-pipelined accumulator
  logic [L-1:0] c;
  logic [L-1:0] acc_q, sum_d, co_d;
  logic [L:1]   c_q;
  assign c[0] = x0_d;
  for (genvar j = 0; j < int'(L); j++) begin : g_acc
    full_adder u_fa (.a(cnt[j]), .b(acc_q[j]), .ci(c[j]), .s(sum_d[j]), .co(co_d[j]));
    if (j > 0) begin : g_c
      assign c[j] = c_q[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      c_q   <= '0;
    end else begin
      acc_q <= sum_d;
      c_q   <= co_d;
    end
  end

  // upper bits: fast counter incremented by the registered top carry
  fast_counter #(.W(Q - L)) u_fc (
    .clk(clk), .rst_n(rst_n), .inc(c_q[L]), .count(count[Q-1:L]), .wrap(wrap)
  );

  // line the low bits up with the fast counter
  for (genvar j = 0; j < int'(L); j++) begin : g_deskew
    delay_line #(.W(1), .D(L - j)) u_d (
      .clk(clk), .rst_n(rst_n), .d(acc_q[j]), .q(count[j])
    );
  end
endmodule

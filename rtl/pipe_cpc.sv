// pipe_cpc: bit-level pipelined parallel counter for 2^K - 1 inputs.
//
// It is the divide-and-conquer counter tree (two counters of 2^(K-1) - 1
// inputs merged by a (K-1)-bit ripple-carry adder whose carry-in is the one
// remaining input) with a flip-flop on every full-adder output, written
// recursively. The subtree outputs arrive skewed by one cycle per bit, and the
// carry-in input is delayed by K-2 cycles so that it meets bit 0 of the
// subtree counts. All flip-flops loaded on the same cycle form one
// computational wavefront; level k of the tree works on wavefront k-1, so
// every stage has one full-adder delay plus a flip-flop.
//
// Interface: x[2^K-2:0] in, all bits presented together; count[K-1:0] out, with
// bit j valid (K-1)+j cycles after x is presented. K = 1 is a wire.
// Reset: asynchronous, active low.
// Latch placement follows the original design; the recursive form and the
// reset are this implementation's.
//
// Lint note: linted as a top of its own, this recursive module gets an
// "undriven" warning for lo and hi in the top copy from the Verilator 5
// linter. They are driven by the two sub-instances; the warning does not
// appear when the module is used from its parent (cpc / pipe_mic), and
// simulation confirms the values.
module pipe_cpc #(
  parameter int unsigned K = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [(1<<K)-2:0] x,
  output logic [K-1:0]      count
);
  if (K == 1) begin : g_leaf
    assign count = x;
  end else begin : g_node
    localparam int unsigned HALF = (1 << (K - 1)) - 1;
    logic [K-2:0] lo, hi;
    logic         ci;
    pipe_cpc #(.K(K-1)) u_lo (.clk(clk), .rst_n(rst_n), .x(x[HALF-1:0]),      .count(lo));
    pipe_cpc #(.K(K-1)) u_hi (.clk(clk), .rst_n(rst_n), .x(x[2*HALF-1:HALF]), .count(hi));
    delay_line #(.W(1), .D(K-2)) u_ci (.clk(clk), .rst_n(rst_n), .d(x[2*HALF]), .q(ci));
    pipe_rca #(.W(K-1)) u_add (.clk(clk), .rst_n(rst_n), .a(lo), .b(hi), .ci(ci), .s(count));
  end
endmodule

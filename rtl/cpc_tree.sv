// cpc_tree: combinational parallel counter for exactly 2^K - 1 inputs,
// written as the recursive divide-and-conquer construction: two counters of
// 2^(K-1) - 1 inputs each produce (K-1)-bit counts, and a (K-1)-bit
// ripple-carry adder merges them, the one remaining input serving as its
// carry-in. The K-bit result is {carry-out, sum}. K = 1 is a single input.
//
// Interface: x[2^K-2:0] in, count[K-1:0] out. Combinational.
// The construction is the original design's; the recursive form is this
// implementation's way of writing it.
//
// Lint note: linted as a top of its own, this recursive module gets an
// "undriven" warning for lo and hi in the top copy from the Verilator 5
// linter. They are driven by the two sub-instances; the warning does not
// appear when the module is used from its parent (cpc / pipe_mic), and
// simulation confirms the values.
module cpc_tree #(
  parameter int unsigned K = 5
) (
  input  logic [(1<<K)-2:0] x,
  output logic [K-1:0]      count
);
  if (K == 1) begin : g_leaf
    assign count = x;
  end else begin : g_node
    localparam int unsigned HALF = (1 << (K - 1)) - 1;
    logic [K-2:0] lo, hi, s;
    logic         co;
    cpc_tree #(.K(K-1)) u_lo (.x(x[HALF-1:0]),        .count(lo));
    cpc_tree #(.K(K-1)) u_hi (.x(x[2*HALF-1:HALF]),   .count(hi));
    rca      #(.W(K-1)) u_add (.a(lo), .b(hi), .ci(x[2*HALF]), .s(s), .co(co));
    assign count = {co, s};
  end
endmodule

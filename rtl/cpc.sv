// cpc: combinational parallel counter (CPC). count = number of 1s among the N
// inputs x.
//
// Built by divide and conquer from full adders (see cpc_tree): two counters of
// l inputs each plus one further input bit, used as the carry-in, are merged by
// a ripple-carry adder of ceil(log2 l)+1 bits into a counter of 2l+1 inputs.
// Starting from single bits this gives counters of 1, 3, 7, 15, 31, ...
// inputs; the construction is repeated until the counter has at least N
// inputs, and the unused inputs are tied to 0. The construction follows the
// original design; which input goes to which leaf is this implementation's
// own choice.
//
// Interface: x[N-1:0] in, count[W-1:0] out with W = cpc_width(N) bits.
// Combinational.
module cpc
  import mic_pkg::*;
#(
  parameter int unsigned N = 31,
  localparam int unsigned W = cpc_width(N)
) (
  input  logic [N-1:0] x,
  output logic [W-1:0] count
);
  localparam int unsigned NP = (1 << W) - 1;   // inputs of the padded tree

  logic [NP-1:0] xp;
  assign xp = NP'(x);

  cpc_tree #(.K(W)) u_tree (.x(xp), .count(count));
endmodule

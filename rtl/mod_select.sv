// mod_select: control logic and output multiplexer of the pipelined modulo-P
// multi-input counter.
//
// Two paths add offsets to the intermediate count C = T mod 2^Q (T = true
// total): the left path adds A, the right path adds B, where A and B are
// -kP mod 2^Q for consecutive k. The path with the smaller multiple of P in
// use ("current") gives T mod P; the other ("candidate") result
// R = (T - (k+1)P) mod 2^Q sits in [2^Q - P, 2^Q) while T < (k+1)P and drops
// into [0, N) the cycle T reaches (k+1)P. That drop is a wrap of R modulo
// 2^Q, and it is detected from overflow signals only:
//   wrap(R) = ovf_c XOR ovf_cand(t) XOR ovf_cand(t-1)
// where ovf_cand is the carry out of the candidate adder and ovf_c marks a
// wrap of C itself. On a wrap the multiplexer switches to the candidate path
// and the old current path's accumulative adder is told to add -2P, turning it
// into the next candidate. While that update and the adder pipeline settle
// (SETTLE cycles) the new candidate is not watched; this is safe as long as
// T cannot advance by P in that time (P > N * (SETTLE + 1)).
// The original design gives the multiplexer, its three overflow inputs and the
// alternation between the paths; the wrap equation, the settle counter and the
// registered output are this implementation's choices.
//
// Interface: r_left, r_right and their carries ovf_left, ovf_right from the
// two fast adders, ovf_c aligned with them; count = selected result,
// registered (one cycle after its inputs); add_left/add_right = one-cycle
// strobes to the accumulative adders; sel = 1 while the right path is
// current. Reset: asynchronous, active low; the left path is current.
module mod_select #(
  parameter int unsigned Q      = 16,
  parameter int unsigned SETTLE = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Q-1:0] r_left,
  input  logic [Q-1:0] r_right,
  input  logic         ovf_left,
  input  logic         ovf_right,
  input  logic         ovf_c,
  output logic [Q-1:0] count,
  output logic         add_left,
  output logic         add_right,
  output logic         sel
);
  localparam int unsigned CW = $clog2(SETTLE + 1);

  logic          cand_ovf, cand_ovf_q, wrap_cand, switch_now, sel_eff;
  logic [CW-1:0] settle_q;

  always_comb begin
    cand_ovf   = sel ? ovf_left : ovf_right;
    wrap_cand  = ovf_c ^ cand_ovf ^ cand_ovf_q;
    switch_now = (settle_q == '0) && wrap_cand;
    sel_eff    = sel ^ switch_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel        <= 1'b0;
      cand_ovf_q <= 1'b0;
      settle_q   <= CW'(SETTLE);
      add_left   <= 1'b0;
      add_right  <= 1'b0;
      count      <= '0;
    end else begin
      // after a switch the old current path becomes the candidate; its
      // previous carry is re-sampled during the settle period
      cand_ovf_q <= cand_ovf;
      sel        <= sel_eff;
      add_left   <= switch_now & ~sel;
      add_right  <= switch_now &  sel;
      if (switch_now)         settle_q <= CW'(SETTLE);
      else if (settle_q != '0) settle_q <= settle_q - 1'b1;
      count      <= sel_eff ? r_right : r_left;
    end
  end
endmodule

// pipe_mod_mic: pipelined (N, Q; P) modular multi-input counter. Each clock
// edge adds the number of 1s among N inputs to a count kept modulo P.
//
// A pipelined (N, Q) counter (pipe_mic) keeps C = T mod 2^Q of the true total
// T; its bit Q is dropped and only its wrap is reported (ovf_c). Two Q-bit
// accumulative adders hold offsets A (starting at 0) and B (starting at -P),
// each stepping by -2P when told to. Two pipelined fast adders form C + A and
// C + B, and mod_select chooses between them from the three overflow signals.
// As T grows, the selection alternates between the paths, and each time the
// path just left is moved 2P further down, so that the selected result is
// always T - kP with 0 <= T - kP < P. Because A, B and C are all kept modulo
// 2^Q, the 2^Q multiples lost from C cancel in the selected Q-bit sum.
// The structure follows the original design; P = 1000, the 2-stage fast adders and the
// settle time of the control logic are this implementation's choices.
//
// Requirements: N a power of two, P + N <= 2^Q and P > N * (FA_STAGES + 4).
// Timing: a set presented in cycle s is included in count from cycle
// s + 2 log2(N) + FA_STAGES + 1 on (11 cycles at the defaults); one new set
// per cycle.
// Interface: x[N-1:0] in; count[Q-1:0] = T mod P; raw_count[Q-1:0] = T mod
// 2^Q (the plain pipelined counter's output, 2 log2(N) cycles after the set);
// raw_wrap = 1 in the cycle raw_count wrapped; path = 1 while the right path
// is selected. Reset: asynchronous, active low, clears the count.
module pipe_mod_mic
  import mic_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned Q         = 16,
  parameter int unsigned P         = 1000,
  parameter int unsigned FA_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count,
  output logic [Q-1:0] raw_count,
  output logic         raw_wrap,
  output logic         path
);
  localparam int unsigned SETTLE = FA_STAGES + 3;

  if (longint'(P) + longint'(N) > (longint'(1) << Q) || P <= N * (SETTLE + 1)) begin : g_bad_p
    $error("pipe_mod_mic: need P + N <= 2^Q and P > N * (FA_STAGES + 4)");
  end

  logic [Q-1:0] c, a_val, b_val, r_left, r_right;
  logic         ovf_c, ovf_c_d, ovf_left, ovf_right, add_left, add_right;

  pipe_mic #(.N(N), .Q(Q)) u_mic (
    .clk(clk), .rst_n(rst_n), .x(x), .count(c), .wrap(ovf_c)
  );

  accum_adder #(.Q(Q), .P(P), .INIT_MULT(0)) u_acc_left (
    .clk(clk), .rst_n(rst_n), .add(add_left), .value(a_val)
  );
  accum_adder #(.Q(Q), .P(P), .INIT_MULT(1)) u_acc_right (
    .clk(clk), .rst_n(rst_n), .add(add_right), .value(b_val)
  );

  pipe_fast_adder #(.Q(Q), .STAGES(FA_STAGES)) u_fa_left (
    .clk(clk), .rst_n(rst_n), .a(c), .b(a_val), .sum(r_left), .ovf(ovf_left)
  );
  pipe_fast_adder #(.Q(Q), .STAGES(FA_STAGES)) u_fa_right (
    .clk(clk), .rst_n(rst_n), .a(c), .b(b_val), .sum(r_right), .ovf(ovf_right)
  );

  // the count's own wrap, delayed to line up with the fast adder results
  delay_line #(.W(1), .D(FA_STAGES)) u_ovfc (
    .clk(clk), .rst_n(rst_n), .d(ovf_c), .q(ovf_c_d)
  );

  mod_select #(.Q(Q), .SETTLE(SETTLE)) u_sel (
    .clk(clk), .rst_n(rst_n),
    .r_left(r_left), .r_right(r_right),
    .ovf_left(ovf_left), .ovf_right(ovf_right), .ovf_c(ovf_c_d),
    .count(count), .add_left(add_left), .add_right(add_right), .sel(path)
  );

  assign raw_count = c;
  assign raw_wrap  = ovf_c;
endmodule

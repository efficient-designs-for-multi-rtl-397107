// mod_parallel_incrementer: (N, M; P) modulo-P parallel incrementer.
// z = (y + number of 1s among x) mod P, for a stored word y < P and a modulus
// with 2^(M-1) < P <= 2^M.
//
// Structure: an (N-1)-input parallel counter (cpc) counts x[N-1:1]; a first
// M-bit ripple-carry adder adds that count and x[0] (as carry-in) to y; a
// second M-bit ripple-carry adder adds the constant 2^M - P to the first sum;
// a multiplexer outputs the second sum when the true sum y + count has reached
// P and the first sum otherwise. That condition is the sign of the (M+1)-bit
// difference (y + count) - P, read as the OR of the carries of the two adders
// (they are never both 1 while y < P and N <= P). One subtraction suffices
// because the sum is below 2P. The two-adder-and-multiplexer structure follows
// the original design; the defaults N = 32, M = 7 follow its (32, 7) example, and
// P = 100 is this implementation's choice (the original fixes no modulus).
//
// Interface: x[N-1:0], y[M-1:0] in; z[M-1:0] out; wrap out = 1 when the
// modulus was subtracted. Combinational. Requires y < P and N <= P.
module mod_parallel_incrementer
  import mic_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 7,
  parameter int unsigned P = 100
) (
  input  logic [N-1:0] x,
  input  logic [M-1:0] y,
  output logic [M-1:0] z,
  output logic         wrap
);
  localparam int unsigned C = cpc_width(N - 1);
  localparam logic [M-1:0] CORR = M'((1 << M) - P);   // 2^M - P

  if (N < 2 || M < C || N > P) begin : g_bad_n
    $error("mod_parallel_incrementer: need 2 <= N <= P and M >= cpc_width(N-1)");
  end
  if (P > (1 << M) || 2 * P <= (1 << M)) begin : g_bad_p
    $error("mod_parallel_incrementer: need 2^(M-1) < P <= 2^M");
  end

  logic [C-1:0] cnt;
  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .count(cnt));

  logic [M-1:0] s1, s2;
  logic         c1, c2;
  rca #(.W(M)) u_add1 (.a(y),  .b(M'(cnt)), .ci(x[0]), .s(s1), .co(c1));
  rca #(.W(M)) u_add2 (.a(s1), .b(CORR),    .ci(1'b0), .s(s2), .co(c2));

  always_comb begin
    wrap = c1 | c2;
    z    = wrap ? s2 : s1;
  end
endmodule

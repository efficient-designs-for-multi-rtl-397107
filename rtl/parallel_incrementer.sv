// parallel_incrementer: (N, M) parallel incrementer.
// z = (y + number of 1s among x) mod 2^M, ovf = carry out of bit M-1.
//
// Structure: an (N-1)-input combinational parallel counter (cpc) counts
// x[N-1:1]; an M-bit ripple-carry adder then adds that count to the stored
// word y, with x[0] entering as the adder's carry-in, so that all N increment
// signals are taken. The low C = cpc_width(N-1) bits of the adder are full
// adders; above them only y and the rippling carry remain, so those bits are
// half adders. The carry out of the top cell is the optional overflow output.
// This is the structure of the original design; the defaults (N = 32, M = 7)
// are its own example.
//
// END_AROUND = 1 selects the modulo-(2^M - 1) form that the original design
// also allows, by an end-around carry: the carry out of the adder is added
// back at bit 0 by a second chain of half adders (a second pass instead of a
// combinational loop, which is this implementation's choice). In that form z
// is congruent to y + ones(x) modulo 2^M - 1 and lies in 0..2^M - 1, the
// all-ones word being the second representation of zero, as usual in
// ones'-complement arithmetic; ovf is then the end-around carry.
//
// Interface: x[N-1:0], y[M-1:0] in; z[M-1:0], ovf out. Combinational.
module parallel_incrementer
  import mic_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 7,
  parameter bit          END_AROUND = 1'b0
) (
  input  logic [N-1:0] x,
  input  logic [M-1:0] y,
  output logic [M-1:0] z,
  output logic         ovf
);
  localparam int unsigned C = cpc_width(N - 1);

  if (N < 2) begin : g_bad_n
    $error("parallel_incrementer: N must be at least 2");
  end
  if (M < C) begin : g_bad_m
    $error("parallel_incrementer: M must hold the count of N-1 inputs");
  end

  logic [C-1:0] cnt;
  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .count(cnt));

  logic [M-1:0] s;
  logic [M:0]   c;
  assign c[0] = x[0];
  for (genvar j = 0; j < int'(M); j++) begin : g_bit
    if (j < int'(C)) begin : g_fa
      full_adder u_fa (.a(y[j]), .b(cnt[j]), .ci(c[j]), .s(s[j]), .co(c[j+1]));
    end else begin : g_ha
      half_adder u_ha (.a(y[j]), .b(c[j]), .s(s[j]), .co(c[j+1]));
    end
  end
  assign ovf = c[M];

  if (END_AROUND) begin : g_end_around
    // add the carry back at bit 0; this cannot carry out again, since a
    // carry leaves s below 2^C - 1 <= 2^M - 1
    logic [M:0] e;
    assign e[0] = c[M];
    for (genvar j = 0; j < int'(M); j++) begin : g_inc
      half_adder u_ha (.a(s[j]), .b(e[j]), .s(z[j]), .co(e[j+1]));
    end
    always_comb assert (e[M] == 1'b0) else $error("end-around carry overflowed");
  end else begin : g_plain
    assign z = s;
  end
endmodule

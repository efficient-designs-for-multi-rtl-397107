// accum_adder: Q-bit accumulative adder with a fixed addend of -2P.
//
// It holds one of the two offsets of the pipelined modulo-P counter. After
// reset the value is -(INIT_MULT * P) mod 2^Q (0 for the left path, -P for the
// right path); every clock edge with add = 1 adds -2P mod 2^Q, so the value
// steps through -kP for k of one parity. The value only has to change once in
// roughly P/N cycles, so a plain registered adder is enough; its constant
// addend lets synthesis simplify it further. Function and initial values
// follow the original design; the add strobe is this implementation's interface.
//
// Interface: add in, value[Q-1:0] out (registered, updated on the edge that
// samples add = 1). Reset: asynchronous, active low.
module accum_adder #(
  parameter int unsigned Q         = 16,
  parameter int unsigned P         = 1000,
  parameter int unsigned INIT_MULT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         add,
  output logic [Q-1:0] value
);
  localparam logic [Q-1:0] INIT   = Q'(-(longint'(INIT_MULT) * longint'(P)));
  localparam logic [Q-1:0] ADDEND = Q'(-(2 * longint'(P)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   value <= INIT;
    else if (add) value <= value + ADDEND;
  end
endmodule

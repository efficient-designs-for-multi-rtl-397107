// pipe_fast_adder: Q-bit adder pipelined over STAGES clock cycles, with
// carry-out (overflow) output.
//
// The operands are cut into STAGES chunks of Q/STAGES bits. Stage k adds chunk
// k of the operands, delayed by k cycles, plus the registered carry of stage
// k-1; each chunk sum is then delayed so that all chunks, and the final carry,
// leave together. A new pair of operands is accepted on every edge. The original design
// only asks for a pipelined fast adder with an overflow output; the chunked
// carry pipeline is the simplest such adder, and STAGES = 2 is this
// implementation's choice.
//
// Interface: a[Q-1:0], b[Q-1:0] in; sum[Q-1:0] = (a + b) mod 2^Q and ovf =
// carry out, both valid STAGES cycles after a and b are presented (STAGES
// register stages).
// Reset: asynchronous, active low.
module pipe_fast_adder #(
  parameter int unsigned Q      = 16,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Q-1:0] a,
  input  logic [Q-1:0] b,
  output logic [Q-1:0] sum,
  output logic         ovf
);
  localparam int unsigned CH = Q / STAGES;

  if (STAGES < 1 || Q % STAGES != 0) begin : g_bad
    $error("pipe_fast_adder: STAGES must divide Q");
  end

  // operand pipeline: opa[k] is a delayed by k cycles
  logic [Q-1:0]  opa [STAGES];
  logic [Q-1:0]  opb [STAGES];
  // carry into each stage (cq[0] = 0, later ones registered)
  logic          cq  [STAGES+1];
  // chunk results: res[k][i] is chunk i of the sum delayed by its own stage + k
  logic [CH-1:0] res [STAGES][STAGES];

  assign opa[0] = a;
  assign opb[0] = b;
  assign cq[0]  = 1'b0;

  for (genvar k = 0; k < int'(STAGES); k++) begin : g_stage
    logic [CH:0] part;
    assign part = {1'b0, opa[k][k*CH +: CH]} + {1'b0, opb[k][k*CH +: CH]} + (CH+1)'(cq[k]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cq[k+1]   <= 1'b0;
        res[k][k] <= '0;
      end else begin
        cq[k+1]   <= part[CH];
        res[k][k] <= part[CH-1:0];
      end
    end

    if (k + 1 < int'(STAGES)) begin : g_opd
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          opa[k+1] <= '0;
          opb[k+1] <= '0;
        end else begin
          opa[k+1] <= opa[k];
          opb[k+1] <= opb[k];
        end
      end
    end

    // delay chunk k's result until the last stage has finished
    for (genvar j = k + 1; j < int'(STAGES); j++) begin : g_dly
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) res[k][j] <= '0;
        else        res[k][j] <= res[k][j-1];
      end
    end
    assign sum[k*CH +: CH] = res[k][STAGES-1];
  end

  assign ovf = cq[STAGES];
endmodule

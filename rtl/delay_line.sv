// delay_line: W-bit shift register of D stages (D = 0 is a plain wire).
// Used as the "latch chains" that keep every bit of the pipelined counters on
// its computational wavefront, as in the original design. The asynchronous
// active-low reset that clears all stages is this implementation's choice.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(D); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[D-1];
  end
endmodule

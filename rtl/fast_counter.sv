// fast_counter: W-bit sequential counter holding the upper bits of a
// multi-input counter. Each clock edge on which inc is 1 adds one to count
// (mod 2^W); wrap is 1 for the cycle after an edge on which the count passed
// from all ones to zero. Its latency d is 1 cycle: the increment taken at one
// edge is visible right after it.
//
// The original design only asks for a sequential counter with small delay and leaves
// its construction open; this one is a plain binary counter, which is the
// simplest that does the job. A faster construction can replace it as long as
// it keeps the ports and d = 1 (the pipelined counter relies on that value).
//
// Reset: asynchronous, active low, clears count and wrap.
module fast_counter #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] count,
  output logic         wrap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      wrap  <= 1'b0;
    end else begin
      count <= count + W'(inc);
      wrap  <= inc & (&count);
    end
  end
endmodule

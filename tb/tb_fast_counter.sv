// tb_fast_counter: self-checking test of the sequential fast counter (4 bits,
// so that it wraps often). Random increments are compared with a counter
// model; the wrap flag must appear exactly on the edge after which the count
// went from 15 to 0, and the increment must show one edge later (d = 1).
module tb_fast_counter;
  localparam int unsigned W = 4;

  logic         clk = 1'b0, rst_n = 1'b0, inc = 1'b0;
  logic [W-1:0] count;
  logic         wrap;
  int checks = 0, failures = 0, wraps = 0;
  int model = 0;
  logic model_wrap = 1'b0;

  fast_counter #(.W(W)) u_dut (.clk(clk), .rst_n(rst_n), .inc(inc), .count(count), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk) inc = ($urandom % 4) != 0;
      @(posedge clk);
      model_wrap = inc && model == (1 << W) - 1;
      model = (model + int'(inc)) % (1 << W);
      #1;
      checks++;
      if (int'(count) != model || wrap != model_wrap) begin
        failures++;
        $display("FAIL cycle %0d count=%0d exp %0d wrap=%b exp %b", i, count, model, wrap, model_wrap);
      end
      if (wrap) wraps++;
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

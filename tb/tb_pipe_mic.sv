// tb_pipe_mic: self-checking test of the pipelined (16, 16) multi-input
// counter and of a (16, 6) instance that wraps often. First a single all-ones
// set checks the latency: the count must stay 0 for 2 log2(N) - 1 = 7 cycles
// and show 16 in the 8th. Then a random set enters every cycle and the count
// in cycle t must equal the total of the sets presented up to cycle t - 8,
// modulo 2^Q; wrap must flag each pass through zero.
module tb_pipe_mic;
  localparam int unsigned N = 16, Q = 16, Q2 = 6, LAT = 8;
  localparam int unsigned CYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  x;
  logic [Q-1:0]  count;
  logic [Q2-1:0] count2;
  logic          wrap, wrap2;
  int checks = 0, failures = 0, wraps = 0;
  longint tot [CYC];   // tot[t] = total of sets presented in cycles 0..t

  pipe_mic                  u_dut  (.clk(clk), .rst_n(rst_n), .x(x), .count(count),  .wrap(wrap));
  pipe_mic #(.N(N), .Q(Q2)) u_dut2 (.clk(clk), .rst_n(rst_n), .x(x), .count(count2), .wrap(wrap2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint total_at(int t);
    return (t < 0) ? 0 : tot[t];
  endfunction

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency: one all-ones set, then zeros
    x = '1;
    for (int k = 1; k <= int'(LAT) + 2; k++) begin
      @(posedge clk);
      #1;
      checks++;
      if (count != ((k >= int'(LAT)) ? Q'(N) : Q'(0))) begin
        failures++;
        $display("FAIL latency: %0d cycles after the set, count=%0d", k, count);
      end
      @(negedge clk) x = '0;
    end
    // reset again, then streaming random sets
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < int'(CYC); t++) begin
      x = (t < 200) ? '1 : N'($urandom);
      tot[t] = total_at(t - 1) + longint'($countones(x));
      @(posedge clk);
      #1;
      // now in cycle t+1: count holds the sets up to cycle t+1-LAT
      checks += 2;
      if (longint'(count) != total_at(t + 1 - int'(LAT)) % (64'd1 << Q)) begin
        failures++;
        $display("FAIL Q=16 cycle %0d count=%0d exp %0d", t + 1, count, total_at(t + 1 - int'(LAT)) % (64'd1 << Q));
      end
      if (longint'(count2) != total_at(t + 1 - int'(LAT)) % (64'd1 << Q2) ||
          wrap2 != ((total_at(t + 1 - int'(LAT)) >> Q2) != (total_at(t - int'(LAT)) >> Q2))) begin
        failures++;
        $display("FAIL Q=6 cycle %0d count=%0d wrap=%b", t + 1, count2, wrap2);
      end
      if (wrap2) wraps++;
      @(negedge clk);
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap seen");
    end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mic: self-checking test of the (32, 16) multi-input counter and of a
// (32, 8) instance that wraps often. Every cycle a new random input set
// enters (with phases of all-ones and all-zeros); after each edge the count
// must equal the running total of all sets taken so far, modulo 2^Q (one
// cycle of latency), and wrap must flag each pass through zero. It also counts
// how often the fast counter was incremented (the low register overflowed).
module tb_mic;
  localparam int unsigned N = 32, Q = 16, Q2 = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  x;
  logic [Q-1:0]  count;
  logic [Q2-1:0] count2;
  logic          wrap, wrap2;
  int checks = 0, failures = 0, carries = 0, wraps = 0;
  longint total = 0;

  mic                  u_dut  (.clk(clk), .rst_n(rst_n), .x(x), .count(count),  .wrap(wrap));
  mic #(.N(N), .Q(Q2)) u_dut2 (.clk(clk), .rst_n(rst_n), .x(x), .count(count2), .wrap(wrap2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      logic [Q-1:0] hi_before;
      hi_before = count >> 5;
      if (t < 100)       x = '1;
      else if (t < 150)  x = '0;
      else               x = N'($urandom) | N'($urandom);
      @(posedge clk);
      total += longint'($countones(x));
      #1;
      checks += 2;
      if (longint'(count) != total % (64'd1 << Q)) begin
        failures++;
        $display("FAIL Q=16 cycle %0d count=%0d exp %0d", t, count, total % (64'd1 << Q));
      end
      if (longint'(count2) != total % (64'd1 << Q2) ||
          wrap2 != ((total % (64'd1 << Q2)) < longint'($countones(x)))) begin
        failures++;
        $display("FAIL Q=8 cycle %0d count=%0d wrap=%b", t, count2, wrap2);
      end
      if ((count >> 5) != hi_before) carries++;
      if (wrap2) wraps++;
      @(negedge clk);
    end
    if (carries == 0 || wraps == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: carries=%0d wraps=%0d", carries, wraps);
    end
    $display("fast-counter increments=%0d wraps=%0d", carries, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

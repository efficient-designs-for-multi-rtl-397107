// tb_pipe_fast_adder: self-checking test of the pipelined adder at its
// defaults (16 bits, 2 stages) and at 12 bits, 4 stages. A new random operand
// pair enters every cycle; sum and carry must equal a + b exactly STAGES
// cycles after the operands were presented.
module tb_pipe_fast_adder;
  localparam int unsigned Q1 = 16, S1 = 2;
  localparam int unsigned Q2 = 12, S2 = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [Q1-1:0] a1, b1, s1;
  logic [Q2-1:0] a2, b2, s2;
  logic          o1, o2;
  int checks = 0, failures = 0, ovfs = 0;
  logic [Q1:0] h1 [$];
  logic [Q2:0] h2 [$];

  pipe_fast_adder                         u_dut1 (.clk(clk), .rst_n(rst_n), .a(a1), .b(b1), .sum(s1), .ovf(o1));
  pipe_fast_adder #(.Q(Q2), .STAGES(S2))  u_dut2 (.clk(clk), .rst_n(rst_n), .a(a2), .b(b2), .sum(s2), .ovf(o2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a1 = Q1'($urandom); b1 = Q1'($urandom);
      a2 = Q2'($urandom); b2 = Q2'($urandom);
      @(posedge clk);
      h1.push_back({1'b0, a1} + {1'b0, b1});
      h2.push_back({1'b0, a2} + {1'b0, b2});
      #1;
      if (h1.size() > S1) void'(h1.pop_front());
      if (h2.size() > S2) void'(h2.pop_front());
      // the output now holds the pair presented STAGES cycles ago, which is
      // the oldest of the last STAGES pairs
      if (h1.size() == S1 && i >= int'(S1)) begin
        checks++;
        if ({o1, s1} != h1[0]) begin
          failures++;
          $display("FAIL 16b/2 got %h exp %h", {o1, s1}, h1[0]);
        end
        if (o1) ovfs++;
      end
      if (h2.size() == S2 && i >= int'(S2)) begin
        checks++;
        if ({o2, s2} != h2[0]) begin
          failures++;
          $display("FAIL 12b/4 got %h exp %h", {o2, s2}, h2[0]);
        end
      end
    end
    if (ovfs == 0) begin
      failures++;
      $display("FAIL no overflow seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

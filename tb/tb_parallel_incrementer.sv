// tb_parallel_incrementer: self-checking test of the (32, 7) parallel
// incrementer. For random and corner-case x and y it checks
// {ovf, z} = y + ones(x), computed independently in the testbench. A second
// instance in the modulo-(2^7 - 1) end-around-carry form is checked for
// z = (y + ones(x)) mod 127, the all-ones word standing for zero.
module tb_parallel_incrementer;
  localparam int unsigned N = 32;
  localparam int unsigned M = 7;

  logic [N-1:0] x;
  logic [M-1:0] y, z;
  logic         ovf;
  logic [M-1:0] z1;
  logic         ovf1;
  int checks = 0, failures = 0, end_arounds = 0;

  parallel_incrementer u_dut (.x(x), .y(y), .z(z), .ovf(ovf));
  parallel_incrementer #(.N(N), .M(M), .END_AROUND(1'b1)) u_dut1 (.x(x), .y(y), .z(z1), .ovf(ovf1));

  task automatic apply(logic [N-1:0] a, logic [M-1:0] b);
    int exp_sum;
    x = a; y = b;
    #1;
    exp_sum = int'(b) + $countones(a);
    checks++;
    if ({ovf, z} != (M+1)'(exp_sum)) begin
      failures++;
      $display("FAIL x=%h y=%0d got ovf=%b z=%0d exp %0d", a, b, ovf, z, exp_sum);
    end
    checks++;
    if ((int'(z1) % 127) != exp_sum % 127 || ovf1 != (exp_sum >= 128) ||
        (z1 == '1 && exp_sum != 127)) begin
      failures++;
      $display("FAIL end-around x=%h y=%0d got z=%0d exp %0d mod 127", a, b, z1, exp_sum);
    end
    if (ovf1) end_arounds++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);         // 127 + 32: overflow
    apply('1, 7'd95);      // exactly 127
    apply('1, 7'd96);      // exactly 128
    apply(32'h1, '0);      // only the carry-in input
    for (int i = 0; i < 3000; i++) apply(N'($urandom), M'($urandom));
    if (end_arounds == 0) begin
      failures++;
      $display("FAIL end-around carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

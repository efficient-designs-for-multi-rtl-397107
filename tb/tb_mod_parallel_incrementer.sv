// tb_mod_parallel_incrementer: self-checking test of the (32, 7; 100)
// modulo-P parallel incrementer and of a (16, 5; 17) instance. For y < P and
// random x it checks z = (y + ones(x)) mod P and that wrap is 1 exactly when
// the modulus was subtracted.
module tb_mod_parallel_incrementer;
  localparam int unsigned N = 32, M = 7, P = 100;
  localparam int unsigned N2 = 16, M2 = 5, P2 = 17;

  logic [N-1:0]  x;
  logic [M-1:0]  y, z;
  logic          wrap;
  logic [N2-1:0] x2;
  logic [M2-1:0] y2, z2;
  logic          wrap2;
  int checks = 0, failures = 0, wraps = 0;

  mod_parallel_incrementer u_dut (.x(x), .y(y), .z(z), .wrap(wrap));
  mod_parallel_incrementer #(.N(N2), .M(M2), .P(P2)) u_dut2 (
    .x(x2), .y(y2), .z(z2), .wrap(wrap2)
  );

  task automatic apply(logic [N-1:0] a, int b, logic [N2-1:0] a2, int b2);
    int s1, s2;
    x = a; y = M'(b); x2 = a2; y2 = M2'(b2);
    #1;
    s1 = b + $countones(a);
    s2 = b2 + $countones(a2);
    checks += 2;
    if (int'(z) != s1 % int'(P) || wrap != (s1 >= int'(P))) begin
      failures++;
      $display("FAIL P=%0d y=%0d ones=%0d got z=%0d wrap=%b", P, b, $countones(a), z, wrap);
    end
    if (int'(z2) != s2 % int'(P2) || wrap2 != (s2 >= int'(P2))) begin
      failures++;
      $display("FAIL P=%0d y=%0d ones=%0d got z=%0d wrap=%b", P2, b2, $countones(a2), z2, wrap2);
    end
    if (wrap) wraps++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, 0, '0, 0);
    apply('1, int'(P) - 1, '1, int'(P2) - 1);   // largest sums
    apply('1, int'(P) - 32, '1, int'(P2) - 16); // exactly P
    apply('1, int'(P) - 33, '1, int'(P2) - 17); // P - 1
    // sums above 2^M: the first adder itself carries out
    for (int b = int'(P) - 32; b < int'(P); b++) apply('1, b, '1, int'(P2) - 1);
    for (int i = 0; i < 3000; i++)
      apply(N'($urandom), int'($urandom % P), N2'($urandom), int'($urandom % P2));
    if (wraps == 0) begin
      failures++;
      $display("FAIL modular reduction never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

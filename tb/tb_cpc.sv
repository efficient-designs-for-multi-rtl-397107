// tb_cpc: self-checking test of the combinational parallel counter.
// Two instances (the default 31 inputs and an unpadded-size 20-input one) get
// all-zero, all-one, one-hot and random patterns; each output is compared with
// a population count computed in the testbench.
module tb_cpc;
  localparam int unsigned N1 = 31;
  localparam int unsigned N2 = 20;

  logic [N1-1:0] x1;
  logic [N2-1:0] x2;
  logic [4:0]    c1, c2;
  int checks = 0, failures = 0;

  cpc           u_dut1 (.x(x1), .count(c1));
  cpc #(.N(N2)) u_dut2 (.x(x2), .count(c2));

  function automatic int ones(logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic apply(logic [N1-1:0] a, logic [N2-1:0] b);
    x1 = a; x2 = b;
    #1;
    checks += 2;
    if (int'(c1) != ones(64'(a))) begin
      failures++;
      $display("FAIL cpc31 x=%h got %0d exp %0d", a, c1, ones(64'(a)));
    end
    if (int'(c2) != ones(64'(b))) begin
      failures++;
      $display("FAIL cpc20 x=%h got %0d exp %0d", b, c2, ones(64'(b)));
    end
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
    apply('1, '1);
    for (int i = 0; i < int'(N1); i++) apply(N1'(1) << i, N2'(1) << (i % N2));
    for (int i = 0; i < 2000; i++) apply(N1'($urandom), N2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

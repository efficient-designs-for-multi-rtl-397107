// tb_accum_adder: self-checking test of the accumulative adder. The right-path
// instance (initial value -P) and the left-path one (initial value 0) are
// stepped at random; after k steps each value must be -(INIT + 2k)P mod 2^Q.
module tb_accum_adder;
  localparam int unsigned Q = 16, P = 1000;

  logic         clk = 1'b0, rst_n = 1'b0, add_l = 1'b0, add_r = 1'b0;
  logic [Q-1:0] val_l, val_r;
  int checks = 0, failures = 0;
  longint k_l = 0, k_r = 0;

  accum_adder #(.Q(Q), .P(P), .INIT_MULT(0)) u_left  (.clk(clk), .rst_n(rst_n), .add(add_l), .value(val_l));
  accum_adder #(.Q(Q), .P(P), .INIT_MULT(1)) u_right (.clk(clk), .rst_n(rst_n), .add(add_r), .value(val_r));

  always #5 clk = ~clk;

  function automatic logic [Q-1:0] expect_val(longint m);
    longint v = -m * longint'(P);
    return Q'(v);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1;
    checks += 2;
    if (val_l != expect_val(0) || val_r != expect_val(1)) begin
      failures++;
      $display("FAIL reset values %h %h", val_l, val_r);
    end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      add_l = $urandom % 2;
      add_r = $urandom % 3 == 0;
      @(posedge clk);
      k_l += longint'(add_l);
      k_r += longint'(add_r);
      #1;
      checks += 2;
      if (val_l != expect_val(2 * k_l)) begin
        failures++;
        $display("FAIL left after %0d steps: %h", k_l, val_l);
      end
      if (val_r != expect_val(1 + 2 * k_r)) begin
        failures++;
        $display("FAIL right after %0d steps: %h", k_r, val_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

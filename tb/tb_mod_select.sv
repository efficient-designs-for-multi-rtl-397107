// tb_mod_select: self-checking test of the control logic and multiplexer of
// the modular counter, in a testbench model of its surroundings. The model
// keeps a true total T that grows by 0..16 per cycle, the intermediate count
// C = T mod 2^8 with its wrap flag, and the two offsets A (from 0) and
// B (from -P) that step by -2P whenever mod_select strobes add_left or
// add_right; it forms the two path results and carries without pipelining.
// The registered count must equal T mod P of the previous cycle, every cycle.
// Path switches in both directions and wraps of C are counted.
module tb_mod_select;
  localparam int unsigned Q = 8, P = 100, SETTLE = 3, NMAX = 16;
  localparam int unsigned CYC = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [Q-1:0] r_left, r_right, count;
  logic         ovf_left, ovf_right, ovf_c, add_left, add_right, sel;
  int checks = 0, failures = 0, to_right = 0, to_left = 0, c_wraps = 0;
  longint total = 0, total_prev = 0;
  logic [Q-1:0] a_val, b_val, c_val;

  mod_select #(.Q(Q), .SETTLE(SETTLE)) u_dut (
    .clk(clk), .rst_n(rst_n), .r_left(r_left), .r_right(r_right),
    .ovf_left(ovf_left), .ovf_right(ovf_right), .ovf_c(ovf_c),
    .count(count), .add_left(add_left), .add_right(add_right), .sel(sel)
  );

  always #5 clk = ~clk;

  // accumulative adders of the surroundings
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_val <= '0;
      b_val <= Q'(-longint'(P));
    end else begin
      if (add_left)  a_val <= a_val - Q'(2 * P);
      if (add_right) b_val <= b_val - Q'(2 * P);
    end
  end

  always_comb begin
    {ovf_left,  r_left}  = {1'b0, c_val} + {1'b0, a_val};
    {ovf_right, r_right} = {1'b0, c_val} + {1'b0, b_val};
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sel_before;
    c_val = '0; ovf_c = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < int'(CYC); t++) begin
      int step;
      step = int'($urandom % (NMAX + 1));
      total_prev = total;
      total += longint'(step);
      c_val = Q'(total);
      ovf_c = (total >> Q) != (total_prev >> Q);
      if (ovf_c) c_wraps++;
      sel_before = sel;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(count) != total % longint'(P)) begin
        failures++;
        $display("FAIL cycle %0d T=%0d count=%0d exp %0d", t, total, count, total % longint'(P));
      end
      if (sel && !sel_before) to_right++;
      if (!sel && sel_before) to_left++;
      @(negedge clk);
    end
    if (to_right == 0 || to_left == 0 || c_wraps == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("switches to right=%0d to left=%0d C wraps=%0d", to_right, to_left, c_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

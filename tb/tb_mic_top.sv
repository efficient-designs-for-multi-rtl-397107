// tb_mic_top: end-to-end test of the whole design at its default sizes.
// All three counters run together for 14000 cycles with their own random
// inputs:
//  * the (32, 16) counter: count must equal the running total mod 2^16 one
//    cycle after each set;
//  * the (32, 7; 100) modulo-P incrementer: its y input is fed back from its
//    own output through a testbench register, so it works as a modulo-100
//    counter, checked against the running total mod 100;
//  * the pipelined (16, 16; 1000) modular counter: count checked against the
//    total mod 1000 eleven cycles later, raw_count against the total mod 2^16
//    eight cycles later.
// Each mechanism must occur at least once: low-register overflow into the
// fast counter, wrap of the 16-bit count, modular reduction in the
// incrementer, path switches in both directions (each one also steps an
// accumulative adder), and wrap of the pipelined counter's 16-bit count.
module tb_mic_top;
  localparam int unsigned CYC = 14000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] mic_x, inc_x;
  logic [15:0] mic_count, pm_count, pm_raw_count;
  logic        mic_wrap, inc_wrap, pm_raw_wrap, pm_path;
  logic [6:0]  inc_y, inc_z;
  logic [15:0] pm_x;

  int checks = 0, failures = 0;
  int n_fc_inc = 0, n_mic_wrap = 0, n_inc_wrap = 0, n_to_right = 0, n_to_left = 0, n_pm_wrap = 0;
  longint mic_total = 0, inc_total = 0;
  longint pm_tot [CYC];

  mic_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .mic_x(mic_x), .mic_count(mic_count), .mic_wrap(mic_wrap),
    .inc_x(inc_x), .inc_y(inc_y), .inc_z(inc_z), .inc_wrap(inc_wrap),
    .pm_x(pm_x), .pm_count(pm_count), .pm_raw_count(pm_raw_count),
    .pm_raw_wrap(pm_raw_wrap), .pm_path(pm_path)
  );

  always #5 clk = ~clk;

  // modulo-100 counter around the combinational incrementer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inc_y <= '0;
    else        inc_y <= inc_z;
  end

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint pm_at(int t);
    return (t < 0) ? 0 : pm_tot[t];
  endfunction

  initial begin
    logic [10:0] hi_before;
    logic        path_before;
    mic_x = '0; inc_x = '0; pm_x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < int'(CYC); t++) begin
      mic_x = $urandom | $urandom;
      inc_x = $urandom;
      pm_x  = 16'($urandom) | 16'($urandom);
      pm_tot[t] = pm_at(t - 1) + longint'($countones(pm_x));
      hi_before   = mic_count[15:5];
      path_before = pm_path;
      // combinational incrementer, checked before the edge
      #1;
      checks++;
      if (longint'(inc_z) != (inc_total + longint'($countones(inc_x))) % 100 ||
          inc_wrap != ((inc_total % 100) + longint'($countones(inc_x)) >= 100)) begin
        failures++;
        $display("FAIL incrementer cycle %0d z=%0d", t, inc_z);
      end
      if (inc_wrap) n_inc_wrap++;
      @(posedge clk);
      mic_total += longint'($countones(mic_x));
      inc_total += longint'($countones(inc_x));
      #1;
      checks += 3;
      if (longint'(mic_count) != mic_total % 65536) begin
        failures++;
        $display("FAIL mic cycle %0d count=%0d exp %0d", t, mic_count, mic_total % 65536);
      end
      if (longint'(pm_count) != pm_at(t + 1 - 11) % 1000) begin
        failures++;
        $display("FAIL pipelined modular cycle %0d count=%0d exp %0d", t + 1, pm_count, pm_at(t + 1 - 11) % 1000);
      end
      if (longint'(pm_raw_count) != pm_at(t + 1 - 8) % 65536) begin
        failures++;
        $display("FAIL pipelined raw cycle %0d count=%0d", t + 1, pm_raw_count);
      end
      if (mic_count[15:5] != hi_before) n_fc_inc++;
      if (mic_wrap) n_mic_wrap++;
      if (pm_path && !path_before) n_to_right++;
      if (!pm_path && path_before) n_to_left++;
      if (pm_raw_wrap) n_pm_wrap++;
      @(negedge clk);
    end
    $display("fast-counter increments=%0d mic wraps=%0d incrementer reductions=%0d",
             n_fc_inc, n_mic_wrap, n_inc_wrap);
    $display("path switches to right=%0d to left=%0d pipelined count wraps=%0d",
             n_to_right, n_to_left, n_pm_wrap);
    if (n_fc_inc == 0)   begin failures++; $display("FAIL no fast-counter increment"); end
    if (n_mic_wrap == 0) begin failures++; $display("FAIL no wrap of the (32,16) counter"); end
    if (n_inc_wrap == 0) begin failures++; $display("FAIL no modular reduction"); end
    if (n_to_right == 0) begin failures++; $display("FAIL no switch to the right path"); end
    if (n_to_left == 0)  begin failures++; $display("FAIL no switch to the left path"); end
    if (n_pm_wrap == 0)  begin failures++; $display("FAIL no wrap of the pipelined count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

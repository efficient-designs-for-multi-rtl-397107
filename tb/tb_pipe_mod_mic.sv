// tb_pipe_mod_mic: self-checking test of the pipelined modular counter with
// N = 16, Q = 8, P = 100, so that the 8-bit intermediate count wraps and the
// two paths alternate often. A random set enters every cycle (sparse, dense,
// all-ones and all-zero phases); in cycle t, count must equal the total of the
// sets presented up to cycle t - 11, modulo P, and raw_count the total up to
// t - 8 modulo 2^8. Path switches in both directions and raw wraps are
// counted and must all occur.
module tb_pipe_mod_mic;
  localparam int unsigned N = 16, Q = 8, P = 100, LAT_RAW = 8, LAT = 11;
  localparam int unsigned CYC = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] x;
  logic [Q-1:0] count, raw_count;
  logic         raw_wrap, path;
  int checks = 0, failures = 0, to_right = 0, to_left = 0, wraps = 0;
  longint tot [CYC];

  pipe_mod_mic #(.N(N), .Q(Q), .P(P)) u_dut (
    .clk(clk), .rst_n(rst_n), .x(x), .count(count),
    .raw_count(raw_count), .raw_wrap(raw_wrap), .path(path)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint total_at(int t);
    return (t < 0) ? 0 : tot[t];
  endfunction

  initial begin
    logic path_before;
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < int'(CYC); t++) begin
      case ((t / 500) % 4)
        0: x = N'($urandom);
        1: x = N'($urandom) | N'($urandom) | N'($urandom);
        2: x = ((t % 100) < 50) ? '1 : '0;
        default: x = N'($urandom) & N'($urandom);
      endcase
      tot[t] = total_at(t - 1) + longint'($countones(x));
      path_before = path;
      @(posedge clk);
      #1;
      checks += 2;
      if (longint'(count) != total_at(t + 1 - int'(LAT)) % longint'(P)) begin
        failures++;
        $display("FAIL cycle %0d count=%0d exp %0d", t + 1, count, total_at(t + 1 - int'(LAT)) % longint'(P));
      end
      if (longint'(raw_count) != total_at(t + 1 - int'(LAT_RAW)) % (64'd1 << Q)) begin
        failures++;
        $display("FAIL cycle %0d raw_count=%0d", t + 1, raw_count);
      end
      if (path && !path_before) to_right++;
      if (!path && path_before) to_left++;
      if (raw_wrap) wraps++;
      @(negedge clk);
    end
    if (to_right == 0 || to_left == 0 || wraps == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("switches to right=%0d to left=%0d raw wraps=%0d", to_right, to_left, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

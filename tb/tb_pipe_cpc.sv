// tb_pipe_cpc: self-checking test of the pipelined 15-input counter tree
// (K = 4) and of a 7-input one (K = 3). A new random input set enters every
// cycle; output bit j must equal bit j of the population count of the set
// presented (K-1)+j cycles earlier, which checks both the sums and the skew of
// one cycle per bit.
module tb_pipe_cpc;
  localparam int unsigned K1 = 4, K2 = 3;
  localparam int unsigned CYC = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [(1<<K1)-2:0] x1;
  logic [(1<<K2)-2:0] x2;
  logic [K1-1:0] c1;
  logic [K2-1:0] c2;
  int checks = 0, failures = 0;
  int pc1 [CYC], pc2 [CYC];

  pipe_cpc                u_dut1 (.clk(clk), .rst_n(rst_n), .x(x1), .count(c1));
  pipe_cpc #(.K(K2))      u_dut2 (.clk(clk), .rst_n(rst_n), .x(x2), .count(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = '0; x2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < int'(CYC); t++) begin
      // cycle t: present set t
      x1 = (t % 50 == 7) ? '1 : ((1<<K1)-1)'($urandom);
      x2 = ((1<<K2)-1)'($urandom);
      pc1[t] = $countones(x1);
      pc2[t] = $countones(x2);
      @(posedge clk);
      #1;
      // now in cycle t+1
      for (int j = 0; j < int'(K1); j++) begin
        int src;
        src = t + 1 - (int'(K1) - 1 + j);
        if (src >= 0) begin
          checks++;
          if (c1[j] != 1'((pc1[src] >> j) & 1)) begin
            failures++;
            $display("FAIL K=4 cycle %0d bit %0d", t + 1, j);
          end
        end
      end
      for (int j = 0; j < int'(K2); j++) begin
        int src;
        src = t + 1 - (int'(K2) - 1 + j);
        if (src >= 0) begin
          checks++;
          if (c2[j] != 1'((pc2[src] >> j) & 1)) begin
            failures++;
            $display("FAIL K=3 cycle %0d bit %0d", t + 1, j);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

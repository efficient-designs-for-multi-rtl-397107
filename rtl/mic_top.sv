// mic_top: the three multi-input counter designs side by side, each with its
// own ports and sharing only clock and reset.
//
//  * mic_*  : (32, 16) multi-input counter. A (32, 5) parallel incrementer
//             with a 5-bit register keeps the low count bits; its overflow
//             drives an 11-bit fast counter. The count includes the inputs
//             from the cycle after they are presented.
//  * inc_*  : (32, 7; 100) modulo-P parallel incrementer, combinational:
//             inc_z = (inc_y + ones(inc_x)) mod 100 for inc_y < 100.
//  * pm_*   : pipelined (16, 16; 1000) modular multi-input counter.
//             pm_count = total mod 1000, 11 cycles after the inputs were
//             presented; pm_raw_count = total mod 2^16 from its pipelined
//             (16, 16) counter, 8 cycles after the inputs.
//
// N = 32 for the first two and N = 16 for the pipelined counter are the sizes
// of the original design's own examples; Q = 16 and both moduli are this
// implementation's choices. Reset: asynchronous, active low.
module mic_top #(
  parameter int unsigned MIC_N  = 32,
  parameter int unsigned MIC_Q  = 16,
  parameter int unsigned INC_N  = 32,
  parameter int unsigned INC_M  = 7,
  parameter int unsigned INC_P  = 100,
  parameter int unsigned PM_N   = 16,
  parameter int unsigned PM_Q   = 16,
  parameter int unsigned PM_P   = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  // (N, Q) multi-input counter
  input  logic [MIC_N-1:0]  mic_x,
  output logic [MIC_Q-1:0]  mic_count,
  output logic              mic_wrap,
  // modulo-P parallel incrementer
  input  logic [INC_N-1:0]  inc_x,
  input  logic [INC_M-1:0]  inc_y,
  output logic [INC_M-1:0]  inc_z,
  output logic              inc_wrap,
  // pipelined modular multi-input counter
  input  logic [PM_N-1:0]   pm_x,
  output logic [PM_Q-1:0]   pm_count,
  output logic [PM_Q-1:0]   pm_raw_count,
  output logic              pm_raw_wrap,
  output logic              pm_path
);
  mic #(.N(MIC_N), .Q(MIC_Q)) u_mic (
    .clk(clk), .rst_n(rst_n), .x(mic_x), .count(mic_count), .wrap(mic_wrap)
  );

  mod_parallel_incrementer #(.N(INC_N), .M(INC_M), .P(INC_P)) u_inc (
    .x(inc_x), .y(inc_y), .z(inc_z), .wrap(inc_wrap)
  );

  pipe_mod_mic #(.N(PM_N), .Q(PM_Q), .P(PM_P)) u_pm (
    .clk(clk), .rst_n(rst_n), .x(pm_x), .count(pm_count),
    .raw_count(pm_raw_count), .raw_wrap(pm_raw_wrap), .path(pm_path)
  );
endmodule

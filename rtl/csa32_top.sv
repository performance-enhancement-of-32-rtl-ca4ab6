// csa32_top: the four 32-bit carry select adder variants side by side.
//
// All four share the operand inputs and the clock, and each brings out its
// own result, so they can be compared cycle by cycle:
//   reg_*  - csa32_reg : plain register-to-register adder, 2-cycle latency.
//   ccg_*  - csa32_ccg : same with common (latch + AND) clock gating, driven
//                        by en; 2-cycle latency, holds while en is low.
//   ecg_*  - csa32_ecg : same with enhanced clock gating (clock only when en
//                        is high and a bit changes); behaves like csa32_ccg.
//   pipe_* - csa32_pipe: two parallel half-rate pipelines of 8-bit segment
//                        adders; result PATHS*W/SEG cycles later, with
//                        pipe_valid marking it.
// FA selects the full-adder cell used in every ripple carry adder inside
// (design 2, the minority-based cell, by default). Running the four variants
// together in one top is this design's choice, made so that one simulation
// exercises every one of them.
module csa32_top #(
  parameter int                  W     = 32,
  parameter int                  BW    = 4,
  parameter int                  SEG   = 8,
  parameter int                  PATHS = 2,
  parameter csa_pkg::fa_design_e FA    = csa_pkg::FA_MINORITY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] reg_sum,
  output logic         reg_cout,
  output logic [W-1:0] ccg_sum,
  output logic         ccg_cout,
  output logic [W-1:0] ecg_sum,
  output logic         ecg_cout,
  output logic         pipe_valid,
  output logic [W-1:0] pipe_sum,
  output logic         pipe_cout
);
  csa32_reg #(.W(W), .BW(BW), .FA(FA)) u_reg (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin),
    .sum(reg_sum), .cout(reg_cout)
  );

  csa32_ccg #(.W(W), .BW(BW), .FA(FA)) u_ccg (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .cin(cin),
    .sum(ccg_sum), .cout(ccg_cout)
  );

  csa32_ecg #(.W(W), .BW(BW), .FA(FA)) u_ecg (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .cin(cin),
    .sum(ecg_sum), .cout(ecg_cout)
  );

  csa32_pipe #(.W(W), .SEG(SEG), .BW(BW), .PATHS(PATHS), .FA(FA)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(pipe_valid), .sum(pipe_sum), .cout(pipe_cout)
  );
endmodule

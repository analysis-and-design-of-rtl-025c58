// r2r_fir_bank: the five benchmark filters G1, Y1, Y2, A1 and L2.
//
// Each output is one complete radix-2^r multiplierless FIR filter (r2r_fir)
// fed by the same input sample stream, so the five designs can be simulated
// and synthesised together and compared. They share nothing but clock, reset
// and input; each output has the width that filter needs.
//
//   filter  taps  output width (XW = 8)
//   G1      16    21
//   Y1      30    22
//   Y2      34    23
//   A1      59    23
//   L2      63    22
//
// Interface: x, one signed XW-bit sample per clock; y_g1..y_l2 signed outputs.
// Timing: as r2r_fir; a step on x settles on each output after as many clock
// edges as that filter has taps. rst_n is asynchronous and active low.
module r2r_fir_bank
  import r2r_pkg::*;
#(
  parameter int XW    = X_WIDTH,
  parameter int YW_G1 = y_width(FILT_G1, XW),
  parameter int YW_Y1 = y_width(FILT_Y1, XW),
  parameter int YW_Y2 = y_width(FILT_Y2, XW),
  parameter int YW_A1 = y_width(FILT_A1, XW),
  parameter int YW_L2 = y_width(FILT_L2, XW)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    x,
  output logic signed [YW_G1-1:0] y_g1,
  output logic signed [YW_Y1-1:0] y_y1,
  output logic signed [YW_Y2-1:0] y_y2,
  output logic signed [YW_A1-1:0] y_a1,
  output logic signed [YW_L2-1:0] y_l2
);

  r2r_fir #(.FILT(FILT_G1), .XW(XW), .YW(YW_G1)) u_g1 (.clk, .rst_n, .x, .y(y_g1));
  r2r_fir #(.FILT(FILT_Y1), .XW(XW), .YW(YW_Y1)) u_y1 (.clk, .rst_n, .x, .y(y_y1));
  r2r_fir #(.FILT(FILT_Y2), .XW(XW), .YW(YW_Y2)) u_y2 (.clk, .rst_n, .x, .y(y_y2));
  r2r_fir #(.FILT(FILT_A1), .XW(XW), .YW(YW_A1)) u_a1 (.clk, .rst_n, .x, .y(y_a1));
  r2r_fir #(.FILT(FILT_L2), .XW(XW), .YW(YW_L2)) u_l2 (.clk, .rst_n, .x, .y(y_l2));

endmodule

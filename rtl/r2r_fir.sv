// r2r_fir: one power-efficient multiplierless linear-phase FIR filter.
//
// The filter is a transposed direct form whose coefficient multipliers are
// replaced by shift-and-add logic derived from the radix-2^r recoding of the
// coefficients. The radix was chosen per filter for the smallest adder depth,
// which keeps glitching (and so switching power) low. The chain is
//   x -> r2r_mcm       multiplier block adders: odd fundamentals m*x
//     -> r2r_fund_regs registers for fundamentals (low-power technique)
//     -> r2r_products  shifted sums of fundamentals: h(u)*x for each distinct u
//     -> r2r_pab       structural adders and delays of the transposed form -> y
// Which filter is built is chosen with FILT (G1, Y1, Y2, A1 or L2).
// The chain, the recodings and the registering of all fundamentals follow the
// published design; the input width, the output width rule and the reset are
// this design's choices.
//
// Interface: one signed XW-bit sample x per clock; y is the YW-bit signed
// output, wide enough that it never overflows.
// Timing: a sample is taken at a rising edge; the h(0) term of its response
// appears on y right after that edge and the h(L-1) term L-1 clocks later, so
// a step at the input settles on y after L clock edges (L = number of taps).
// rst_n is asynchronous and active low.
module r2r_fir
  import r2r_pkg::*;
#(
  parameter filt_e FILT = FILT_A1,
  parameter int    XW   = X_WIDTH,
  parameter int    YW   = y_width(FILT, XW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  localparam int TAPS = filt_taps(FILT);
  localparam int NU   = filt_unique(FILT);
  localparam int NF   = filt_nfund(FILT);
  localparam int FW   = fund_width(FILT, XW);

  logic signed [FW-1:0] fund     [NF];
  logic signed [FW-1:0] fund_reg [NF];
  logic signed [YW-1:0] prod     [NU];

  r2r_mcm #(.FILT(FILT), .XW(XW), .NF(NF), .FW(FW)) u_mcm (
    .x    (x),
    .fund (fund)
  );

  r2r_fund_regs #(.N(NF), .W(FW)) u_fund_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (fund),
    .q     (fund_reg)
  );

  r2r_products #(.FILT(FILT), .XW(XW), .NF(NF), .FW(FW), .NU(NU), .PW(YW)) u_products (
    .fund (fund_reg),
    .p    (prod)
  );

  r2r_pab #(.TAPS(TAPS), .NU(NU), .PW(YW)) u_pab (
    .clk   (clk),
    .rst_n (rst_n),
    .p     (prod),
    .y     (y)
  );

endmodule

// r2r_mcm: multiplier block of one radix-2^r multiplierless FIR filter.
//
// Computes every odd positive fundamental m*x the filter's coefficient
// recodings need, from the input sample x, with shifts and adders only. Each
// fundamental is one adder/subtractor fed by two earlier fundamentals:
// m = a<<a_sh +/- b<<b_sh (for example 7x = (x<<3) - x, 23x = 15x + (x<<3)).
// The list per filter comes from r2r_pkg; fund[0] is x itself.
//
// Interface: x (signed, XW bits) in, fund[0..NF-1] (signed, FW bits) out.
// Timing: purely combinational; the registers that follow it are in
// r2r_fund_regs. The fundamentals are the published ones; where a recoding
// uses a fundamental whose construction is not given, it is built with one
// adder (see r2r_pkg).
module r2r_mcm
  import r2r_pkg::*;
#(
  parameter filt_e FILT = FILT_A1,
  parameter int    XW   = X_WIDTH,
  parameter int    NF   = filt_nfund(FILT),
  parameter int    FW   = fund_width(FILT, XW)
) (
  input  logic signed [XW-1:0] x,
  output logic signed [FW-1:0] fund [NF]
);

  logic signed [FW-1:0] f [NF];

  assign f[0] = FW'(x);

  for (genvar i = 1; i < NF; i++) begin : g_fund
    localparam int VAL  = fund_field(FILT, i, 0);
    localparam int A    = fund_index(FILT, fund_field(FILT, i, 1));
    localparam int ASH  = fund_field(FILT, i, 2);
    localparam int BV   = fund_field(FILT, i, 3);
    localparam int B    = fund_index(FILT, abs_int(BV));
    localparam int BSH  = fund_field(FILT, i, 4);

    // Operands must be earlier fundamentals and must add up to VAL.
    if (A < 0 || A >= i || B < 0 || B >= i ||
        (fund_field(FILT, i, 1) << ASH) + (BV << BSH) != VAL)
    begin : g_bad
      $error("r2r_mcm: bad fundamental definition %0d for filter %0d", i, FILT);
    end

    if (BV < 0) begin : g_sub
      assign f[i] = (f[A] <<< ASH) - (f[B] <<< BSH);
    end else begin : g_add
      assign f[i] = (f[A] <<< ASH) + (f[B] <<< BSH);
    end
  end

  assign fund = f;

endmodule

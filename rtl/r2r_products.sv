// r2r_products: coefficient-input products from the registered fundamentals.
//
// For every distinct coefficient h(u) of the filter it forms
//   p[u] = h(u) * x = sum_t (-1)^s_t * (m_t * x) << k_t,
// the radix-2^r form of the coefficient: at most three signed, hard-wired
// shifts of fundamentals m_t * x, so at most two adders per coefficient.
// Shifts are wiring; signs become subtractions. A zero coefficient gives a
// constant zero product. The recoding of each coefficient comes from r2r_pkg;
// an elaboration-time check rejects a recoding that does not add up to its
// coefficient.
//
// Interface: fund[0..NF-1] (FW bits, fund[0] = x) in, p[0..NU-1] (PW bits) out.
// Timing: combinational.
module r2r_products
  import r2r_pkg::*;
#(
  parameter filt_e FILT = FILT_A1,
  parameter int    XW   = X_WIDTH,
  parameter int    NF   = filt_nfund(FILT),
  parameter int    FW   = fund_width(FILT, XW),
  parameter int    NU   = filt_unique(FILT),
  parameter int    PW   = y_width(FILT, XW)
) (
  input  logic signed [FW-1:0] fund [NF],
  output logic signed [PW-1:0] p    [NU]
);

  for (genvar u = 0; u < NU; u++) begin : g_coef
    logic signed [PW-1:0] term [MAX_TERMS];

    for (genvar t = 0; t < MAX_TERMS; t++) begin : g_term
      localparam int M   = term_mult(FILT, u, t);
      localparam int SH  = term_shift(FILT, u, t);
      localparam int IDX = fund_index(FILT, abs_int(M));

      if (M == 0) begin : g_none
        assign term[t] = '0;
      end else begin : g_used
        if (IDX < 0 || IDX >= NF) begin : g_bad
          $error("r2r_products: fundamental %0d missing for filter %0d", M, FILT);
        end
        if (M < 0) begin : g_neg
          assign term[t] = -(PW'(fund[IDX]) <<< SH);
        end else begin : g_pos
          assign term[t] = PW'(fund[IDX]) <<< SH;
        end
      end
    end

    if (term_mult(FILT, u, 0) * (1 << term_shift(FILT, u, 0)) +
        term_mult(FILT, u, 1) * (1 << term_shift(FILT, u, 1)) +
        term_mult(FILT, u, 2) * (1 << term_shift(FILT, u, 2)) != coef_unique(FILT, u))
    begin : g_check
      $error("r2r_products: recoding of coefficient %0d of filter %0d is wrong", u, FILT);
    end

    assign p[u] = term[0] + term[1] + term[2];
  end

endmodule

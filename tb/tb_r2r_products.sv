// tb_r2r_products: checks the coefficient products of all five filters.
//
// For each filter the fundamentals m*x of a test sample x are computed here
// and applied to r2r_products; every product p[u] must equal h(u)*x, with
// h(u) the filter's coefficient value (not its recoding). Extreme samples and
// random ones are used. It also checks that the adder depth of each filter's
// shift-and-add logic stays within the bound given for its recoding: 3 adders
// in series for G1, Y1, Y2 and A1, and 4 for L2.
module tb_r2r_products;
  import r2r_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic signed [X_WIDTH-1:0] x;
  logic                      tick = 1'b0;

  for (genvar g = 0; g < 5; g++) begin : g_f
    localparam filt_e F  = filt_e'(g);
    localparam int    NF = filt_nfund(F);
    localparam int    FW = fund_width(F, X_WIDTH);
    localparam int    NU = filt_unique(F);
    localparam int    PW = y_width(F, X_WIDTH);

    logic signed [FW-1:0] fund [NF];
    logic signed [PW-1:0] p    [NU];

    always_comb
      for (int i = 0; i < NF; i++) fund[i] = FW'(fund_field(F, i, 0) * int'(x));

    r2r_products #(.FILT(F)) dut (.fund(fund), .p(p));

    initial begin
      int bound;
      bound = (g == 4) ? 4 : 3;
      checks++;
      if (filt_adder_depth(F) > bound || filt_adder_depth(F) < 1) begin
        failures++;
        $display("FAIL filter %0d: adder depth %0d, bound %0d", g, filt_adder_depth(F), bound);
      end
    end

    always @(posedge tick) begin
      for (int u = 0; u < NU; u++) begin
        longint exp_v;
        exp_v = longint'(coef_unique(F, u)) * longint'(x);
        checks++;
        if (longint'(p[u]) != exp_v) begin
          failures++;
          $display("FAIL filter %0d x=%0d h(%0d)=%0d: got %0d expected %0d",
                   g, x, u, coef_unique(F, u), p[u], exp_v);
        end
      end
    end
  end

  initial begin
    #1;
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: x = '0;
        1: x = 8'sh7f;
        2: x = 8'sh80;
        3: x = 8'sh01;
        default: x = X_WIDTH'($urandom);
      endcase
      #5 tick = 1'b1;
      #5 tick = 1'b0;
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

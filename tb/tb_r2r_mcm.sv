// tb_r2r_mcm: checks the multiplier block of all five filters.
//
// Drives the extreme and many random input samples into one r2r_mcm per
// filter and compares every fundamental with value * x computed here with an
// ordinary multiplication. It also checks that each block provides exactly
// the odd fundamentals listed for its filter.
module tb_r2r_mcm;
  import r2r_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic signed [X_WIDTH-1:0] x;
  logic                      tick = 1'b0;

  // Odd fundamentals of each filter (besides x itself), in sorted order.
  function automatic int expected_fund(int f, int i);
    int t [5][7] = '{'{3, 5, 7, 0, 0, 0, 0},
                     '{3, 13, 15, 17, 23, 0, 0},
                     '{3, 5, 9, 11, 15, 0, 0},
                     '{3, 5, 7, 0, 0, 0, 0},
                     '{3, 5, 9, 11, 13, 15, 0}};
    return t[f][i];
  endfunction

  for (genvar g = 0; g < 5; g++) begin : g_f
    localparam filt_e F  = filt_e'(g);
    localparam int    NF = filt_nfund(F);
    localparam int    FW = fund_width(F, X_WIDTH);

    logic signed [FW-1:0] fund [NF];

    r2r_mcm #(.FILT(F)) dut (.x(x), .fund(fund));

    initial begin
      int n;
      n = 0;
      for (int i = 0; i < 7; i++) if (expected_fund(g, i) != 0) n++;
      checks++;
      if (NF != n + 1) begin
        failures++;
        $display("FAIL filter %0d: %0d fundamentals, expected %0d", g, NF, n + 1);
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (fund_index(F, expected_fund(g, i)) < 1) begin
          failures++;
          $display("FAIL filter %0d: fundamental %0d missing", g, expected_fund(g, i));
        end
      end
    end

    always @(posedge tick) begin
      for (int i = 0; i < NF; i++) begin
        longint exp_v;
        exp_v = longint'(fund_field(F, i, 0)) * longint'(x);
        checks++;
        if (longint'(fund[i]) != exp_v) begin
          failures++;
          $display("FAIL filter %0d x=%0d fund %0d*x: got %0d expected %0d",
                   g, x, fund_field(F, i, 0), fund[i], exp_v);
        end
      end
    end
  end

  initial begin
    #1;
    for (int n = 0; n < 600; n++) begin
      case (n)
        0: x = '0;
        1: x = 8'sh7f;
        2: x = 8'sh80;
        3: x = 8'sh01;
        4: x = -8'sh01;
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

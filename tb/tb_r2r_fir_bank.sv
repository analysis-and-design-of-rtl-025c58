// tb_r2r_fir_bank: end-to-end test of the five benchmark filters.
//
// Runs the top level with its default parameters. One input stream feeds all
// five filters; every cycle each output is compared with a direct-form
// reference convolution y(n) = sum_k h(k) x(n-k) computed here from the
// coefficient values. The stream is built from phases that exercise:
//   impulse   - a single unit sample: the output must replay h(0)..h(L-1);
//   step      - a held full-scale negative sample: the output must settle to
//               -128 * sum h(k) exactly L clock edges after the step, the
//               latency of a filter with L taps;
//   worst     - x(n-k) = +127 or -128 by the sign of h(k): the largest output
//               magnitude must come out without overflow;
//   reset     - an asynchronous reset in the middle of a stream must clear
//               every delay line;
//   random    - random samples.
// Each mechanism is counted per filter, and one that never happened counts
// as a failure.
module tb_r2r_fir_bank;
  import r2r_pkg::*;

  localparam int NFILT = 5;

  int checks   = 0;
  int failures = 0;
  int n_impulse [NFILT];
  int n_settle  [NFILT];
  int n_worst   [NFILT];
  int n_reset   [NFILT];

  logic                      clk = 1'b0;
  logic                      rst_n;
  logic signed [X_WIDTH-1:0] x;

  logic signed [y_width(FILT_G1, X_WIDTH)-1:0] y_g1;
  logic signed [y_width(FILT_Y1, X_WIDTH)-1:0] y_y1;
  logic signed [y_width(FILT_Y2, X_WIDTH)-1:0] y_y2;
  logic signed [y_width(FILT_A1, X_WIDTH)-1:0] y_a1;
  logic signed [y_width(FILT_L2, X_WIDTH)-1:0] y_l2;
  longint yv [NFILT];

  r2r_fir_bank dut (
    .clk (clk), .rst_n (rst_n), .x (x),
    .y_g1 (y_g1), .y_y1 (y_y1), .y_y2 (y_y2), .y_a1 (y_a1), .y_l2 (y_l2)
  );

  always_comb begin
    yv[0] = longint'(y_g1);
    yv[1] = longint'(y_y1);
    yv[2] = longint'(y_y2);
    yv[3] = longint'(y_a1);
    yv[4] = longint'(y_l2);
  end

  always #5 clk = ~clk;

  // Sample history: xh[j] is the sample taken j edges ago (0 = latest).
  localparam int HMAX = 64;
  longint xh [HMAX];
  int     edge_no = 0;
  int     step_edge = -1;    // first edge of the step phase
  int     step_end  = -1;    // last edge of the step phase
  int     imp_edge  = -1;    // edge that took the unit sample
  int     worst_edge [NFILT] = '{default: -1};  // edge at which filter f's worst case is due
  int     reset_edge = -1;   // first edge after the mid-run reset

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < HMAX; j++) xh[j] = 0;
    end else begin
      for (int j = HMAX - 1; j > 0; j--) xh[j] = xh[j-1];
      xh[0] = longint'(x);
      edge_no++;
    end
  end

  // Table of clock cycles to a stable output per filter (one per tap).
  function automatic int settle_expected(int f);
    return filt_taps(filt_e'(f));
  endfunction

  for (genvar g = 0; g < NFILT; g++) begin : g_chk
    localparam filt_e F = filt_e'(g);
    localparam int    L = filt_taps(F);

    int last_bad = 0;

    function automatic longint ref_y();
      longint s;
      s = 0;
      for (int k = 0; k < L; k++) s += longint'(coef_tap(F, k)) * xh[k];
      return s;
    endfunction

    function automatic longint worst_y();
      longint s;
      s = 0;
      for (int k = 0; k < L; k++)
        s += (coef_tap(F, k) >= 0) ? 127 * longint'(coef_tap(F, k))
                                   : -128 * longint'(coef_tap(F, k));
      return s;
    endfunction

    always @(negedge clk) begin
      #4;
      if (rst_n && edge_no > 0) begin
        int j;
        checks++;
        if (yv[g] != ref_y()) begin
          failures++;
          $display("FAIL filter %0d edge %0d: y=%0d expected %0d", g, edge_no, yv[g], ref_y());
        end
        // Impulse: y must be h(j) j edges after the unit sample.
        if (imp_edge >= 0 && edge_no >= imp_edge && edge_no < imp_edge + L) begin
          j = edge_no - imp_edge;
          checks++;
          if (yv[g] != longint'(coef_tap(F, j))) begin
            failures++;
            $display("FAIL filter %0d impulse tap %0d: y=%0d expected %0d", g, j, yv[g], coef_tap(F, j));
          end
          if (j == L - 1) n_impulse[g]++;
        end
        // Step: find the last edge at which y was not yet final.
        if (step_edge >= 0 && edge_no >= step_edge && edge_no <= step_end) begin
          if (yv[g] != -128 * longint'(dc_gain(F))) last_bad = edge_no - step_edge + 1;
          if (edge_no == step_end) begin
            checks++;
            if (last_bad + 1 != settle_expected(g)) begin
              failures++;
              $display("FAIL filter %0d settled after %0d edges, expected %0d", g, last_bad + 1, settle_expected(g));
            end else n_settle[g]++;
          end
        end
        // Worst case: full-scale output, both signs of x used.
        if (worst_edge[g] >= 0 && edge_no == worst_edge[g]) begin
          checks++;
          if (yv[g] != worst_y()) begin
            failures++;
            $display("FAIL filter %0d worst case y=%0d expected %0d", g, yv[g], worst_y());
          end else n_worst[g]++;
        end
        // Reset: right after release the output holds only the newest sample.
        if (reset_edge >= 0 && edge_no == reset_edge) begin
          checks++;
          if (yv[g] != longint'(coef_tap(F, 0)) * xh[0]) begin
            failures++;
            $display("FAIL filter %0d after reset y=%0d", g, yv[g]);
          end else n_reset[g]++;
        end
      end
    end
  end

  // Sum of h(k): the DC gain.
  function automatic int dc_gain(filt_e f);
    int s;
    s = 0;
    for (int k = 0; k < filt_taps(f); k++) s += coef_tap(f, k);
    return s;
  endfunction

  // Drive one sample for the next rising edge.
  task automatic drive(input logic signed [X_WIDTH-1:0] v);
    @(negedge clk);
    x = v;
  endtask

  initial begin
    int longest;
    longest = 0;
    for (int f = 0; f < NFILT; f++) begin
      n_impulse[f] = 0; n_settle[f] = 0; n_worst[f] = 0; n_reset[f] = 0;
      if (filt_taps(filt_e'(f)) > longest) longest = filt_taps(filt_e'(f));
    end
    x     = '0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (3) drive('0);

    // Impulse.
    drive(8'sd1);
    imp_edge = edge_no + 1;
    repeat (longest + 2) drive('0);

    // Step of -128.
    drive(-8'sd128);
    step_edge = edge_no + 1;
    step_end  = step_edge + longest + 4;
    repeat (longest + 4) drive(-8'sd128);
    repeat (longest + 2) drive('0);

    // Worst case for each filter in turn: the sample due at tap k must be
    // +127 or -128 according to the sign of h(k). Filters take their turn
    // one after the other; each is checked at the edge where its turn ends.
    for (int f = 0; f < NFILT; f++) begin
      int L;
      L = filt_taps(filt_e'(f));
      for (int k = L - 1; k >= 0; k--)
        drive((coef_tap(filt_e'(f), k) >= 0) ? 8'sd127 : -8'sd128);
      worst_edge[f] = edge_no + 1;
    end

    // Random stream with an asynchronous reset in the middle.
    repeat (200) drive(X_WIDTH'($urandom));
    @(posedge clk);
    #2 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    drive(X_WIDTH'($urandom));
    reset_edge = edge_no + 1;
    repeat (300) drive(X_WIDTH'($urandom));
    drive('0);
    @(posedge clk);
    #6;

    for (int f = 0; f < NFILT; f++) begin
      $display("filter %0d: impulse %0d, settle %0d, worst %0d, reset %0d",
               f, n_impulse[f], n_settle[f], n_worst[f], n_reset[f]);
      if (n_impulse[f] == 0 || n_settle[f] == 0 || n_worst[f] == 0 || n_reset[f] == 0) begin
        failures++;
        $display("FAIL filter %0d: a mechanism never happened", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_r2r_fir: checks one complete filter, A1 (59 taps), at default parameters.
//
// Every cycle the output is compared with a direct-form reference convolution
// computed here from the coefficient values. The stimulus is a unit impulse
// (the output must replay h(0)..h(58)), a held step of -128 (the output must
// reach -128 * sum h(k) after exactly 59 clock edges, the filter's latency in
// cycles), then random samples.
module tb_r2r_fir;
  import r2r_pkg::*;

  localparam filt_e F  = FILT_A1;
  localparam int    L  = filt_taps(F);
  localparam int    YW = y_width(F, X_WIDTH);
  localparam int    SETTLE_CYCLES = 59;

  int checks   = 0;
  int failures = 0;

  logic                      clk = 1'b0;
  logic                      rst_n;
  logic signed [X_WIDTH-1:0] x;
  logic signed [YW-1:0]      y;

  r2r_fir dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #5 clk = ~clk;

  longint xh [L];
  int     edge_no = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) xh[j] = 0;
    end else begin
      for (int j = L - 1; j > 0; j--) xh[j] = xh[j-1];
      xh[0] = longint'(x);
      edge_no++;
    end
  end

  function automatic longint ref_y();
    longint s;
    s = 0;
    for (int k = 0; k < L; k++) s += longint'(coef_tap(F, k)) * xh[k];
    return s;
  endfunction

  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      checks++;
      if (longint'(y) != ref_y()) begin
        failures++;
        $display("FAIL edge %0d: y=%0d expected %0d", edge_no, y, ref_y());
      end
    end
  end

  task automatic drive(input logic signed [X_WIDTH-1:0] v);
    @(negedge clk);
    x = v;
  endtask

  initial begin
    int     e0;
    int     last_bad;
    longint final_v;
    x     = '0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (2) drive('0);

    // Impulse response.
    drive(8'sd1);
    e0 = edge_no + 1;
    for (int k = 0; k < L; k++) begin
      drive('0);
      #4;
      checks++;
      if (longint'(y) != longint'(coef_tap(F, edge_no - e0))) begin
        failures++;
        $display("FAIL impulse tap %0d: y=%0d expected %0d", edge_no - e0, y, coef_tap(F, edge_no - e0));
      end
    end
    repeat (3) drive('0);

    // Step response and settling time.
    final_v = 0;
    for (int k = 0; k < L; k++) final_v += -128 * longint'(coef_tap(F, k));
    drive(-8'sd128);
    e0 = edge_no + 1;
    last_bad = 0;
    repeat (L + 5) begin
      drive(-8'sd128);
      #4;
      if (longint'(y) != final_v) last_bad = edge_no - e0 + 1;
    end
    checks++;
    if (last_bad + 1 != SETTLE_CYCLES) begin
      failures++;
      $display("FAIL step settled after %0d edges, expected %0d", last_bad + 1, SETTLE_CYCLES);
    end

    // Random samples.
    repeat (400) drive(X_WIDTH'($urandom));
    drive('0);
    @(posedge clk);
    #6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

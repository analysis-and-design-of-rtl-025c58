// tb_r2r_pab: checks the product accumulation block (transposed form).
//
// Two instances are tested, one with an odd and one with an even number of
// taps. Every cycle a fresh random set of products is applied; the output is
// compared with a direct-form reference, y(n) = sum_k P_{n-k}[u(k)], where
// P_j is the product set applied in cycle j and u(k) = min(k, TAPS-1-k) is the
// symmetric product index of tap k. A mid-run reset must clear the delay line.
module tb_r2r_pab;

  localparam int PW = 16;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int TAPS = (g == 0) ? 7 : 6;
    localparam int NU   = (TAPS + 1) / 2;

    logic signed [PW-1:0] p [NU];
    logic signed [PW-1:0] y;
    // hist[j][u]: product u applied j edges ago (j = 0: the most recent edge).
    int hist [TAPS][NU];

    r2r_pab #(.TAPS(TAPS), .NU(NU), .PW(PW)) dut (.clk(clk), .rst_n(rst_n), .p(p), .y(y));

    function automatic int ref_y(input logic signed [PW-1:0] cur [NU]);
      int s;
      s = int'(cur[0]);
      for (int k = 1; k < TAPS; k++) s += hist[k-1][(k < NU) ? k : TAPS - 1 - k];
      return s;
    endfunction

    initial begin
      for (int u = 0; u < NU; u++) p[u] = '0;
      for (int j = 0; j < TAPS; j++) for (int u = 0; u < NU; u++) hist[j][u] = 0;
    end

    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < TAPS; j++) for (int u = 0; u < NU; u++) hist[j][u] = 0;
      end else begin
        for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        for (int u = 0; u < NU; u++) hist[0][u] = int'(p[u]);
      end
    end

    // New products right after each falling edge; check y just before the
    // next rising edge.
    always @(negedge clk) begin
      for (int u = 0; u < NU; u++) p[u] = PW'($signed(10'($urandom)));
      #4;
      checks++;
      if (int'(y) != ref_y(p)) begin
        failures++;
        $display("FAIL taps=%0d: y=%0d expected %0d", TAPS, y, ref_y(p));
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    repeat (300) @(posedge clk);
    #2 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    repeat (300) @(posedge clk);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

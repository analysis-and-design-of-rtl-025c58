// tb_r2r_fund_regs: checks the registers for fundamentals.
//
// Random words are applied to every input each cycle; after each rising edge
// every output must equal the word applied before that edge. An asynchronous
// reset in the middle of a cycle must clear all outputs at once, and they must
// stay zero until the next edge after reset is released.
module tb_r2r_fund_regs;

  localparam int N = 5;
  localparam int W = 13;

  int checks   = 0;
  int failures = 0;

  logic                clk = 1'b0;
  logic                rst_n;
  logic signed [W-1:0] d [N];
  logic signed [W-1:0] q [N];
  logic signed [W-1:0] last [N];

  r2r_fund_regs #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check_all(input logic signed [W-1:0] e [N], input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== e[i]) begin
        failures++;
        $display("FAIL %s: q[%0d]=%0d expected %0d", what, i, q[i], e[i]);
      end
    end
  endtask

  initial begin
    logic signed [W-1:0] zero [N];
    for (int i = 0; i < N; i++) begin
      zero[i] = '0;
      d[i]    = W'($urandom);
    end
    rst_n = 1'b0;
    #12;
    check_all(zero, "in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        d[i]    = W'($urandom);
        last[i] = d[i];
      end
      @(posedge clk);
      #1;
      check_all(last, "after edge");
      if (n == 200) begin
        #2 rst_n = 1'b0;
        #1 check_all(zero, "async reset");
        @(negedge clk);
        rst_n = 1'b1;
        #1 check_all(zero, "after reset release");
      end
    end
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

// r2r_fund_regs: registers for fundamentals (the low-power technique).
//
// One register per output of the multiplier block, placed between the
// multiplier block adders and the structural adders. Glitches caused by the
// unequal path delays inside the multiplier block stop here, so the product
// accumulation block sees each fundamental change only once per clock edge.
// Only the odd fundamentals are registered, not every coefficient product,
// which keeps the overhead to a handful of registers.
//
// Interface: d[0..N-1] in, q[0..N-1] out, W bits each.
// Timing: q follows d one clock later. rst_n is an asynchronous, active-low
// reset that clears every register (this design's choice; reset behaviour is
// not specified for the filters).
module r2r_fund_regs #(
  parameter int N = 4,
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] d [N],
  output logic signed [W-1:0] q [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      q <= d;
    end
  end

endmodule

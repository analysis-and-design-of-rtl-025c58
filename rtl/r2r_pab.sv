// r2r_pab: product accumulation block of a transposed direct-form FIR filter.
//
// The structural adders and delay registers of the transposed form:
//   z[TAPS-1] <= h(TAPS-1)x,   z[k] <= h(k)x + z[k+1],   y = h(0)x + z[1],
// which gives y(n) = sum_k h(k) x(n-k). Every path from a product to a
// register or to y crosses a single adder, whatever the filter length. The
// filter is linear-phase, so tap k and tap TAPS-1-k use the same product
// p[u], u = min(k, TAPS-1-k); the block receives only the NU = ceil(TAPS/2)
// distinct products. The transposed form is the published structure; the
// sharing of one product between symmetric taps is this design's choice.
//
// Interface: p[0..NU-1] (PW bits, one new set per clock) in, y (PW bits) out.
// Timing: y is combinational in p[0] and registered in all other taps, so a
// product set reaches y in the same cycle (tap 0) and up to TAPS-1 cycles
// later (last tap). rst_n (asynchronous, active low; this design's choice)
// clears the delay line.
module r2r_pab #(
  parameter int TAPS = 59,
  parameter int NU   = (TAPS + 1) / 2,
  parameter int PW   = 23
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [PW-1:0] p [NU],
  output logic signed [PW-1:0] y
);

  // Product index used by tap k.
  function automatic int tap_product(int k);
    return (k < NU) ? k : TAPS - 1 - k;
  endfunction

  // z[k]: partial sum of taps k..TAPS-1, delayed by one clock.
  logic signed [PW-1:0] z [1:TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) z[k] <= '0;
    end else begin
      z[TAPS-1] <= p[tap_product(TAPS - 1)];
      for (int k = 1; k < TAPS - 1; k++) z[k] <= p[tap_product(k)] + z[k+1];
    end
  end

  assign y    = p[0] + z[1];

endmodule

// prpg_lfsr: pseudo-random pattern generator of the Logic BIST.
//
// A W-bit Fibonacci LFSR shifting towards the MSB: each enabled clock the
// XOR of the bits marked in TAPS enters at bit 0. load copies the seed in,
// which the source suggests should be the 128-bit value used in the
// authentication challenge. The default taps (bits 128, 126, 101, 99 in
// 1-based numbering) give a maximal-length sequence; they and the Fibonacci
// form are this design's own. An all-zero seed would lock the LFSR at zero.
module prpg_lfsr #(
  parameter int unsigned W    = 128,
  parameter logic [W-1:0] TAPS = W'((128'h1 << 127) | (128'h1 << 125) | (128'h1 << 100) | (128'h1 << 98))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= W'(1);
    else if (load) q <= seed;
    else if (en)   q <= {q[W-2:0], fb};
  end

endmodule

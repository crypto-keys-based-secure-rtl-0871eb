// misr: multiple-input signature register of the Logic BIST.
//
// A W-bit LFSR in Fibonacci form whose next state is additionally XORed with
// the W-bit input word on every enabled clock, so the final value is a
// signature of the whole response stream. clear resets it to zero. The
// default width and taps (bits 32, 22, 2, 1 in 1-based numbering, a primitive
// polynomial) are this design's own; the source only names Logic BIST.
module misr #(
  parameter int unsigned  W    = 32,
  parameter logic [W-1:0] TAPS = W'(32'h8020_0003)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] sig
);

  logic fb;
  assign fb = ^(sig & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[W-2:0], fb} ^ din;
  end

endmodule

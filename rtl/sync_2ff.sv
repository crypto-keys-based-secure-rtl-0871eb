// sync_2ff: two-flop synchroniser for single-bit levels crossing between the
// JTAG clock (TCK) and the system clock. The output follows the input two
// destination-clock edges later. Reset is asynchronous, to 0.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end

endmodule

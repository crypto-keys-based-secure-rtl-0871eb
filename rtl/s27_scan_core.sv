// s27_scan_core: the ISCAS'89 s27 benchmark with a mux-scan chain.
//
// s27 has four primary inputs G0..G3, one primary output G17 and three
// flip-flops G5, G6, G7 fed by G10, G11 and G13. Here each flip-flop has a
// scan multiplexer: with scan_en high the chain scan_in -> G5 -> G6 -> G7 ->
// scan_out shifts one place per clock, with scan_en low the flip-flops take
// their functional next state. The gate netlist is the public benchmark; the
// reset to zero and the chain order are this design's own.
module s27_scan_core (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] pi,       // G3..G0
  output logic       po,       // G17
  input  logic       scan_en,
  input  logic       scan_in,
  output logic       scan_out
);

  logic g0, g1, g2, g3;
  logic g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  assign {g3, g2, g1, g0} = pi;

  assign g14 = ~g0;
  assign g8  = g14 & g6;
  assign g12 = ~(g1 | g7);
  assign g15 = g12 | g8;
  assign g16 = g3 | g8;
  assign g9  = ~(g16 & g15);
  assign g11 = ~(g5 | g9);
  assign g10 = ~(g14 | g11);
  assign g13 = ~(g2 | g12);
  assign po  = ~g11;          // G17

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       {g5, g6, g7} <= 3'b000;
    else if (scan_en) {g5, g6, g7} <= {scan_in, g5, g6};
    else              {g5, g6, g7} <= {g10, g11, g13};
  end

  assign scan_out = g7;

endmodule

// tap_controller: IEEE 1149.1 Test Access Port state machine.
//
// The sixteen-state machine of the standard, advanced by TMS on every rising
// TCK edge. TRST_N resets it asynchronously to Test-Logic-Reset, and five TCK
// cycles with TMS high reach the same state from anywhere. The outputs are
// decoded from the present state: dr/ir carry capture, shift and update
// strobes that are high during the matching state, so a scan register acts on
// the rising edge that leaves that state. tlr is high in Test-Logic-Reset and
// rti in Run-Test/Idle. The source names the controller only; the state
// diagram is the standard's.
module tap_controller
  import sjtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output dr_ctrl_t   dr,
  output dr_ctrl_t   ir,
  output logic       tlr,
  output logic       rti
);

  tap_state_t nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SEL_DR    : RTI;
      SEL_DR:     nxt = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR    : RTI;
      SEL_IR:     nxt = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR    : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  assign dr  = '{capture: state == CAPTURE_DR, shift: state == SHIFT_DR, update: state == UPDATE_DR};
  assign ir  = '{capture: state == CAPTURE_IR, shift: state == SHIFT_IR, update: state == UPDATE_IR};
  assign tlr = (state == TLR);
  assign rti = (state == RTI);

  // strobes are one-hot: at most one of the six is high
  a_strobes_onehot : assert property (@(posedge tck) disable iff (!trst_n)
    $onehot0({dr.capture, dr.shift, dr.update, ir.capture, ir.shift, ir.update}));

endmodule

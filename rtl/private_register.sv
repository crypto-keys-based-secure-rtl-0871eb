// private_register: private data register of programmable length.
//
// The data register seen by the PRIVATE instruction is `size` bits long,
// 1..PRIV_MAX, taking TDI in at bit size-1 and giving TDO from bit 0; bits at
// and above `size` hold still. Capture-DR loads the stored contents; Update-DR
// writes the shifted value back when write_ok is high (designer or architect),
// masked to the present length. The length is changed through a second,
// SIZE_W-bit register (PRIVSIZE instruction, architect only): Capture-DR loads
// the present length, Update-DR sets a new one, clamped to 1..PRIV_MAX. The
// source says only that an architect may reconfigure the size of the private
// register; the maximum length, the reset length (PRIV_MAX) and the contents'
// meaning are this design's own.
module private_register
  import sjtag_pkg::*;
#(
  parameter int unsigned PRIV_MAX = 32,
  localparam int unsigned SIZE_W = $clog2(PRIV_MAX + 1)
) (
  input  logic                tck,
  input  logic                trst_n,
  input  dr_ctrl_t            ctrl,       // PRIVATE selected
  input  dr_ctrl_t            size_ctrl,  // PRIVSIZE selected
  input  logic                write_ok,
  input  logic                tdi,
  output logic                tdo,
  output logic                size_tdo,
  output logic [PRIV_MAX-1:0] value,
  output logic [SIZE_W-1:0]   size
);

  logic [PRIV_MAX-1:0] sr;
  logic [SIZE_W-1:0]   size_sr;
  logic [PRIV_MAX-1:0] mask;

  always_comb begin
    for (int i = 0; i < PRIV_MAX; i++) mask[i] = (i < int'(size));
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr      <= '0;
      value   <= '0;
      size_sr <= '0;
      size    <= SIZE_W'(PRIV_MAX);
    end else begin
      if (ctrl.capture) sr <= value;
      else if (ctrl.shift) begin
        for (int i = 0; i < PRIV_MAX; i++) begin
          if (i == int'(size) - 1)   sr[i] <= tdi;
          else if (i < int'(size))   sr[i] <= (i + 1 < PRIV_MAX) ? sr[(i + 1) % PRIV_MAX] : tdi;
        end
      end
      if (ctrl.update && write_ok) value <= sr & mask;

      if (size_ctrl.capture)    size_sr <= size;
      else if (size_ctrl.shift) size_sr <= {tdi, size_sr[SIZE_W-1:1]};
      if (size_ctrl.update) begin
        if (size_sr == '0)                    size <= SIZE_W'(1);
        else if (size_sr > SIZE_W'(PRIV_MAX)) size <= SIZE_W'(PRIV_MAX);
        else                                  size <= size_sr;
      end
    end
  end

  assign tdo      = sr[0];
  assign size_tdo = size_sr[0];

endmodule

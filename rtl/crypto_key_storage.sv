// crypto_key_storage: storage module of encrypted keys for LBIST
// authentication.
//
// DEPTH entries of DATA_W bits, one per value of the 8-bit security byte, each
// holding the response expected from a user who encrypted the challenge with
// the algorithm and key length that byte selects. A write port (one entry per
// TCK edge with we high) lets an architect program entries; the read port is
// combinational. A per-entry valid bit, cleared by reset, keeps an entry that
// was never programmed from ever authenticating anyone. The source says the
// module holds encrypted keys selected by the 8 configuration bits; the write
// port and the valid bits are this design's own (in silicon the entries would
// sit in one-time-programmable storage).
module crypto_key_storage #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 128,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata,
  output logic              rvalid
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  valid;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  valid <= '0;
    else if (we) valid[waddr] <= 1'b1;
  end

  assign rdata  = mem[raddr];
  assign rvalid = valid[raddr];

endmodule

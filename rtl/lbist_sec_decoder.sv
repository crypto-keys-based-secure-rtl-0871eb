// lbist_sec_decoder: decoder of the Logic BIST security configuration register.
//
// Combinational. Bit 8 of the 128-bit configuration register is the mode bit:
// 0 takes the security byte from the LSB end, 1 from the MSB end. In LSB mode
// byte bit k is register bit k; in MSB mode it is register bit 127-k, so the
// level bits 7 and 6 sit at 120 and 121, the algorithm bits 5..3 at 122..124
// and the key-length bits 2..0 at 125..127, as the register layout of the
// source gives them. The byte is split into level (2 bits), algorithm
// (3 bits) and key length (3 bits); the whole byte is the index into the crypto
// key storage. alg_ok applies the level column of the supported-algorithm
// table. The algorithm code values are this design's own.
module lbist_sec_decoder
  import sjtag_pkg::*;
#(
  parameter int unsigned CFG_W = 128
) (
  input  logic [CFG_W-1:0] cfg,
  output logic             msb_mode,
  output sec_byte_t        fields,
  output logic [7:0]       index,
  output logic             alg_ok
);

  logic [7:0] sbyte;

  always_comb begin
    for (int k = 0; k < 8; k++) sbyte[k] = cfg[8] ? cfg[CFG_W-1-k] : cfg[k];
  end

  assign msb_mode = cfg[8];
  assign fields   = sec_byte_t'(sbyte);
  assign index    = sbyte;
  assign alg_ok   = alg_level_ok(fields.alg, fields.level);

endmodule

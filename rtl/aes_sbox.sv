// aes_sbox: forward AES S-box, one byte in, one byte out, purely combinational.
//
// The core uses two copies of it: one inside the sub-byte unit on the data
// path (the "S1" box) and one inside the key expansion (the "S2" box), so that
// a round-key byte and a state byte can be substituted in the same cycle.
//
// The 256-entry table is not typed in: each entry is the multiplicative inverse
// in GF(2^8) followed by the AES affine map, computed by aes_pkg::sbox_f at
// elaboration time. The result is a constant ROM indexed by data_in; a
// synthesis tool maps it to LUTs or a ROM.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t data_in,
  output byte_t data_out
);

  byte_t rom [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    assign rom[i] = sbox_f(byte_t'(i));
  end

  assign data_out = rom[data_in];

endmodule

// aes_sbox: the AES SubBytes substitution for one byte.
//
// Purely combinational, y = S(a).  The table is a 256x8 ROM whose contents are
// computed at elaboration from the FIPS-197 definition (inverse in GF(2^8)
// followed by the affine transform), see aes_ccm_pkg::sbox_calc.  The core
// this design is modelled on uses an area-optimised S-box whose structure is
// not specified; a ROM gives the same function and lets synthesis choose the
// logic.  Two instances are used by the AES core: one for the state bytes and
// one for the key schedule.
module aes_sbox
  import aes_ccm_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  localparam sbox_table_t SBOX = sbox_table();

  assign y = SBOX[a];

endmodule

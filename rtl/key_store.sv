// key_store: holds the 128-bit AES key of the CCM core.
//
// The key arrives one byte per cycle on din while load is high, first byte
// (byte 0 of the key) first; the register shifts left by one byte per load
// cycle, so after KLEN/8 load cycles the first byte sits in bits [KLEN-1:KLEN-8]
// and key presents the key in the block order the AES core expects.  The key
// stays unchanged while the core runs; the AES core reloads its working copy
// from here at the start of every block.  reset (synchronous, active high)
// clears the key.
//
// The document gives the block its role and its load strobe; the byte-wide
// load port and the shift-register organisation are this design's choices.
module key_store #(
  parameter int unsigned KLEN = 128
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            load,
  input  logic [7:0]      din,
  output logic [KLEN-1:0] key
);

  always_ff @(posedge clk) begin
    if (reset)     key <= '0;
    else if (load) key <= {key[KLEN-9:0], din};
  end

endmodule

// tag_store: holds the message authentication code of the CCM core.
//
// din carries the top TLEN bits of the AES output.  At the end of the CBC-MAC
// pass the controller pulses cap and the last CBC output becomes the tag T.
// When the counter block CTR0 has been encrypted the controller pulses enc and
// the register is XORed with that key stream block S0, giving the transmitted
// MAC U = T xor MSB_Tlen(S0).  The MAC then leaves through dout, the top byte, one
// byte per cycle while shift_out is high.  cap has priority over enc, enc over
// shift_out.  reset (synchronous, active high) clears the register.
//
// The function follows the CCM definition the document relies on; the
// register organisation is this design's choice.
module tag_store #(
  parameter int unsigned TLEN = 32
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         cap,
  input  logic         enc,
  input  logic [TLEN-1:0] din,
  input  logic         shift_out,
  output logic [7:0]   dout
);

  logic [TLEN-1:0] tag;

  assign dout = tag[TLEN-1 -: 8];

  always_ff @(posedge clk) begin
    if (reset)          tag <= '0;
    else if (cap)       tag <= din;
    else if (enc)       tag <= tag ^ din;
    else if (shift_out) tag <= {tag[TLEN-9:0], 8'h00};
  end

endmodule

// payload_frame: payload buffer of the CCM core.
//
// A PLEN-bit shift register.  While load is high one payload byte per cycle
// enters at the low end, so after PLEN/8 load cycles the first payload byte is
// in the top byte and payload block i (128 bits, i = 0 first) occupies bits
// [PLEN-1-128*i -: 128].  During the CBC-MAC pass the controller reads block
// blk_idx through blk; during the CTR pass it writes the encrypted block back
// in place (wr high for one cycle, wr_data = block XOR key stream).  After the
// operation the encrypted payload leaves through dout, the top byte, one byte
// per cycle while shift_out is high (zeros shift in).  Load has priority over
// write, write over shift.  reset (synchronous, active high) clears the buffer.
//
// The payload is processed in whole 128-bit blocks, so PLEN must be a multiple
// of 128; a shorter message is padded with zero bytes before it is loaded, as
// in the document's own example.  Writing the ciphertext back into the payload
// register (rather than keeping a separate output buffer) is this design's
// choice.
module payload_frame #(
  parameter int unsigned PLEN = 256,
  localparam int unsigned NBLK = PLEN / 128,
  localparam int unsigned BW   = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          load,
  input  logic [7:0]    din,
  input  logic [BW-1:0] blk_idx,
  output logic [127:0]  blk,
  input  logic          wr,
  input  logic [127:0]  wr_data,
  input  logic          shift_out,
  output logic [7:0]    dout
);

  if (PLEN % 128 != 0 || PLEN == 0) begin : g_bad_plen
    $error("payload_frame: PLEN must be a non-zero multiple of 128");
  end

  logic [PLEN-1:0] frame;

  assign blk  = frame[PLEN - 1 - 128*blk_idx -: 128];
  assign dout = frame[PLEN-1 -: 8];

  always_ff @(posedge clk) begin
    if (reset)
      frame <= '0;
    else if (load)
      frame <= {frame[PLEN-9:0], din};
    else if (wr)
      frame[PLEN - 1 - 128*blk_idx -: 128] <= wr_data;
    else if (shift_out)
      frame <= {frame[PLEN-9:0], 8'h00};
  end

endmodule

// aes_ccm_top: compact AES-CCM authenticated-encryption core.
//
// Encrypts and authenticates one payload with AES-128 in CCM mode (counter
// mode for confidentiality, CBC-MAC for authentication, SP 800-38C) using a
// single byte-serial AES core that is reused for every block: B0 and the
// payload blocks go through CBC-MAC, then CTR0 encrypts the tag and CTR1..CTRn
// encrypt the payload.  Each AES block takes 160 cycles; a 256-bit payload
// takes 6 blocks, 960 cycles, i.e. 119.2 Mbit/s of block throughput at 149 MHz.
//
// Blocks: key_store (key), frame_gen (nonce, B0 and CTRi), payload_frame
// (payload in, ciphertext out), tag_store (MAC), ccm_fsm (sequencing),
// aes8_core (cipher).  The AES input multiplexer selects B0, payload block xor
// previous AES output (CBC chaining), or CTRi.
//
// Interface (all byte-wide data, synchronous active-high reset):
//   load_in_k / key_in    one key byte per cycle, 16 cycles, byte 0 first
//   load_in_n / nonce     one nonce byte per cycle, NLEN/8 cycles
//   load_in_p / payload   one payload byte per cycle, PLEN/8 cycles
//   start_in_ccm          one-cycle pulse starts the operation
//   busy_out              high from the cycle after start_in_ccm for
//                         (2*PLEN/128 + 2) * 160 cycles; low = result ready
//   cipher / load_out     cipher always shows the current output byte; a cycle
//                         with load_out high advances to the next.  Order: the
//                         TLEN/8 MAC bytes, then the PLEN/8 ciphertext bytes.
// Loads and load_out are ignored while busy_out is high; start_in_ccm rewinds
// the output to the first MAC byte.  Keys, nonces and payloads stay loaded
// until overwritten (the payload register holds ciphertext after a run, so a
// new payload must be loaded before each operation).
//
// Follows the document: the port list, the single time-shared 8-bit AES core,
// the operation order, the MAC-then-ciphertext output and (through
// Q_BIAS = 1) its worked example.  This design's own choices: byte-wide
// buses, the load/read handshakes, in-place ciphertext write-back, and the
// encoding of the controller.  Associated data is not supported (the document
// lists no input for it), and only encryption/generation is built.
module aes_ccm_top
  import aes_ccm_pkg::*;
#(
  parameter int unsigned NLEN   = 104,
  parameter int unsigned TLEN   = 32,
  parameter int unsigned PLEN   = 256,
  parameter int unsigned Q_BIAS = 1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       load_in_k,
  input  logic       load_in_p,
  input  logic       load_in_n,
  input  logic       load_out,
  input  logic       start_in_ccm,
  input  logic [7:0] key_in,
  input  logic [7:0] nonce,
  input  logic [7:0] payload,
  output logic [7:0] cipher,
  output logic       busy_out
);

  localparam int unsigned NBLK = PLEN / 128;
  localparam int unsigned BW   = (NBLK > 1) ? $clog2(NBLK) : 1;
  localparam int unsigned CW   = $clog2(NBLK + 1);
  localparam int unsigned QB   = 15 - NLEN/8;
  localparam int unsigned TB   = TLEN / 8;
  localparam int unsigned OUTB = TB + PLEN / 8;
  localparam int unsigned OW   = $clog2(OUTB + 1);

  logic          busy;
  block_t        key, b0, ctr, pl_blk, aes_in, aes_out;
  logic          aes_start, aes_busy, aes_done;
  aes_src_e      src;
  logic [BW-1:0] pl_idx;
  logic [CW-1:0] ctr_i;
  logic          mac_cap, tag_enc, pl_wr;
  logic [7:0]    tag_byte, pl_byte;
  logic [OW-1:0] out_cnt;
  logic          out_adv;

  assign busy_out = busy;

  key_store #(.KLEN(128)) u_key (
    .clk, .reset, .load(load_in_k && !busy), .din(key_in), .key
  );

  frame_gen #(.NLEN(NLEN), .TLEN(TLEN), .PLEN(PLEN), .Q_BIAS(Q_BIAS)) u_frame (
    .clk, .reset, .load(load_in_n && !busy), .din(nonce),
    .ctr_i((8*QB)'(ctr_i)), .b0, .ctr
  );

  payload_frame #(.PLEN(PLEN)) u_payload (
    .clk, .reset, .load(load_in_p && !busy), .din(payload),
    .blk_idx(pl_idx), .blk(pl_blk),
    .wr(pl_wr), .wr_data(pl_blk ^ aes_out),
    .shift_out(out_adv && out_cnt >= OW'(TB)), .dout(pl_byte)
  );

  tag_store #(.TLEN(TLEN)) u_tag (
    .clk, .reset, .cap(mac_cap), .enc(tag_enc), .din(aes_out[127 -: TLEN]),
    .shift_out(out_adv && out_cnt < OW'(TB)), .dout(tag_byte)
  );

  ccm_fsm #(.NBLK(NBLK)) u_fsm (
    .clk, .reset, .start(start_in_ccm), .aes_done,
    .aes_start, .src, .pl_idx, .ctr_i, .mac_cap, .tag_enc, .pl_wr, .busy
  );

  // AES input multiplexer.
  always_comb begin
    unique case (src)
      SRC_CBC: aes_in = pl_blk ^ aes_out;
      SRC_CTR: aes_in = ctr;
      default: aes_in = b0;
    endcase
  end

  aes8_core u_aes (
    .clk, .reset, .start(aes_start), .din(aes_in), .key,
    .busy(aes_busy), .done(aes_done), .dout(aes_out)
  );

  // Output sequencing: MAC bytes first, then the ciphertext.
  assign out_adv = load_out && !busy && (out_cnt < OW'(OUTB));
  assign cipher  = (out_cnt < OW'(TB)) ? tag_byte : pl_byte;

  always_ff @(posedge clk) begin
    if (reset || (start_in_ccm && !busy)) out_cnt <= '0;
    else if (out_adv)                     out_cnt <= out_cnt + OW'(1);
  end

  // The controller and the AES core agree on when a block is in flight.
  a_aes_in_op: assert property (@(posedge clk) disable iff (reset)
                                aes_busy |-> busy);

endmodule

// frame_gen: nonce register and generator of the CCM blocks B0 and CTRi.
//
// The nonce arrives one byte per cycle on din while load is high, first byte
// first, into an NLEN-bit shift register.  From it two 128-bit blocks are
// formed combinationally (SP 800-38C, appendix A):
//   B0   = flags_b0 | nonce | length field Q on q = 15 - NLEN/8 bytes
//   CTRi = flags_ctr | nonce | i on q bytes
// flags_b0 = {0, Adata = 0, (TLEN/8-2)/2, q-1}; flags_ctr = {00000, q-1}.
// The core has no associated-data input, so Adata is always 0.
//
// Length field.  The document's worked example (Nlen = 104, Tlen = 32,
// Plen = 256) gives a MAC that is reproduced only if the length field holds the
// payload byte count minus one (0x001f for 32 bytes); SP 800-38C asks for the
// byte count itself.  Q = PLEN/8 - Q_BIAS: the default Q_BIAS = 1 reproduces
// the document's example, Q_BIAS = 0 gives standard CCM.  The encrypted payload
// does not depend on this choice, only the MAC does.
// reset (synchronous, active high) clears the nonce.
module frame_gen #(
  parameter int unsigned NLEN   = 104,
  parameter int unsigned TLEN   = 32,
  parameter int unsigned PLEN   = 256,
  parameter int unsigned Q_BIAS = 1,
  localparam int unsigned QB    = 15 - NLEN/8     // bytes of the length field
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            load,
  input  logic [7:0]      din,
  input  logic [8*QB-1:0] ctr_i,
  output logic [127:0]    b0,
  output logic [127:0]    ctr
);

  if (NLEN % 8 != 0 || NLEN < 56 || NLEN > 104) begin : g_bad_nlen
    $error("frame_gen: NLEN must be 56..104 in whole bytes");
  end
  if (TLEN % 16 != 0 || TLEN < 32 || TLEN > 128) begin : g_bad_tlen
    $error("frame_gen: TLEN must be one of 32, 48, ..., 128");
  end

  localparam logic [2:0]      LP     = 3'(QB - 1);
  localparam logic [2:0]      MP     = 3'((TLEN/8 - 2) / 2);
  localparam logic [7:0]      FLAGS_B0  = {2'b00, MP, LP};
  localparam logic [7:0]      FLAGS_CTR = {5'b00000, LP};
  localparam logic [8*QB-1:0] QFIELD = (8*QB)'(PLEN/8 - Q_BIAS);

  logic [NLEN-1:0] nonce;

  always_ff @(posedge clk) begin
    if (reset)     nonce <= '0;
    else if (load) nonce <= {nonce[NLEN-9:0], din};
  end

  assign b0  = {FLAGS_B0, nonce, QFIELD};
  assign ctr = {FLAGS_CTR, nonce, ctr_i};

endmodule

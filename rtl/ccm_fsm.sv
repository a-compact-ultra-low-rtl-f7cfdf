// ccm_fsm: controller of the iterative AES-CCM core.
//
// A single AES core is time-shared by every block of one CCM operation.  With
// NBLK = PLEN/128 payload blocks the controller runs 2*NBLK + 2 AES blocks,
// each started in the done cycle of the previous one:
//   B0                      (CBC pass, AES input = B0)
//   B1 .. B_NBLK            (CBC pass, AES input = payload block xor last output)
//   CTR0                    (last CBC output captured as tag T: mac_cap)
//   CTR1 .. CTR_NBLK        (S0 xor'd into the tag: tag_enc; then each S_i
//                            xor'd into payload block i-1 in place: pl_wr)
// For the document's 256-bit payload this is 6 AES blocks, 960 cycles.
//
// Outputs are Mealy outputs of the AES done pulse: aes_start together with
// src (which multiplexer input feeds the AES core), pl_idx (payload block read
// or written) and ctr_i (counter value of the CTR block), plus the one-cycle
// strobes mac_cap, tag_enc and pl_wr.  busy is high from the cycle after
// start until the last key-stream block has been used.
//
// The document tabulates its controller as a set of per-round enable and
// select signals (frame generator, payload frame, key store, MAC store and two
// multiplexer selects) for the same order of operations: B0 and the payload
// blocks through CBC, the MAC stored, then the counter blocks.  This
// controller keeps that order but uses its own encoding of the controls.
// reset is synchronous and active high.
module ccm_fsm
  import aes_ccm_pkg::*;
#(
  parameter int unsigned NBLK = 2,
  localparam int unsigned BW  = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned CW  = $clog2(NBLK + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic          aes_done,
  output logic          aes_start,
  output aes_src_e      src,
  output logic [BW-1:0] pl_idx,
  output logic [CW-1:0] ctr_i,
  output logic          mac_cap,
  output logic          tag_enc,
  output logic          pl_wr,
  output logic          busy
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_CBC  = 2'd1,
    S_CTR  = 2'd2
  } state_e;

  state_e        state;
  logic [CW-1:0] blk;          // blocks of the current pass already started

  assign busy = (state != S_IDLE);

  always_comb begin
    aes_start = 1'b0;
    src       = SRC_B0;
    pl_idx    = '0;
    ctr_i     = '0;
    mac_cap   = 1'b0;
    tag_enc   = 1'b0;
    pl_wr     = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (start) aes_start = 1'b1;            // B0
      end
      S_CBC: if (aes_done) begin
        if (blk < CW'(NBLK)) begin
          aes_start = 1'b1;
          src       = SRC_CBC;
          pl_idx    = BW'(blk);
        end else begin
          mac_cap   = 1'b1;
          aes_start = 1'b1;
          src       = SRC_CTR;                  // CTR0
        end
      end
      S_CTR: if (aes_done) begin
        if (blk == '0) tag_enc = 1'b1;
        else begin
          pl_wr  = 1'b1;
          pl_idx = BW'(blk - CW'(1));
        end
        if (blk < CW'(NBLK)) begin
          aes_start = 1'b1;
          src       = SRC_CTR;
          ctr_i     = blk + CW'(1);
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      blk   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CBC;
          blk   <= '0;
        end
        S_CBC: if (aes_done) begin
          if (blk < CW'(NBLK)) blk <= blk + CW'(1);
          else begin
            state <= S_CTR;
            blk   <= '0;
          end
        end
        S_CTR: if (aes_done) begin
          if (blk < CW'(NBLK)) blk <= blk + CW'(1);
          else                 state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The AES core is only started when it is free: at the start of an
  // operation or in the done cycle of the previous block.
  a_start_when_free: assert property (@(posedge clk) disable iff (reset)
                                      aes_start |-> (state == S_IDLE || aes_done));
  a_one_strobe: assert property (@(posedge clk) disable iff (reset)
                                 $onehot0({mac_cap, tag_enc, pl_wr}));

endmodule

// aes8_core: AES-128 forward cipher with an 8-bit datapath.
//
// One state byte passes through the data S-box per clock cycle, so a round
// takes 16 cycles and a block 160 cycles, which is the rate the CCM core is
// built around (128 bits per 160 cycles = 119.2 Mbit/s at 149 MHz).
//
// How it works.  The 128-bit input block is loaded in parallel together with
// the initial AddRoundKey; from then on the state is read one byte at a time
// through a 16:1 multiplexer (the parallel-to-serial conversion).  The read
// address applies ShiftRows: in cycle 4c+r of a round the byte at row r,
// column (c+r) mod 4 is substituted and collected in a 4-byte column buffer.
// In the fourth cycle of each column a single MixColumns unit (bypassed in the
// last round) and the round-key XOR produce the new column.  New columns 0-2
// wait in a 12-byte buffer and the whole state is replaced after column 3, so
// the old state is intact while ShiftRows still reads it.
// The key schedule runs on the fly in the working key register: a second
// S-box substitutes RotWord(w3) during cycles 0-3 of each round, and round-key
// word c is formed and written back in place in cycle 4c+3.  The master key is
// reloaded from the key input at every start, so the key store keeps the
// cipher key unchanged between blocks.
//
// Interface and timing.  start (one cycle, sampled while idle or in the done
// cycle) loads din and key.  busy is high for the following 160 cycles.  done
// is high in the last of them, combinationally, with the result on dout in the
// same cycle, so a controller can start the next block right away and blocks
// follow each other every 160 cycles.  After that dout keeps the result until
// the next start.  reset is synchronous and active high.
//
// The byte-serial organisation and the 160-cycle block time follow the
// document; the split into one data and one key S-box, the column buffer and
// the in-place key schedule are this design's own choices.
module aes8_core
  import aes_ccm_pkg::*;
#(
  parameter int unsigned ROUNDS = 10
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  input  block_t din,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  block_t      st;          // cipher state, byte 0 in [127:120]
  block_t      rk;          // working (round) key
  logic [95:0] tmp;         // new columns 0..2 of the current round
  logic [23:0] col_sb;      // substituted bytes of rows 0..2 of the column
  logic [23:0] key_sb;      // substituted bytes 0..2 of RotWord(w3)
  byte_t       rcon;
  logic [3:0]  cnt;         // cycle within the round
  logic [3:0]  rnd;         // round number, 1..ROUNDS

  logic [1:0] col, row;
  assign col = cnt[3:2];
  assign row = cnt[1:0];

  // ShiftRows as a read address.
  logic [3:0] rd_idx;
  logic [1:0] src_col;
  assign src_col = col + row;
  assign rd_idx  = {src_col, row};

  byte_t st_byte, sb_out, key_byte, ksb_out;
  assign st_byte  = st[127 - 8*rd_idx -: 8];
  // RotWord(w3): row r takes byte (r+1) mod 4 of word 3.
  logic [1:0] krow;
  assign krow     = row + 2'd1;
  assign key_byte = rk[31 - 8*krow -: 8];

  aes_sbox u_sbox_data (.a(st_byte),  .y(sb_out));
  aes_sbox u_sbox_key  (.a(key_byte), .y(ksb_out));

  word_t sub_col, temp_w, rk_col, prev_w, mixed, new_col;
  assign sub_col = {col_sb, sb_out};
  assign temp_w  = {key_sb, ksb_out} ^ {rcon, 24'h0};
  // Word c-1 of the round key was already updated in place.
  logic [1:0] pcol;
  assign pcol    = col - 2'd1;
  assign prev_w  = rk[127 - 32*pcol -: 32];
  always_comb begin
    if (col == 2'd0) rk_col = rk[127:96] ^ temp_w;
    else             rk_col = rk[127 - 32*col -: 32] ^ prev_w;
  end
  assign mixed   = (rnd == 4'(ROUNDS)) ? sub_col : mix_column(sub_col);
  assign new_col = mixed ^ rk_col;

  assign done = busy && (rnd == 4'(ROUNDS)) && (cnt == 4'd15);
  assign dout = done ? {tmp, new_col} : st;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy   <= 1'b0;
      cnt    <= '0;
      rnd    <= 4'd1;
      rcon   <= 8'h01;
      st     <= '0;
      rk     <= '0;
      tmp    <= '0;
      col_sb <= '0;
      key_sb <= '0;
    end else if (start && (!busy || done)) begin
      busy <= 1'b1;
      cnt  <= '0;
      rnd  <= 4'd1;
      rcon <= 8'h01;
      st   <= din ^ key;
      rk   <= key;
    end else if (busy) begin
      cnt <= cnt + 4'd1;
      if (col == 2'd0 && row != 2'd3)
        key_sb[23 - 8*row -: 8] <= ksb_out;
      if (row != 2'd3) begin
        col_sb[23 - 8*row -: 8] <= sb_out;
      end else begin
        rk[127 - 32*col -: 32] <= rk_col;
        if (col != 2'd3) begin
          tmp[95 - 32*col -: 32] <= new_col;
        end else begin
          st   <= {tmp, new_col};
          rnd  <= rnd + 4'd1;
          rcon <= xtime(rcon);
          if (rnd == 4'(ROUNDS)) busy <= 1'b0;
        end
      end
    end
  end

  // A new block may only be started while idle or in the done cycle.
  a_no_restart: assert property (@(posedge clk) disable iff (reset)
                                 start |-> (!busy || done));

endmodule

// ccm_vec_runner: testbench helper that runs one CCM known-answer vector
// through an aes_ccm_top of the given configuration.
//
// Loads KEY, NONCE and PAY byte by byte, pulses start_in_ccm, waits for
// busy_out to fall, checks that it was high for (2*PLEN/128+2)*160 cycles,
// reads the TLEN/8 + PLEN/8 output bytes and compares them with EXP (MAC
// first, then ciphertext).  finished rises when done; checks and failures
// count the comparisons.
module ccm_vec_runner #(
  parameter int unsigned NLEN   = 104,
  parameter int unsigned TLEN   = 32,
  parameter int unsigned PLEN   = 256,
  parameter int unsigned Q_BIAS = 0,
  parameter logic [127:0]       KEY   = '0,
  parameter logic [NLEN-1:0]    NONCE = '0,
  parameter logic [PLEN-1:0]    PAY   = '0,
  parameter logic [TLEN+PLEN-1:0] EXP = '0
) (
  input  logic clk,
  input  logic reset,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic       load_in_k, load_in_p, load_in_n, load_out, start_in_ccm;
  logic [7:0] key_in, nonce, payload, cipher;
  logic       busy_out;

  aes_ccm_top #(.NLEN(NLEN), .TLEN(TLEN), .PLEN(PLEN), .Q_BIAS(Q_BIAS)) dut (.*);

  localparam int OUTB = (TLEN + PLEN) / 8;

  initial begin
    int cyc;
    logic [TLEN+PLEN-1:0] got;
    finished = 1'b0; checks = 0; failures = 0;
    {load_in_k, load_in_p, load_in_n, load_out, start_in_ccm} = '0;
    key_in = '0; nonce = '0; payload = '0;
    @(negedge reset);
    @(posedge clk); #1;
    for (int i = 0; i < 16; i++) begin
      load_in_k = 1'b1; key_in = KEY[127 - 8*i -: 8]; @(posedge clk); #1;
    end
    load_in_k = 1'b0;
    for (int i = 0; i < NLEN/8; i++) begin
      load_in_n = 1'b1; nonce = NONCE[NLEN - 1 - 8*i -: 8]; @(posedge clk); #1;
    end
    load_in_n = 1'b0;
    for (int i = 0; i < PLEN/8; i++) begin
      load_in_p = 1'b1; payload = PAY[PLEN - 1 - 8*i -: 8]; @(posedge clk); #1;
    end
    load_in_p = 1'b0;
    start_in_ccm = 1'b1; @(posedge clk); #1;
    start_in_ccm = 1'b0;
    cyc = 0;
    while (busy_out) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != (2*PLEN/128 + 2) * 160) begin
      failures++;
      $display("FAIL: Plen %0d busy %0d cycles", PLEN, cyc);
    end
    for (int i = 0; i < OUTB; i++) begin
      got[TLEN + PLEN - 1 - 8*i -: 8] = cipher;
      load_out = 1'b1; @(posedge clk); #1;
    end
    load_out = 1'b0;
    checks++;
    if (got != EXP) begin
      failures++;
      $display("FAIL: Nlen %0d Tlen %0d Plen %0d: got %h expected %h", NLEN, TLEN, PLEN, got, EXP);
    end
    finished = 1'b1;
  end

endmodule

// tb_aes8_core: self-checking testbench of the byte-serial AES-128 core.
//
// Runs published AES-128 known-answer vectors (FIPS-197 appendices B and C.1,
// SP 800-38A ECB) plus one block of the CCM example, back to back: each new
// block is started in the done cycle of the previous one.  Checks every result,
// that done comes exactly 160 cycles after start, and that dout holds the result
// after the core goes idle.
module tb_aes8_core;
  import aes_ccm_pkg::*;

  logic   clk = 1'b0;
  logic   reset;
  logic   start;
  block_t din, key;
  logic   busy, done;
  block_t dout;

  int checks = 0;
  int failures = 0;

  aes8_core dut (.*);

  always #5 clk = ~clk;

  localparam int N = 4;
  block_t kv [N];
  block_t pv [N];
  block_t cv [N];

  initial begin
    kv[0] = 128'h000102030405060708090a0b0c0d0e0f;
    pv[0] = 128'h00112233445566778899aabbccddeeff;
    cv[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    kv[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pv[1] = 128'h3243f6a8885a308d313198a2e0370734;
    cv[1] = 128'h3925841d02dc09fbdc118597196a0b32;
    kv[2] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pv[2] = 128'h6bc1bee22e409f96e93d7e117393172a;
    cv[2] = 128'h3ad77bb40d7a3660a89ecaf32466ef97;
    kv[3] = 128'h404142434445464748494a4b4c4d4e4f;
    pv[3] = 128'h09101112131415161718191a1b000020;
    cv[3] = 128'h8b4b2b8a29e0a9501b654adedfa28714;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    reset = 1'b1;
    start = 1'b0;
    din   = '0;
    key   = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    check(!busy && !done, "idle after reset");
    // first block
    start <= 1'b1; din <= pv[0]; key <= kv[0];
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      check(cyc == 160, $sformatf("block %0d latency %0d, expected 160", i, cyc));
      check(dout == cv[i], $sformatf("block %0d: got %h exp %h", i, dout, cv[i]));
      if (i + 1 < N) begin
        start = 1'b1; din = pv[i+1]; key = kv[i+1];
      end
    end
    @(posedge clk);
    #1;
    check(!busy, "idle after last block");
    repeat (5) @(posedge clk);
    check(dout == cv[N-1], "dout holds result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

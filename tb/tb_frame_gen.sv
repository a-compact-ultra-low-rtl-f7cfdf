// tb_frame_gen: checks B0 and CTRi against blocks written out by hand from the
// CCM formatting rules, for the default configuration (Nlen 104, Tlen 32,
// Plen 256, length field = bytes - 1) and for a standard-CCM instance
// (Nlen 56, Tlen 128, Plen 384, length field = bytes).
module tb_frame_gen;

  logic         clk = 1'b0;
  logic         reset, load;
  logic [7:0]   din;
  logic [15:0]  ctr_a;
  logic [63:0]  ctr_b;
  logic [127:0] b0_a, ctr_out_a, b0_b, ctr_out_b;
  int checks = 0;
  int failures = 0;

  frame_gen dut_a (.clk, .reset, .load, .din, .ctr_i(ctr_a), .b0(b0_a), .ctr(ctr_out_a));
  frame_gen #(.NLEN(56), .TLEN(128), .PLEN(384), .Q_BIAS(0))
            dut_b (.clk, .reset, .load, .din, .ctr_i(ctr_b), .b0(b0_b), .ctr(ctr_out_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [103:0] n;
    reset = 1'b1; load = 1'b0; din = '0; ctr_a = '0; ctr_b = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    // document's example nonce: 10 11 ... 1b 00
    n = 104'h101112131415161718191a1b00;
    for (int i = 0; i < 13; i++) begin
      load = 1'b1; din = n[103 - 8*i -: 8];
      @(posedge clk); #1;
    end
    load = 1'b0;
    // flags 0x09: M' = 1 (4-byte tag), L' = 1 (2-byte length field); Q = 31
    check(b0_a == 128'h09101112131415161718191a1b00001f, $sformatf("B0 %h", b0_a));
    for (int i = 0; i < 3; i++) begin
      ctr_a = 16'(i); #1;
      check(ctr_out_a == {8'h01, n, 16'(i)}, $sformatf("CTR%0d %h", i, ctr_out_a));
    end
    // a fresh 7-byte nonce a0..a6 for the 56-bit instance
    for (int i = 0; i < 7; i++) begin
      load = 1'b1; din = 8'ha0 + 8'(i);
      @(posedge clk); #1;
    end
    load = 1'b0;
    // flags 0x3f: M' = 7 (16-byte tag), L' = 7 (8-byte length field); Q = 48
    check(b0_b == 128'h3fa0a1a2a3a4a5a60000000000000030, $sformatf("B0 (std) %h", b0_b));
    ctr_b = 64'h0123456789abcdef; #1;
    check(ctr_out_b == 128'h07a0a1a2a3a4a5a60123456789abcdef, $sformatf("CTR (std) %h", ctr_out_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

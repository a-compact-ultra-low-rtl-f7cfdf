// tb_tag_store: captures a random CBC output, encrypts it with a random key
// stream block and reads the MAC byte by byte, for 32-bit tags (default) and
// 128-bit tags; checks capture, the xor with the top Tlen bits, the priority
// of cap over shift, and the byte order of the output.
module tb_tag_store;

  logic         clk = 1'b0;
  logic         reset;
  logic         cap, enc, shift_out;
  logic [127:0] din;
  logic [7:0]   dout4, dout16;
  int checks = 0;
  int failures = 0;

  tag_store             dut4  (.clk, .reset, .cap, .enc, .din(din[127:96]), .shift_out, .dout(dout4));
  tag_store #(.TLEN(128)) dut16 (.clk, .reset, .cap, .enc, .din, .shift_out, .dout(dout16));

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
    logic [127:0] t, s, u;
    reset = 1'b1; cap = 0; enc = 0; shift_out = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int r = 0; r < 6; r++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      s = {$urandom, $urandom, $urandom, $urandom};
      u = t ^ s;
      cap = 1'b1; shift_out = 1'b1; din = t;     // cap wins over shift
      @(posedge clk); #1;
      cap = 1'b0; shift_out = 1'b0; din = '1;
      @(posedge clk); #1;
      check(dout4 == t[127:120] && dout16 == t[127:120], "captured top byte");
      enc = 1'b1; din = s;
      @(posedge clk); #1;
      enc = 1'b0; din = '0;
      for (int i = 0; i < 16; i++) begin
        if (i < 4) check(dout4 == u[127 - 8*i -: 8], $sformatf("32-bit MAC byte %0d", i));
        check(dout16 == u[127 - 8*i -: 8], $sformatf("128-bit MAC byte %0d", i));
        shift_out = 1'b1;
        @(posedge clk); #1;
        shift_out = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_payload_frame: loads a random payload (default 256 bits and a 384-bit
// instance), checks that each 128-bit block reads back in order, writes a
// random block back in place and checks that only that block changed, then
// shifts the whole buffer out byte by byte and checks the order.
module tb_payload_frame;

  logic         clk = 1'b0;
  logic         reset, load, wr, shift_out;
  logic [7:0]   din;
  logic [1:0]   idx3;
  logic         idx2;
  logic [127:0] blk2, blk3, wr_data;
  logic [7:0]   dout2, dout3;
  int checks = 0;
  int failures = 0;

  payload_frame               dut2 (.clk, .reset, .load, .din, .blk_idx(idx2), .blk(blk2),
                                    .wr, .wr_data, .shift_out, .dout(dout2));
  payload_frame #(.PLEN(384)) dut3 (.clk, .reset, .load, .din, .blk_idx(idx3), .blk(blk3),
                                    .wr, .wr_data, .shift_out, .dout(dout3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [383:0] p3;
    logic [255:0] p2;
    logic [127:0] w;
    reset = 1'b1; load = 0; wr = 0; shift_out = 0; din = '0; idx2 = 0; idx3 = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 12; i++) p3[383 - 32*i -: 32] = $urandom;
      p2 = p3[255:0];               // the 256-bit frame keeps the last 32 bytes
      for (int i = 0; i < 48; i++) begin
        load = 1'b1; din = p3[383 - 8*i -: 8];
        @(posedge clk); #1;
      end
      load = 1'b0;
      for (int b = 0; b < 3; b++) begin
        idx3 = 2'(b); #1;
        check(blk3 == p3[383 - 128*b -: 128], $sformatf("384-bit frame block %0d", b));
      end
      for (int b = 0; b < 2; b++) begin
        idx2 = 1'(b); #1;
        check(blk2 == p2[255 - 128*b -: 128], $sformatf("256-bit frame block %0d", b));
      end
      // write one block back in place (write has priority over shift)
      w = {$urandom, $urandom, $urandom, $urandom};
      idx2 = 1'(r % 2); idx3 = 2'(r); wr_data = w; wr = 1'b1; shift_out = 1'b1;
      @(posedge clk); #1;
      wr = 1'b0; shift_out = 1'b0;
      p3[383 - 128*r -: 128] = w;
      p2[255 - 128*(r % 2) -: 128] = w;
      for (int b = 0; b < 3; b++) begin
        idx3 = 2'(b); #1;
        check(blk3 == p3[383 - 128*b -: 128], $sformatf("after write, 384-bit block %0d", b));
      end
      for (int b = 0; b < 2; b++) begin
        idx2 = 1'(b); #1;
        check(blk2 == p2[255 - 128*b -: 128], $sformatf("after write, 256-bit block %0d", b));
      end
      for (int i = 0; i < 48; i++) begin
        check(dout3 == p3[383 - 8*i -: 8], $sformatf("384-bit out byte %0d", i));
        if (i < 32) check(dout2 == p2[255 - 8*i -: 8], $sformatf("256-bit out byte %0d", i));
        shift_out = 1'b1;
        @(posedge clk); #1;
        shift_out = 1'b0;
      end
      check(dout2 == 8'h00 && dout3 == 8'h00, "zeros shifted in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

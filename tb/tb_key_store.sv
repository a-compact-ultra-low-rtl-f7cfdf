// tb_key_store: loads random 128-bit keys byte by byte, with idle cycles
// between bytes, and checks the assembled key, that it holds while load is
// low, and that reset clears it.
module tb_key_store;

  logic         clk = 1'b0;
  logic         reset, load;
  logic [7:0]   din;
  logic [127:0] key;
  int checks = 0;
  int failures = 0;

  key_store dut (.*);

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
    logic [127:0] k;
    reset = 1'b1; load = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(key == '0, "cleared by reset");
    for (int t = 0; t < 8; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) begin
        load = 1'b1; din = k[127 - 8*i -: 8];
        @(posedge clk); #1;
        load = 1'b0; din = 8'(~din);
        if ($urandom_range(1)) begin @(posedge clk); #1; end
      end
      check(key == k, $sformatf("key %h, expected %h", key, k));
      repeat (3) @(posedge clk);
      #1 check(key == k, "key holds");
    end
    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    check(key == '0, "cleared by reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

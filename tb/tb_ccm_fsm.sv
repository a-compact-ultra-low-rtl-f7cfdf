// tb_ccm_fsm: drives the CCM controller with a model of the AES core's done
// timing (done 160 cycles after each start) and records the sequence of
// blocks it issues.  For NBLK = 2 (default) and NBLK = 3 it checks the order
// B0, CBC(P0..), CTR0, CTR1.., the payload index and counter value of each
// block, that MAC capture, tag encryption and each write-back come in the
// right done cycle, that busy lasts (2*NBLK+2)*160 cycles, and that a start
// while busy is ignored.
module tb_ccm_fsm;
  import aes_ccm_pkg::*;

  logic clk = 1'b0;
  logic reset, start;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

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

  // ---- two controllers, each with its own AES timing model ----
  logic       done2, start2, mac2, tenc2, wr2, busy2;
  aes_src_e   src2;
  logic       idx2;
  logic [1:0] ctr2;
  ccm_fsm dut2 (.clk, .reset, .start, .aes_done(done2), .aes_start(start2), .src(src2),
                .pl_idx(idx2), .ctr_i(ctr2), .mac_cap(mac2), .tag_enc(tenc2), .pl_wr(wr2),
                .busy(busy2));

  logic       done3, start3, mac3, tenc3, wr3, busy3;
  aes_src_e   src3;
  logic [1:0] idx3;
  logic [1:0] ctr3;
  ccm_fsm #(.NBLK(3)) dut3 (.clk, .reset, .start, .aes_done(done3), .aes_start(start3),
                            .src(src3), .pl_idx(idx3), .ctr_i(ctr3), .mac_cap(mac3),
                            .tag_enc(tenc3), .pl_wr(wr3), .busy(busy3));

  int cnt2 = -1, cnt3 = -1;
  assign done2 = (cnt2 == 159);
  assign done3 = (cnt3 == 159);
  always_ff @(posedge clk) begin
    if (reset) begin cnt2 <= -1; cnt3 <= -1; end
    else begin
      if (start2) cnt2 <= 0; else if (cnt2 >= 0 && cnt2 < 159) cnt2 <= cnt2 + 1; else cnt2 <= -1;
      if (start3) cnt3 <= 0; else if (cnt3 >= 0 && cnt3 < 159) cnt3 <= cnt3 + 1; else cnt3 <= -1;
    end
  end

  // event log per controller: one string per start and per strobe
  string log2 [$];
  string log3 [$];
  int busy_cyc2 = 0, busy_cyc3 = 0;
  always @(posedge clk) if (!reset) begin
    if (busy2) busy_cyc2++;
    if (busy3) busy_cyc3++;
    if (mac2)  log2.push_back("mac");
    if (tenc2) log2.push_back("tenc");
    if (wr2)   log2.push_back($sformatf("wr%0d", idx2));
    if (start2) log2.push_back(src2 == SRC_B0 ? "B0" : src2 == SRC_CBC ? $sformatf("cbc%0d", idx2)
                               : $sformatf("ctr%0d", ctr2));
    if (mac3)  log3.push_back("mac");
    if (tenc3) log3.push_back("tenc");
    if (wr3)   log3.push_back($sformatf("wr%0d", idx3));
    if (start3) log3.push_back(src3 == SRC_B0 ? "B0" : src3 == SRC_CBC ? $sformatf("cbc%0d", idx3)
                               : $sformatf("ctr%0d", ctr3));
  end

  function automatic string join_log(input string q [$]);
    string s = "";
    foreach (q[i]) s = {s, q[i], " "};
    return s;
  endfunction

  initial begin
    string e2, e3;
    reset = 1'b1; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(!busy2 && !busy3, "idle after reset");
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    repeat (500) @(posedge clk);
    #1 start = 1'b1;                          // ignored: both busy
    @(posedge clk); #1;
    start = 1'b0;
    while (busy2 || busy3) begin @(posedge clk); #1; end
    e2 = "B0 cbc0 cbc1 mac ctr0 tenc ctr1 wr0 ctr2 wr1 ";
    e3 = "B0 cbc0 cbc1 cbc2 mac ctr0 tenc ctr1 wr0 ctr2 wr1 ctr3 wr2 ";
    check(join_log(log2) == e2, $sformatf("NBLK=2 sequence '%s'", join_log(log2)));
    check(join_log(log3) == e3, $sformatf("NBLK=3 sequence '%s'", join_log(log3)));
    check(busy_cyc2 == 960,  $sformatf("NBLK=2 busy %0d cycles", busy_cyc2));
    check(busy_cyc3 == 1280, $sformatf("NBLK=3 busy %0d cycles", busy_cyc3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

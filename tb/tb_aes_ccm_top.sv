// tb_aes_ccm_top: end-to-end test of the AES-CCM core at its default size
// (Klen 128, Nlen 104, Tlen 32, Plen 256).
//
// Loads the key 0x40..0x4f, the nonce 0x10..0x1b,0x00 and the payload
// 0x20..0x37 followed by eight zero bytes, runs one authenticated encryption
// and reads the 36 output bytes: the 4-byte MAC d52a2543 and the 32 ciphertext
// bytes of the published example for this core.  Then repeats the operation
// with loads, a read and a second start attempted while the core is busy,
// which must all be ignored.  Checks the output, that busy_out stays high for
// exactly 6 x 160 = 960 cycles, and that every mechanism of the datapath
// occurred: B0, CBC chaining, MAC capture, tag encryption, CTR write-back,
// the ignored loads and start, and both output sources.
module tb_aes_ccm_top;

  logic       clk = 1'b0;
  logic       reset;
  logic       load_in_k, load_in_p, load_in_n, load_out, start_in_ccm;
  logic [7:0] key_in, nonce, payload;
  logic [7:0] cipher;
  logic       busy_out;

  aes_ccm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam logic [127:0] KEY   = 128'h404142434445464748494a4b4c4d4e4f;
  localparam logic [103:0] NONCE = 104'h101112131415161718191a1b00;
  localparam logic [255:0] PAY   = 256'h202122232425262728292a2b2c2d2e2f3031323334353637_0000000000000000;
  localparam logic [287:0] EXP   = {32'hd52a2543,
                                    128'hb90d01f76e0fd8b13c97133f9c46159a,
                                    128'h9aaa732eea260458243048d08f1d924e};

  // mechanism counters
  int n_b0 = 0, n_cbc = 0, n_ctr = 0, n_mac = 0, n_tenc = 0, n_wr = 0;
  int n_ign_load = 0, n_ign_start = 0, n_out_tag = 0, n_out_pl = 0;

  always @(posedge clk) if (!reset) begin
    if (dut.u_fsm.aes_start && dut.src == aes_ccm_pkg::SRC_B0)  n_b0++;
    if (dut.u_fsm.aes_start && dut.src == aes_ccm_pkg::SRC_CBC) n_cbc++;
    if (dut.u_fsm.aes_start && dut.src == aes_ccm_pkg::SRC_CTR) n_ctr++;
    if (dut.mac_cap) n_mac++;
    if (dut.tag_enc) n_tenc++;
    if (dut.pl_wr)   n_wr++;
    if (busy_out && (load_in_k || load_in_n || load_in_p || load_out)) n_ign_load++;
    if (busy_out && start_in_ccm) n_ign_start++;
    if (load_out && !busy_out) begin
      if (dut.out_cnt < 4) n_out_tag++;
      else                 n_out_pl++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_all();
    for (int i = 0; i < 16; i++) begin
      load_in_k = 1'b1; key_in = KEY[127 - 8*i -: 8];
      @(posedge clk); #1;
    end
    load_in_k = 1'b0;
    for (int i = 0; i < 13; i++) begin
      load_in_n = 1'b1; nonce = NONCE[103 - 8*i -: 8];
      @(posedge clk); #1;
    end
    load_in_n = 1'b0;
    for (int i = 0; i < 32; i++) begin
      load_in_p = 1'b1; payload = PAY[255 - 8*i -: 8];
      @(posedge clk); #1;
    end
    load_in_p = 1'b0;
  endtask

  task automatic run_and_read(input bit disturb, input int run);
    int cyc;
    logic [287:0] got;
    start_in_ccm = 1'b1;
    @(posedge clk); #1;
    start_in_ccm = 1'b0;
    cyc = 0;
    while (busy_out) begin
      if (disturb && cyc == 100) begin
        load_in_k = 1'b1; key_in = 8'hff;
        load_in_n = 1'b1; nonce = 8'hff;
        load_in_p = 1'b1; payload = 8'hff;
        load_out  = 1'b1;
      end else if (disturb && cyc == 200) begin
        start_in_ccm = 1'b1;
      end else begin
        {load_in_k, load_in_n, load_in_p, load_out, start_in_ccm} = '0;
      end
      @(posedge clk); #1;
      cyc++;
    end
    {load_in_k, load_in_n, load_in_p, load_out, start_in_ccm} = '0;
    check(cyc == 960, $sformatf("run %0d: busy for %0d cycles, expected 960", run, cyc));
    for (int i = 0; i < 36; i++) begin
      got[287 - 8*i -: 8] = cipher;
      load_out = 1'b1;
      @(posedge clk); #1;
    end
    load_out = 1'b0;
    check(got == EXP, $sformatf("run %0d: output %h, expected %h", run, got, EXP));
  endtask

  initial begin
    reset = 1'b1;
    {load_in_k, load_in_p, load_in_n, load_out, start_in_ccm} = '0;
    key_in = '0; nonce = '0; payload = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    check(!busy_out, "idle after reset");
    load_all();
    run_and_read(1'b0, 1);
    // The payload register now holds ciphertext: reload and run again, with
    // disturbances while busy.
    load_all();
    run_and_read(1'b1, 2);

    check(n_b0 == 2,   $sformatf("B0 blocks %0d", n_b0));
    check(n_cbc == 4,  $sformatf("CBC blocks %0d", n_cbc));
    check(n_ctr == 6,  $sformatf("CTR blocks %0d", n_ctr));
    check(n_mac == 2,  $sformatf("MAC captures %0d", n_mac));
    check(n_tenc == 2, $sformatf("tag encryptions %0d", n_tenc));
    check(n_wr == 4,   $sformatf("ciphertext write-backs %0d", n_wr));
    check(n_ign_load > 0,  "loads while busy never exercised");
    check(n_ign_start > 0, "start while busy never exercised");
    check(n_out_tag == 8 && n_out_pl == 64,
          $sformatf("output reads tag %0d payload %0d", n_out_tag, n_out_pl));
    $display("mechanisms: B0=%0d CBC=%0d CTR=%0d mac_cap=%0d tag_enc=%0d wr=%0d ignored_loads=%0d ignored_starts=%0d",
             n_b0, n_cbc, n_ctr, n_mac, n_tenc, n_wr, n_ign_load, n_ign_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

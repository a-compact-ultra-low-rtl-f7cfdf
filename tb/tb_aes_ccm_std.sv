// tb_aes_ccm_std: the CCM core in other configurations, with the length field
// set to the payload byte count (standard SP 800-38C CCM, Q_BIAS = 0).
// Expected outputs come from an independent CCM implementation:
//   - the default sizes (Nlen 104, Tlen 32, Plen 256) on the document's example
//     inputs: same ciphertext, standard MAC 8d46d5f5;
//   - Nlen 96, Tlen 64, Plen 128 on random inputs;
//   - Nlen 56, Tlen 128, Plen 384 on random inputs.
module tb_aes_ccm_std;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  logic f0, f1, f2;
  int   c0, c1, c2, e0, e1, e2;

  ccm_vec_runner #(
    .NLEN(104), .TLEN(32), .PLEN(256), .Q_BIAS(0),
    .KEY(128'h404142434445464748494a4b4c4d4e4f),
    .NONCE(104'h101112131415161718191a1b00),
    .PAY(256'h202122232425262728292a2b2c2d2e2f30313233343536370000000000000000),
    .EXP({32'h8d46d5f5, 256'hb90d01f76e0fd8b13c97133f9c46159a9aaa732eea260458243048d08f1d924e})
  ) r0 (.clk, .reset, .finished(f0), .checks(c0), .failures(e0));

  ccm_vec_runner #(
    .NLEN(96), .TLEN(64), .PLEN(128), .Q_BIAS(0),
    .KEY(128'ha54dca182530bb1d6d132cded6237b2e),
    .NONCE(96'hd91e3f721fcb1971174494d6),
    .PAY(128'h493c9d5c3460be31201e69fedaa0eee8),
    .EXP(192'hf6fc86348723de6789848bdcd9078ca14fa41e18778f8360)
  ) r1 (.clk, .reset, .finished(f1), .checks(c1), .failures(e1));

  ccm_vec_runner #(
    .NLEN(56), .TLEN(128), .PLEN(384), .Q_BIAS(0),
    .KEY(128'hb9997f5c7c2999fdafe593253cd654af),
    .NONCE(56'h4dfad71427a0ae),
    .PAY(384'hb3fee9232f8af2211f9ee491c5b10becb5563bfc1e6f93427ecbc8fe2955e5cd8e46dc8ed4b7c2764d2a5a4d767706f8),
    .EXP(512'hf809e16c359e0b8ace88a1d93fd66f87140a39e633a73ad1d14a730018c7b018f997a1b3bd307d7bf5188deb0c1a834d24a69afe0f93f9d3c7a579f3db35db63)
  ) r2 (.clk, .reset, .finished(f2), .checks(c2), .failures(e2));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2 + 1);
    $finish;
  end

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    wait (f0 && f1 && f2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2);
    $finish;
  end

endmodule

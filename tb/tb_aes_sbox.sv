// tb_aes_sbox: exhaustive test of the AES S-box.
//
// For all 256 inputs the expected value is worked out here by a different
// method from the one the design uses: the inverse is found by searching for
// the b with a*b = 1 (shift-and-add multiplication written out in this file),
// then the affine map is applied as a matrix of shifted copies.  A few
// published FIPS-197 entries are checked as well, and that the table is a
// permutation.
module tb_aes_sbox;

  logic [7:0] a, y;
  int checks = 0;
  int failures = 0;

  aes_sbox dut (.a, .y);

  function automatic logic [7:0] mul(input logic [7:0] x, input logic [7:0] z);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (z[i]) p = p ^ (16'(x) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p = p ^ (16'h011b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv;
    logic [7:0] r;
    inv = 8'h00;
    for (int b = 1; b < 256; b++) if (mul(x, 8'(b)) == 8'h01) inv = 8'(b);
    r = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
            ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [256];
    logic [7:0] kat_in  [5] = '{8'h00, 8'h01, 8'h53, 8'hff, 8'h9a};
    logic [7:0] kat_out [5] = '{8'h63, 8'h7c, 8'hed, 8'h16, 8'hb8};
    foreach (seen[i]) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y == ref_sbox(8'(i)), $sformatf("S(%02h) = %02h, expected %02h", i, y, ref_sbox(8'(i))));
      seen[y] = 1'b1;
    end
    for (int i = 0; i < 256; i++) check(seen[i], $sformatf("value %02h never produced", i));
    for (int i = 0; i < 5; i++) begin
      a = kat_in[i];
      #1;
      check(y == kat_out[i], $sformatf("FIPS-197 S(%02h) = %02h", kat_in[i], y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

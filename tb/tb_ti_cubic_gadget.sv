// tb_ti_cubic_gadget: checks the two S-box gadgets SBOX_26 and SBOX_49
// (with the affine map).
//
// 1. Correctness: for every byte value, with several random sharings, the
//    XOR of the output shares equals x^26 resp. A(x^49), computed here by
//    repeated multiplication; the two in series give the AES S-box.
// 2. Non-completeness: output share k must not change when an input share
//    outside its allowed set changes. The sets are listed here again.
// 3. Second order: for every pair of output shares, some input share is
//    outside both sets.
module tb_ti_cubic_gadget;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  // Allowed input shares per output share (bit i: share i).
  localparam logic [9:0] SETS [10] = '{
    10'b1101000111, 10'b0011010111, 10'b0101111010, 10'b1111110000,
    10'b1110001011, 10'b1011011100, 10'b0011101101, 10'b1100110101,
    10'b1000111011, 10'b0110101110
  };

  shbyte_t x26, y26, x49, y49, y49b;

  ti_cubic_gadget #(.EXPONENT(26), .AFFINE(1'b0)) dut26 (.x(x26), .y(y26));
  ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) dut49 (.x(x49), .y(y49));
  ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) dut49b (.x(y26), .y(y49b));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // Correctness over all inputs.
    for (int v = 0; v < 256; v++) begin
      for (int rep = 0; rep < 3; rep++) begin
        x26 = share(byte_t'(v));
        x49 = share(byte_t'(v));
        #1;
        check(unshare(y26) == power(byte_t'(v), 26),
              $sformatf("x^26 of %02h", v));
        check(unshare(y49) == affine(power(byte_t'(v), 49)),
              $sformatf("A(x^49) of %02h", v));
        check(unshare(y49b) == sbox(byte_t'(v)),
              $sformatf("S-box of %02h", v));
      end
    end
    // Known S-box values (FIPS-197 Figure 7).
    x26 = share(8'h00); #1; check(unshare(y49b) == 8'h63, "S(00)");
    x26 = share(8'h53); #1; check(unshare(y49b) == 8'hed, "S(53)");
    x26 = share(8'hff); #1; check(unshare(y49b) == 8'h16, "S(ff)");

    // Non-completeness: flip a share outside the set of output share k.
    for (int trial = 0; trial < 400; trial++) begin
      shbyte_t a26, a49;
      int i;
      x26 = share(byte_t'($urandom));
      x49 = share(byte_t'($urandom));
      #1;
      a26 = y26;
      a49 = y49;
      i = $urandom_range(NS - 1);
      x26[i] = x26[i] ^ byte_t'($urandom_range(255, 1));
      x49[i] = x49[i] ^ byte_t'($urandom_range(255, 1));
      #1;
      for (int k = 0; k < NS; k++)
        if (!SETS[k][i]) begin
          check(y26[k] == a26[k], $sformatf("SBOX_26 share %0d reads share %0d", k, i));
          check(y49[k] == a49[k], $sformatf("SBOX_49 share %0d reads share %0d", k, i));
        end
    end

    // Any two output shares together miss an input share.
    for (int k = 0; k < NS; k++)
      for (int l = k + 1; l < NS; l++)
        check((SETS[k] | SETS[l]) != 10'h3ff, $sformatf("shares %0d,%0d", k, l));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

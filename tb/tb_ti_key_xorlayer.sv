// tb_ti_key_xorlayer: feeds the XOR layer with a shared round key and the
// shared S-box outputs of its RotWord lanes (computed by the plain model)
// and checks the collapsed result against the plain key expansion, for all
// ten round constants, including the FIPS-197 Appendix A.1 key schedule.
module tb_ti_key_xorlayer;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  shstate_t      k_in, k_out;
  shbyte_t [3:0] t;
  gf8_t          rc;

  ti_key_xorlayer dut (.k_in, .t, .rc, .k_out);

  int checks = 0, failures = 0;

  function automatic byte_t rcon_ref(int r);
    byte_t c = 8'h01;
    for (int i = 1; i < r; i++) c = mul(c, 8'h02);
    return c;
  endfunction

  task automatic step(blk_t k, int r, output blk_t got);
    k_in = share_blk(k);
    for (int j = 0; j < 4; j++) t[j] = share(sbox(k[12 + (j+1)%4]));
    rc = rcon_ref(r);
    #1;
    got = unshare_blk(k_out);
  endtask

  initial begin
    blk_t k, got;
    // FIPS-197 A.1: key 2b7e1516..., round key 10 = d014f9a8c9ee2589e13f0cc8b6630ca6.
    k = from_bits(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int r = 1; r <= 10; r++) begin
      step(k, r, got);
      checks++;
      if (got != next_key(k, r)) begin
        failures++;
        $display("FAIL: round %0d", r);
      end
      k = got;
    end
    checks++;
    if (k != from_bits(128'hd014f9a8c9ee2589e13f0cc8b6630ca6)) begin
      failures++;
      $display("FAIL: round key 10 %h", k);
    end
    for (int n = 0; n < 200; n++) begin
      int r;
      r = $urandom_range(10, 1);
      k = rand_blk();
      step(k, r, got);
      checks++;
      if (got != next_key(k, r)) begin
        failures++;
        $display("FAIL: random key, round %0d", r);
      end
    end
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

// tb_ti_shiftrows: the shared ShiftRows must act like plain ShiftRows on the
// collapsed state and move whole shares (share i of a byte stays share i).
module tb_ti_shiftrows;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  shstate_t s_in, s_out;

  ti_shiftrows dut (.s_in, .s_out);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 200; t++) begin
      blk_t p, want;
      shblk_t si, so;
      p = rand_blk();
      si = share_blk(p);
      s_in = si;
      #1;
      so = s_out;
      want = ref_shift_rows(p);
      checks++;
      if (unshare_blk(so) != want) begin
        failures++;
        $display("FAIL: %h -> %h", p, unshare_blk(so));
      end
      // Row 1 of column 0 comes from column 1, with all its shares.
      checks++;
      if (so[1] != si[5]) failures++;
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

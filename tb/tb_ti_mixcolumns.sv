// tb_ti_mixcolumns: with en = 1 the collapsed output must equal plain
// MixColumns of the collapsed input (FIPS-197 example column included);
// with en = 0 the shares must pass unchanged.
module tb_ti_mixcolumns;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  logic     en;
  shstate_t s_in, s_out;

  ti_mixcolumns dut (.en, .s_in, .s_out);

  int checks = 0, failures = 0;

  initial begin
    blk_t p;
    // Column db 13 53 45 -> 8e 4d a1 bc.
    p = rand_blk();
    p[0] = 8'hdb; p[1] = 8'h13; p[2] = 8'h53; p[3] = 8'h45;
    en = 1'b1;
    s_in = share_blk(p);
    #1;
    checks++;
    if (unshare_blk(s_out)[3:0] != {8'hbc, 8'ha1, 8'h4d, 8'h8e}) begin
      failures++;
      $display("FAIL: known column");
    end
    for (int t = 0; t < 300; t++) begin
      p = rand_blk();
      en = t[0];
      s_in = share_blk(p);
      #1;
      checks++;
      if (en) begin
        if (unshare_blk(s_out) != mix_columns(p)) begin
          failures++;
          $display("FAIL: MixColumns of %h", p);
        end
      end else if (s_out != s_in) begin
        failures++;
        $display("FAIL: bypass changed the shares");
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

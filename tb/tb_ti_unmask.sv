// tb_ti_unmask: the XOR tree must return the plain value of a random sharing,
// byte 0 in the top bits.
module tb_ti_unmask;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  shstate_t     s_in;
  logic [127:0] plain;

  ti_unmask dut (.s_in, .plain);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 300; t++) begin
      blk_t p;
      p = rand_blk();
      s_in = share_blk(p);
      #1;
      checks++;
      if (from_bits(plain) != p) begin
        failures++;
        $display("FAIL: %h", p);
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

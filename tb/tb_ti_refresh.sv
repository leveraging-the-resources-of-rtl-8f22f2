// tb_ti_refresh: checks the 12-bit-per-bit refresh of a 10-share byte.
//
// The XOR of the shares must be unchanged for random inputs and randomness;
// with no randomness the shares pass unchanged; a single random bit must
// toggle exactly two shares of its data bit; and every share must receive
// randomness (no share left unrefreshed).
module tb_ti_refresh;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  shbyte_t x, y;
  rbyte_t  r;

  ti_refresh dut (.x, .r, .y);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [NS-1:0] touched;
    for (int t = 0; t < 500; t++) begin
      x = share(byte_t'($urandom));
      for (int j = 0; j < RB; j++) r[j] = byte_t'($urandom);
      #1;
      check(unshare(y) == unshare(x), "value changed");
      check(y != x || r == '0, "shares not refreshed");
    end
    x = share(8'h5a);
    r = '0;
    #1;
    check(y == x, "zero randomness must not change shares");
    touched = '0;
    for (int j = 0; j < RB; j++)
      for (int b = 0; b < 8; b++) begin
        int n;
        r = '0;
        r[j][b] = 1'b1;
        #1;
        n = 0;
        for (int i = 0; i < NS; i++) begin
          n += int'(y[i][b] != x[i][b]);
          if (y[i][b] != x[i][b]) touched[i] = 1'b1;
          check((y[i] ^ x[i]) == ((y[i][b] != x[i][b]) ? byte_t'(1 << b) : 8'h00),
                "random bit reached another data bit");
        end
        check(n == 2, $sformatf("random bit %0d of data bit %0d toggles %0d shares", j, b, n));
      end
    check(touched == '1, "a share is never refreshed");
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

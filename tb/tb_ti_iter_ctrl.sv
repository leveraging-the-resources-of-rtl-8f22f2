// tb_ti_iter_ctrl: checks the control sequence of the iterative core against
// a cycle schedule worked out by hand: output cycles of slots A and B,
// MixColumns disabled only in each slot's last round, key updates on odd
// cycles with round constants 01..36, second-slot acceptance only in the
// cycle after slot A, and acceptance of a new block at the last output.
module tb_ti_iter_ctrl;
  import aes_ti_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, ld_state, ld_key, key_en, mc_en, out_valid, out_slot;
  gf8_t rc;

  ti_iter_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [7:0] RCON [1:10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                         8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  // Runs one operation; pair = 1 offers a second block in cycle 0.
  task automatic run(bit pair);
    @(negedge clk);
    in_valid = 1'b1;
    #1;
    check(in_ready && ld_state && ld_key && key_en, "start not taken");
    @(negedge clk);            // cyc = 0
    in_valid = pair;
    #1;
    check(in_ready, "second slot not offered");
    check(ld_state == pair && !ld_key, "second slot load");
    for (int c = 0; c <= 21; c++) begin
      if (c > 0) begin
        @(negedge clk);
        in_valid = 1'b1;       // offered all the time from now on
        #1;
      end
      check(mc_en == !(c == 19 || c == 20), $sformatf("mc_en at %0d", c));
      check(out_valid == (c == 20 || (c == 21 && pair)), $sformatf("out_valid at %0d", c));
      if (out_valid) check(out_slot == (c == 21), $sformatf("slot at %0d", c));
      if (c >= 1 && c < 20) begin
        check(key_en == c[0], $sformatf("key_en at %0d", c));
        if (c[0]) check(rc == RCON[(c+1)/2], $sformatf("rcon at %0d", c));
      end
      if (c >= 1 && c < (pair ? 21 : 20))
        check(!in_ready && !ld_state, $sformatf("taken while busy at %0d", c));
      if (c == (pair ? 21 : 20)) begin
        check(in_ready && ld_key, "not taken at last output");
        break;
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1;
    check(in_ready && !out_valid, "idle after reset");
    run(1'b0);
    run(1'b1);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

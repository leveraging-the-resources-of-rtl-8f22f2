// tb_ti_aes_iterative: end-to-end check of the iterative masked AES-128 core
// at its full size.
//
// Runs single blocks (first the FIPS-197 Appendix C.1 vector), pairs of
// blocks in consecutive cycles (slot A and slot B under one key), and a new
// operation accepted in the cycle of the previous last output. Every
// ciphertext is collapsed and compared with the plain reference model; its
// latency must be 21 cycles from the cycle it is presented in (load, then
// 10 rounds of 2 cycles) and its slot must match. Fresh randomness every
// cycle. Counts how often each mechanism occurred.
module tb_ti_aes_iterative;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  localparam int LATENCY = 21;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  logic      in_ready;
  shstate_t  pt, key, ct;
  iter_rnd_t rnd;
  logic      ct_valid, ct_slot;

  ti_aes_iterative dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  blk_t exp_q [$];
  int   t_q [$];
  bit   slot_q [$];
  int   n_out = 0, n_single = 0, n_pair = 0, n_overlap = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic rbyte_t rand_rbyte();
    rbyte_t r;
    for (int j = 0; j < RB; j++) r[j] = 8'($urandom);
    return r;
  endfunction

  // Fresh randomness every cycle.
  always @(negedge clk) begin
    for (int n = 0; n < 16; n++) begin
      rnd.s_sb[n] = rand_rbyte(); rnd.s_mc[n] = rand_rbyte();
    end
    for (int j = 0; j < 4; j++) begin
      rnd.k_sb[j] = rand_rbyte(); rnd.k_xl[j] = rand_rbyte();
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && ct_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        blk_t want;
        want = exp_q.pop_front();
        check(unshare_blk(ct) == want, $sformatf("block %0d ciphertext", n_out));
        check(cycle - t_q.pop_front() == LATENCY, $sformatf("block %0d latency", n_out));
        check(ct_slot == slot_q.pop_front(), $sformatf("block %0d slot", n_out));
      end
      n_out++;
    end
  end

  // Present a block in the next cycle; returns whether it was taken.
  task automatic offer(blk_t p, blk_t k, bit slot, output bit taken);
    @(negedge clk);
    pt = share_blk(p);
    key = share_blk(k);
    in_valid = 1'b1;
    #1;
    taken = in_ready;
    if (taken) begin
      exp_q.push_back(encrypt(p, k));
      t_q.push_back(cycle);
      slot_q.push_back(slot);
    end
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic wait_out(int n);
    while (n_out < n) @(posedge clk);
  endtask

  initial begin
    bit tk;
    blk_t k;
    pt = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Single block: FIPS-197 C.1.
    offer(from_bits(128'h00112233445566778899aabbccddeeff),
          from_bits(128'h000102030405060708090a0b0c0d0e0f), 1'b0, tk);
    check(tk, "first block not taken");
    idle();
    // While busy (past the second-slot cycle) nothing is taken.
    repeat (3) @(negedge clk);
    offer(rand_blk(), rand_blk(), 1'b0, tk);
    check(!tk, "block taken while busy");
    idle();
    wait_out(1);
    n_single++;

    // Pairs: slot A then slot B in the next cycle, same key.
    for (int p = 0; p < 3; p++) begin
      repeat (2) @(negedge clk);
      k = rand_blk();
      offer(rand_blk(), k, 1'b0, tk);
      check(tk, "slot A not taken");
      offer(rand_blk(), k, 1'b1, tk);
      check(tk, "slot B not taken");
      if (tk) n_pair++;
      idle();
      wait_out(2 + 2 * p + 1);
    end

    // Overlap: a pair, then a new block offered until taken; it must be
    // taken in the cycle of slot B's output.
    k = rand_blk();
    offer(rand_blk(), k, 1'b0, tk);
    offer(rand_blk(), k, 1'b1, tk);
    if (tk) n_pair++;
    tk = 1'b0;
    while (!tk) offer(rand_blk(), rand_blk(), 1'b0, tk);
    check(exp_q.size() == 2 && ct_valid && ct_slot, "new block not taken at last output");
    if (ct_valid && ct_slot) n_overlap++;
    idle();
    wait_out(n_out + exp_q.size());
    repeat (3) @(posedge clk);

    check(exp_q.size() == 0, "outputs missing");
    check(n_single > 0, "single-block run never happened");
    check(n_pair > 0, "two-block run never happened");
    check(n_overlap > 0, "overlapped start never happened");
    $display("single=%0d pairs=%0d overlapped=%0d outputs=%0d", n_single, n_pair, n_overlap, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (600) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ti_aes_pipelined: end-to-end check of the 30-stage pipelined masked
// AES-128 core at its full size.
//
// Blocks are fed one per cycle (the first is the FIPS-197 Appendix C.1
// vector), each under its own random key and with fresh sharings, followed
// by a gap and a second burst. Every ciphertext is collapsed and compared
// with the plain reference model, its latency must be exactly 29 clock edges
// (presented in cycle 1, out in cycle 30), and blocks must leave one per
// cycle in order. Fresh randomness is driven every cycle.
module tb_ti_aes_pipelined;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLK    = 24;
  localparam int LATENCY = 29;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  shstate_t              pt, key, ct;
  pipe_round_rnd_t [8:0] rnd_round;
  pipe_final_rnd_t       rnd_final;
  logic                  ct_valid;

  ti_aes_pipelined dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  blk_t exp_q [$];
  int   t_q [$];
  int   n_out = 0, n_b2b = 0, last_out = -10;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic rbyte_t rand_rbyte();
    rbyte_t r;
    for (int j = 0; j < RB; j++) r[j] = 8'($urandom);
    return r;
  endfunction

  // Fresh randomness every cycle.
  always @(negedge clk) begin
    for (int r = 0; r < 9; r++) begin
      pipe_round_rnd_t x;
      for (int n = 0; n < 16; n++) begin
        x.s26[n] = rand_rbyte(); x.s49[n] = rand_rbyte(); x.sark[n] = rand_rbyte();
      end
      for (int j = 0; j < 4; j++) begin
        x.k26[j] = rand_rbyte(); x.k49[j] = rand_rbyte(); x.kxl[j] = rand_rbyte();
      end
      rnd_round[r] = x;
    end
    for (int n = 0; n < 16; n++) rnd_final.s26[n] = rand_rbyte();
    for (int j = 0; j < 4; j++) rnd_final.k26[j] = rand_rbyte();
  end

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && ct_valid) begin
      blk_t got, want;
      got = unshare_blk(ct);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else begin
        want = exp_q.pop_front();
        if (got !== want) begin
          failures++;
          $display("FAIL: block %0d ct %h want %h", n_out, got, want);
        end
        checks++;
        if (cycle - t_q.pop_front() != LATENCY) begin
          failures++;
          $display("FAIL: block %0d latency wrong at cycle %0d", n_out, cycle);
        end
      end
      if (last_out == cycle - 1) n_b2b++;
      last_out = cycle;
      n_out++;
    end
  end

  task automatic send(blk_t p, blk_t k);
    @(negedge clk);
    pt = share_blk(p);
    key = share_blk(k);
    in_valid = 1'b1;
    exp_q.push_back(encrypt(p, k));
    t_q.push_back(cycle);      // cycle in which the block is presented
  endtask

  initial begin
    pt = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(from_bits(128'h00112233445566778899aabbccddeeff),
         from_bits(128'h000102030405060708090a0b0c0d0e0f));
    for (int b = 1; b < NBLK / 2; b++) send(rand_blk(), rand_blk());
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    for (int b = NBLK / 2; b < NBLK; b++) send(rand_blk(), rand_blk());
    @(negedge clk) in_valid = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    if (n_out != NBLK) begin
      failures++;
      $display("FAIL: %0d blocks out, %0d expected", n_out, NBLK);
    end
    // One block per cycle: all but the first of each burst leave back to back.
    checks++;
    if (n_b2b != NBLK - 2) begin
      failures++;
      $display("FAIL: %0d back-to-back outputs, %0d expected", n_b2b, NBLK - 2);
    end
    $display("back-to-back outputs: %0d, bursts: 2", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

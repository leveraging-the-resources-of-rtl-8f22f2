// tb_aes_ti_top: end-to-end test of the whole design at its default size.
//
// Both cores run at the same time. The iterative core encrypts a single
// block (the FIPS-197 C.1 vector), pairs of blocks in consecutive cycles
// (slots A and B) and a block taken at the previous operation's last
// output. The pipelined core takes a burst of blocks one per cycle, each
// under its own key, a gap, and a second burst. Each ciphertext, read from
// the collapsed output port, is compared with the plain reference model, and
// must also match the XOR of the shared output; latencies are checked (21
// cycles from presentation for the iterative core, 29 for the pipeline).
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_aes_ti_top;
  import aes_ti_pkg::*;
  import aes_ref_pkg::*;

  localparam int IT_LAT = 21;
  localparam int PP_LAT = 29;
  localparam int PP_BLK = 16;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  it_in_valid = 1'b0, it_in_ready;
  shstate_t              it_pt, it_key, it_ct;
  iter_rnd_t             it_rnd;
  logic [127:0]          it_ct_plain;
  logic                  it_ct_valid, it_ct_slot;
  logic                  pp_in_valid = 1'b0;
  shstate_t              pp_pt, pp_key, pp_ct;
  pipe_round_rnd_t [8:0] pp_rnd_round;
  pipe_final_rnd_t       pp_rnd_final;
  logic [127:0]          pp_ct_plain;
  logic                  pp_ct_valid;

  aes_ti_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // mechanisms
  int n_it_single = 0, n_it_pair = 0, n_it_overlap = 0, n_it_busy_refused = 0;
  int n_pp_b2b = 0, n_pp_gap = 0;
  int it_out = 0, pp_out = 0, pp_last = -10;

  blk_t it_exp [$], pp_exp [$];
  int   it_t [$], pp_t [$];
  bit   it_slot [$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic rbyte_t rand_rbyte();
    rbyte_t r;
    for (int j = 0; j < RB; j++) r[j] = 8'($urandom);
    return r;
  endfunction

  // Fresh randomness for both cores every cycle.
  always @(negedge clk) begin
    for (int n = 0; n < 16; n++) begin
      it_rnd.s_sb[n] = rand_rbyte(); it_rnd.s_mc[n] = rand_rbyte();
    end
    for (int j = 0; j < 4; j++) begin
      it_rnd.k_sb[j] = rand_rbyte(); it_rnd.k_xl[j] = rand_rbyte();
    end
    for (int r = 0; r < 9; r++) begin
      pipe_round_rnd_t x;
      for (int n = 0; n < 16; n++) begin
        x.s26[n] = rand_rbyte(); x.s49[n] = rand_rbyte(); x.sark[n] = rand_rbyte();
      end
      for (int j = 0; j < 4; j++) begin
        x.k26[j] = rand_rbyte(); x.k49[j] = rand_rbyte(); x.kxl[j] = rand_rbyte();
      end
      pp_rnd_round[r] = x;
    end
    for (int n = 0; n < 16; n++) pp_rnd_final.s26[n] = rand_rbyte();
    for (int j = 0; j < 4; j++) pp_rnd_final.k26[j] = rand_rbyte();
  end

  // Output checkers.
  always @(posedge clk) begin
    if (rst_n && it_ct_valid) begin
      if (it_exp.size() == 0) check(0, "iterative: unexpected output");
      else begin
        blk_t w;
        w = it_exp.pop_front();
        check(from_bits(it_ct_plain) == w, $sformatf("iterative block %0d", it_out));
        check(unshare_blk(it_ct) == w, "iterative shared output");
        check(cycle - it_t.pop_front() == IT_LAT, "iterative latency");
        check(it_ct_slot == it_slot.pop_front(), "iterative slot");
      end
      it_out++;
    end
    if (rst_n && pp_ct_valid) begin
      if (pp_exp.size() == 0) check(0, "pipeline: unexpected output");
      else begin
        blk_t w;
        w = pp_exp.pop_front();
        check(from_bits(pp_ct_plain) == w, $sformatf("pipeline block %0d", pp_out));
        check(unshare_blk(pp_ct) == w, "pipeline shared output");
        check(cycle - pp_t.pop_front() == PP_LAT, "pipeline latency");
      end
      if (pp_last == cycle - 1) n_pp_b2b++;
      else if (pp_out > 0) n_pp_gap++;
      pp_last = cycle;
      pp_out++;
    end
  end

  // ---------------------------------------------------- iterative stimulus
  task automatic it_offer(blk_t p, blk_t k, bit slot, output bit taken);
    @(negedge clk);
    it_pt = share_blk(p);
    it_key = share_blk(k);
    it_in_valid = 1'b1;
    #1;
    taken = it_in_ready;
    if (taken) begin
      it_exp.push_back(encrypt(p, k));
      it_t.push_back(cycle);
      it_slot.push_back(slot);
    end
  endtask

  task automatic it_idle();
    @(negedge clk);
    it_in_valid = 1'b0;
  endtask

  bit it_done = 0, pp_done = 0;

  initial begin : it_stim
    bit tk;
    blk_t k;
    it_pt = '0; it_key = '0;
    @(posedge rst_n);
    it_offer(from_bits(128'h00112233445566778899aabbccddeeff),
             from_bits(128'h000102030405060708090a0b0c0d0e0f), 1'b0, tk);
    check(tk, "iterative: first block refused");
    it_idle();
    repeat (2) @(negedge clk);
    it_offer(rand_blk(), rand_blk(), 1'b0, tk);
    if (!tk) n_it_busy_refused++;
    it_idle();
    while (it_out < 1) @(posedge clk);
    n_it_single++;
    for (int p = 0; p < 2; p++) begin
      k = rand_blk();
      it_offer(rand_blk(), k, 1'b0, tk);
      it_offer(rand_blk(), k, 1'b1, tk);
      if (tk) n_it_pair++;
      tk = 1'b0;
      // keep offering: the next block must be taken at slot B's output
      while (!tk) it_offer(rand_blk(), rand_blk(), 1'b0, tk);
      if (it_ct_valid && it_ct_slot) n_it_overlap++;
      it_idle();
      while (it_exp.size() > 1) @(posedge clk);
    end
    while (it_exp.size() > 0) @(posedge clk);
    it_done = 1;
  end

  // ---------------------------------------------------- pipeline stimulus
  task automatic pp_send(blk_t p, blk_t k);
    @(negedge clk);
    pp_pt = share_blk(p);
    pp_key = share_blk(k);
    pp_in_valid = 1'b1;
    pp_exp.push_back(encrypt(p, k));
    pp_t.push_back(cycle);
  endtask

  initial begin : pp_stim
    pp_pt = '0; pp_key = '0;
    @(posedge rst_n);
    pp_send(from_bits(128'h00112233445566778899aabbccddeeff),
            from_bits(128'h000102030405060708090a0b0c0d0e0f));
    for (int b = 1; b < PP_BLK / 2; b++) pp_send(rand_blk(), rand_blk());
    @(negedge clk) pp_in_valid = 1'b0;
    repeat (4) @(negedge clk);
    for (int b = PP_BLK / 2; b < PP_BLK; b++) pp_send(rand_blk(), rand_blk());
    @(negedge clk) pp_in_valid = 1'b0;
    while (pp_exp.size() > 0) @(posedge clk);
    pp_done = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (it_done && pp_done);
    repeat (3) @(posedge clk);
    check(pp_out == PP_BLK, "pipeline block count");
    check(n_it_single > 0, "iterative single block never ran");
    check(n_it_pair > 0, "iterative two-block run never happened");
    check(n_it_overlap > 0, "iterative overlapped start never happened");
    check(n_it_busy_refused > 0, "iterative busy refusal never happened");
    check(n_pp_b2b > 0, "pipeline back-to-back outputs never happened");
    check(n_pp_gap > 0, "pipeline gap never happened");
    $display("iterative: single=%0d pairs=%0d overlapped=%0d refused=%0d outputs=%0d",
             n_it_single, n_it_pair, n_it_overlap, n_it_busy_refused, it_out);
    $display("pipeline: outputs=%0d back_to_back=%0d gaps=%0d", pp_out, n_pp_b2b, n_pp_gap);
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

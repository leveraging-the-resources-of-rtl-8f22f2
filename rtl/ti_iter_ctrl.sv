// ti_iter_ctrl: control sequence of the iterative threshold AES datapath.
//
// The datapath has two register stages per round (before and after the
// S-box split), so one round takes two cycles and AES-128 takes 20. The two
// stages are used by two blocks in turn: a block accepted while the
// controller is idle goes to slot A; a second block offered in the very next
// cycle goes to slot B and rides one stage behind A, under the same key.
//
// cyc counts cycles from the one in which slot A first sits in register a
// (cyc = 0). Slot A's round r uses cycles 2r and 2r+1, slot B's 2r+1 and
// 2r+2. The key register advances at the end of every odd cycle, loading
// round key (cyc+1)/2 with that round's constant. MixColumns is disabled in
// the second half of each slot's last round (cyc 19 for A, 20 for B). The
// ciphertext of A is on the datapath output in cycle 20, that of B in cycle
// 21; a new block may be accepted in the cycle of the last output.
//
// Handshake: a block is taken in a cycle where in_valid and in_ready are
// both high. Reset is active low and synchronous. The timing (20 cycles per
// block, two blocks in flight) follows the source design; the handshake and
// the exact acceptance window are this design's own.
module ti_iter_ctrl
  import aes_ti_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic ld_state,    // register a takes the plaintext
  output logic ld_key,      // key register takes the input key
  output logic key_en,      // key register takes the next round key
  output logic mc_en,       // MixColumns enable
  output gf8_t rc,          // round constant for the key update
  output logic out_valid,   // ciphertext on the datapath output
  output logic out_slot     // 0: slot A, 1: slot B
);

  localparam int unsigned LAST_A = 20;

  logic [4:0] cyc;
  logic       busy, vb;
  logic       last, take_a, take_b;

  assign last     = busy && ((cyc == 5'(LAST_A) && !vb) || cyc == 5'(LAST_A + 1));
  assign take_b   = in_valid && busy && cyc == 5'd0 && !vb;
  assign take_a   = in_valid && (!busy || last);
  assign in_ready = !busy || last || (cyc == 5'd0 && !vb);

  assign ld_state  = take_a || take_b;
  assign ld_key    = take_a;
  assign key_en    = take_a || (busy && cyc[0]);
  assign mc_en     = !(cyc == 5'(LAST_A - 1) || cyc == 5'(LAST_A));
  assign rc        = rcon((int'(cyc) + 1) / 2);
  assign out_valid = busy && (cyc == 5'(LAST_A) || (cyc == 5'(LAST_A + 1) && vb));
  assign out_slot  = (cyc == 5'(LAST_A + 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cyc  <= '0;
      vb   <= 1'b0;
    end else if (take_a) begin
      busy <= 1'b1;
      cyc  <= '0;
      vb   <= 1'b0;
    end else if (busy) begin
      if (take_b) vb <= 1'b1;
      if (last) busy <= 1'b0;
      cyc <= cyc + 5'd1;
    end
  end

endmodule

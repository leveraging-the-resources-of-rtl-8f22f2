// ti_aes_pipelined: fully unrolled, 30-stage pipelined second-order
// threshold AES-128 encryption that accepts one block per clock cycle.
//
// Stage 0 (combinational) adds the shared key to the shared plaintext. Each
// of the nine main rounds is three register stages (ti_pipe_round: SBOX_26,
// SBOX_49, linear layer), the final round two (ti_pipe_final), which gives
// 1 + 27 + 2 = 30 stages and 29 register layers. The key schedule is
// unrolled alongside, so every block may use a different key. In total
// 200 SBOX_26 and 200 SBOX_49 gadgets.
//
// Timing: a block presented with in_valid in cycle 1 (taken at the clock edge
// ending it) appears on ct with ct_valid in cycle 30; a new block may be
// presented in every cycle. There is no stall: the pipeline always advances.
//
// Randomness: every cycle, rnd_round[r-1] feeds the refreshes of main round
// r and rnd_final those of the final round (96 bits per refreshed byte,
// 53,760 bits per cycle in total), from an external random source.
//
// Follows the source design: stage split, gadget count, one block per cycle
// and the 30-stage depth. This design's own: the valid flag that travels
// with each block.
module ti_aes_pipelined
  import aes_ti_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  shstate_t              pt,         // shared plaintext
  input  shstate_t              key,        // shared key
  input  pipe_round_rnd_t [8:0] rnd_round,  // [r-1]: main round r
  input  pipe_final_rnd_t       rnd_final,
  output shstate_t              ct,         // shared ciphertext
  output logic                  ct_valid
);

  shstate_t s [10];   // s[r]: state entering round r+1
  shstate_t k [10];   // k[r]: round key r
  logic     v [10];

  // Stage 0: initial AddRoundKey.
  assign s[0] = pt ^ key;
  assign k[0] = key;
  assign v[0] = in_valid;

  for (genvar r = 1; r <= 9; r++) begin : g_round
    ti_pipe_round u_round (
      .clk, .rst_n,
      .v_in(v[r-1]), .rc(rcon(r)), .s_in(s[r-1]), .k_in(k[r-1]), .rnd(rnd_round[r-1]),
      .v_out(v[r]), .s_out(s[r]), .k_out(k[r])
    );
  end

  ti_pipe_final u_final (
    .clk, .rst_n,
    .v_in(v[9]), .s_in(s[9]), .k_in(k[9]), .rnd(rnd_final),
    .v_out(ct_valid), .ct
  );

endmodule

// ti_aes_iterative: iterative second-order threshold AES-128 encryption.
//
// Plaintext and key arrive already split into NS = 10 shares; the
// ciphertext leaves in 10 shares. Each round runs in two cycles:
//   cycle 1: register a ^ round key (AddRoundKey) -> SBOX_26 -> refresh
//            -> register b
//   cycle 2: register b -> SBOX_49 (with the affine map) -> ShiftRows
//            -> MixColumns (disabled in the last round) -> refresh
//            -> register a
// The key schedule runs beside it at the same pace: RotWord of the last key
// word -> 4 SBOX_26 gadgets -> refresh -> key register b -> 4 SBOX_49 gadgets
// -> refresh -> XOR layer -> key register a. In total 20 + 20 gadgets.
// After ten rounds, register a holds SubBytes/ShiftRows of the last round and
// the key register holds round key 10; their XOR (the AddRoundKey at the
// output of register a) is the shared ciphertext.
//
// Because the two register stages alternate, two blocks under one key can be
// in flight at once (slots A and B, see ti_iter_ctrl). Latency: the
// ciphertext of a block taken at clock edge e is on ct (with ct_valid) in
// the cycle after edge e + 20; slot B's follows one cycle later.
//
// Randomness: rnd supplies 96 fresh bits per refreshed byte every cycle
// (3840 bits per cycle), from an external random source.
//
// Follows the source design: the datapath of its iterative architecture,
// the gadget count, the MixColumns enable and the 20-cycle latency. This
// design's own: key register b holds only the four S-box lanes (the XOR layer
// reads the round key still held in key register a), the handshake, and
// placing the key's second refresh on the four S-box lanes before the XOR
// layer (which adds the same mask to lane j of every key word, i.e. a
// refresh of lane j after the XOR layer).
module ti_aes_iterative
  import aes_ti_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  shstate_t  pt,        // shared plaintext
  input  shstate_t  key,       // shared key (used for slot A; B reuses it)
  input  iter_rnd_t rnd,       // refresh randomness for this cycle
  output shstate_t  ct,        // shared ciphertext
  output logic      ct_valid,
  output logic      ct_slot    // 0: slot A, 1: slot B
);

  logic ld_state, ld_key, key_en, mc_en;
  gf8_t rc;

  ti_iter_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready,
    .ld_state, .ld_key, .key_en, .mc_en, .rc,
    .out_valid(ct_valid), .out_slot(ct_slot)
  );

  shstate_t      reg_a_s, reg_b_s, reg_a_k;
  shbyte_t [3:0] reg_b_k;

  // ------------------------------------------------------------- state path
  shstate_t ark, y26, r26, y49, sr, mc, fb;

  assign ark = reg_a_s ^ reg_a_k;
  assign ct  = ark;

  for (genvar n = 0; n < 16; n++) begin : g_state
    ti_cubic_gadget #(.EXPONENT(26), .AFFINE(1'b0)) u_sb26 (.x(ark[n]), .y(y26[n]));
    ti_refresh u_rf1 (.x(y26[n]), .r(rnd.s_sb[n]), .y(r26[n]));
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_sb49 (.x(reg_b_s[n]), .y(y49[n]));
    ti_refresh u_rf2 (.x(mc[n]), .r(rnd.s_mc[n]), .y(fb[n]));
  end

  ti_shiftrows  u_sr (.s_in(y49), .s_out(sr));
  ti_mixcolumns u_mc (.en(mc_en), .s_in(sr), .s_out(mc));

  // --------------------------------------------------------------- key path
  shbyte_t [3:0] k26, kr26, k49, kr49;
  shstate_t      k_next;

  for (genvar j = 0; j < 4; j++) begin : g_key
    // RotWord: lane j takes byte (j+1)%4 of word 3.
    ti_cubic_gadget #(.EXPONENT(26), .AFFINE(1'b0)) u_sb26 (.x(reg_a_k[12 + (j+1)%4]), .y(k26[j]));
    ti_refresh u_rf1 (.x(k26[j]), .r(rnd.k_sb[j]), .y(kr26[j]));
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_sb49 (.x(reg_b_k[j]), .y(k49[j]));
    ti_refresh u_rf2 (.x(k49[j]), .r(rnd.k_xl[j]), .y(kr49[j]));
  end

  ti_key_xorlayer u_xl (.k_in(reg_a_k), .t(kr49), .rc, .k_out(k_next));

  // -------------------------------------------------------------- registers
  // Data registers need no reset: the controller qualifies every output.
  always_ff @(posedge clk) begin
    reg_a_s <= ld_state ? pt : fb;
    reg_b_s <= r26;
    reg_b_k <= kr26;
    if (key_en) reg_a_k <= ld_key ? key : k_next;
  end

endmodule

// ti_pipe_final: the final AES round (round 10) of the pipelined threshold
// AES-128, in two register stages.
//
//   stage fa: register 0 -> SBOX_26 -> refresh   (state 16 lanes, key 4 lanes)
//   stage fb: register 1 -> SBOX_49 (+affine) -> ShiftRows -> ^ round key 10
//             register 1 -> SBOX_49 (+affine) -> XOR layer (rcon 0x36)
//
// There is no MixColumns and no refresh in the last stage: its output is the
// shared ciphertext, combinational from register 1. v_in is carried along
// as a valid flag (2 cycles). Follows the source design's final stages.
module ti_pipe_final
  import aes_ti_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            v_in,
  input  shstate_t        s_in,    // state after round 9
  input  shstate_t        k_in,    // round key 9
  input  pipe_final_rnd_t rnd,
  output logic            v_out,
  output shstate_t        ct       // shared ciphertext
);

  localparam gf8_t RC = rcon(10);

  logic          v0, v1;
  shstate_t      s0, k0, s1, k1;
  shbyte_t [3:0] t1;

  // --------------------------------------------------------------- stage fa
  shstate_t      s26, s26r;
  shbyte_t [3:0] t26, t26r;

  for (genvar n = 0; n < 16; n++) begin : g_sa
    ti_cubic_gadget #(.EXPONENT(26), .AFFINE(1'b0)) u_g (.x(s0[n]), .y(s26[n]));
    ti_refresh u_r (.x(s26[n]), .r(rnd.s26[n]), .y(s26r[n]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_ka
    ti_cubic_gadget #(.EXPONENT(26), .AFFINE(1'b0)) u_g (.x(k0[12 + (j+1)%4]), .y(t26[j]));
    ti_refresh u_r (.x(t26[j]), .r(rnd.k26[j]), .y(t26r[j]));
  end

  // --------------------------------------------------------------- stage fb
  shstate_t      s49, sr, k10;
  shbyte_t [3:0] t49;

  for (genvar n = 0; n < 16; n++) begin : g_sb
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_g (.x(s1[n]), .y(s49[n]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_kb
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_g (.x(t1[j]), .y(t49[j]));
  end

  ti_shiftrows    u_sr (.s_in(s49), .s_out(sr));
  ti_key_xorlayer u_xl (.k_in(k1), .t(t49), .rc(RC), .k_out(k10));

  assign ct = sr ^ k10;

  // -------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    s0 <= s_in;  k0 <= k_in;
    s1 <= s26r;  t1 <= t26r;  k1 <= k0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) {v0, v1} <= '0;
    else        {v0, v1} <= {v_in, v0};
  end

  assign v_out = v1;

endmodule

// ti_pipe_round: one main round (rounds 1..9) of the pipelined threshold
// AES-128, split into three register stages so that each stage holds at most
// one gadget layer.
//
//   stage a: register 0 -> SBOX_26 -> refresh        (state: 16 lanes,
//                                                      key: 4 RotWord lanes)
//   stage b: register 1 -> SBOX_49 (+affine) -> refresh
//   stage c: register 2 -> ShiftRows -> MixColumns -> ^ next round key
//            -> refresh                                (state)
//            register 2 -> XOR layer (+rcon) = next round key -> refresh of
//            the four S-box lanes                      (key)
//
// The full round key travels with the state through the three registers;
// the XOR layer's output is added into the state before the key is refreshed
// for the next round. Inputs s_in/k_in are taken at every clock edge; the
// outputs are combinational and feed the next round's register 0. v_in is
// carried along as a valid flag (3 cycles).
//
// Follows the source design's stage split, gadget and refresh placement. The
// key's last refresh is applied to the four S-box lanes ahead of a second
// XOR-layer evaluation, which adds one mask to lane j of every key word (this
// design's reading of a per-lane refresh after the XOR layer).
module ti_pipe_round
  import aes_ti_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            v_in,
  input  gf8_t            rc,      // round constant of this round
  input  shstate_t        s_in,    // state after the previous round
  input  shstate_t        k_in,    // previous round key
  input  pipe_round_rnd_t rnd,
  output logic            v_out,
  output shstate_t        s_out,   // state after this round (key added)
  output shstate_t        k_out    // this round's key, refreshed
);

  logic          v0, v1, v2;
  shstate_t      s0, k0, s1, k1, s2, k2;
  shbyte_t [3:0] t1, t2;

  // ---------------------------------------------------------------- stage a
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

  // ---------------------------------------------------------------- stage b
  shstate_t      s49, s49r;
  shbyte_t [3:0] t49, t49r;

  for (genvar n = 0; n < 16; n++) begin : g_sb
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_g (.x(s1[n]), .y(s49[n]));
    ti_refresh u_r (.x(s49[n]), .r(rnd.s49[n]), .y(s49r[n]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_kb
    ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1'b1)) u_g (.x(t1[j]), .y(t49[j]));
    ti_refresh u_r (.x(t49[j]), .r(rnd.k49[j]), .y(t49r[j]));
  end

  // ---------------------------------------------------------------- stage c
  shstate_t      sr, mc, ark, knext;
  shbyte_t [3:0] t2r;

  ti_shiftrows    u_sr (.s_in(s2), .s_out(sr));
  ti_mixcolumns   u_mc (.en(1'b1), .s_in(sr), .s_out(mc));
  ti_key_xorlayer u_xl (.k_in(k2), .t(t2), .rc(rc), .k_out(knext));

  assign ark = mc ^ knext;

  for (genvar n = 0; n < 16; n++) begin : g_sc
    ti_refresh u_r (.x(ark[n]), .r(rnd.sark[n]), .y(s_out[n]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_kc
    ti_refresh u_r (.x(t2[j]), .r(rnd.kxl[j]), .y(t2r[j]));
  end

  ti_key_xorlayer u_xlr (.k_in(k2), .t(t2r), .rc(rc), .k_out(k_out));

  // -------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    s0 <= s_in;  k0 <= k_in;
    s1 <= s26r;  t1 <= t26r;  k1 <= k0;
    s2 <= s49r;  t2 <= t49r;  k2 <= k1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) {v0, v1, v2} <= '0;
    else        {v0, v1, v2} <= {v_in, v0, v1};
  end

  assign v_out = v2;

endmodule

// ti_key_xorlayer: the linear part of one AES-128 key-expansion step on
// shares.
//
// Given round key k_r as words w0..w3 (word c = bytes 4c..4c+3) and the
// shared S-box outputs t = SubWord(RotWord(w3)) computed by the four key
// gadgets, it forms t' = t ^ {rcon, 0, 0, 0} and the next round key
//   w0' = w0 ^ t', w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'.
// The round constant is public and is added to share 0 only; all other
// operations act on each share alone. Combinational.
module ti_key_xorlayer
  import aes_ti_pkg::*;
(
  input  shstate_t      k_in,   // round key k_r
  input  shbyte_t [3:0] t,      // shared SubWord(RotWord(w3)), byte j = lane j
  input  gf8_t          rc,     // round constant of k_{r+1}
  output shstate_t      k_out   // round key k_{r+1}
);

  always_comb begin
    shbyte_t [3:0] tt;
    tt = t;
    tt[0][0] = tt[0][0] ^ rc;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < NS; i++) begin
        k_out[j][i]      = k_in[j][i]      ^ tt[j][i];
        k_out[4 + j][i]  = k_in[4 + j][i]  ^ k_out[j][i];
        k_out[8 + j][i]  = k_in[8 + j][i]  ^ k_out[4 + j][i];
        k_out[12 + j][i] = k_in[12 + j][i] ^ k_out[8 + j][i];
      end
  end

endmodule

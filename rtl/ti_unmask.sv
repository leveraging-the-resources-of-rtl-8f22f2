// ti_unmask: collapses a shared 128-bit value into its plain value.
//
// Each bit of the result is the XOR tree of that bit's NS shares. It is used
// on the ciphertext, which is public, at the boundary of the masked core.
// Combinational.
module ti_unmask
  import aes_ti_pkg::*;
(
  input  shstate_t     s_in,
  output logic [127:0] plain   // byte n at bits [127-8n -: 8] (FIPS order)
);

  always_comb begin
    for (int n = 0; n < 16; n++) begin
      gf8_t b;
      b = '0;
      for (int i = 0; i < NS; i++) b ^= s_in[n][i];
      plain[127 - 8*n -: 8] = b;
    end
  end

endmodule

// ti_mixcolumns: AES MixColumns on a shared state, with an enable.
//
// MixColumns is linear over GF(2), so it is applied to every share on its
// own; the XOR of the output shares is MixColumns of the XOR of the inputs.
// When en is low the state passes unchanged: the final AES round skips
// MixColumns, and in the iterative datapath this enable replaces a third
// input of the state multiplexer. Combinational.
module ti_mixcolumns
  import aes_ti_pkg::*;
(
  input  logic     en,     // 1: apply MixColumns, 0: bypass (final round)
  input  shstate_t s_in,
  output shstate_t s_out
);

  shstate_t mixed;

  always_comb begin
    for (int i = 0; i < NS; i++)
      for (int c = 0; c < 4; c++) begin
        logic [3:0][7:0] col, mc;
        for (int r = 0; r < 4; r++) col[r] = s_in[4*c + r][i];
        mc = mix_col(col);
        for (int r = 0; r < 4; r++) mixed[4*c + r][i] = mc[r];
      end
  end

  assign s_out = en ? mixed : s_in;

endmodule

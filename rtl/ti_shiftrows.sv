// ti_shiftrows: AES ShiftRows on a shared state.
//
// Row r of the 4x4 byte matrix is rotated left by r positions. The same byte
// permutation is applied to every share, so it needs no randomness and no
// register: it is wiring. Byte n of the state is row n%4, column n/4.
module ti_shiftrows
  import aes_ti_pkg::*;
(
  input  shstate_t s_in,
  output shstate_t s_out
);

  assign s_out = shift_rows(s_in);

endmodule

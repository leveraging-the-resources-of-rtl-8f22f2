// aes_ti_top: the two second-order threshold AES-128 encryption cores side
// by side, each with its own ports.
//
//   it_*  iterative core (ti_aes_iterative): 40 gadgets, 20 cycles per block,
//         two blocks under one key in flight at once.
//   pp_*  pipelined core (ti_aes_pipelined): 400 gadgets, 30 stages, one
//         block per cycle.
//
// Both take plaintext and key already split into 10 shares and consume fresh
// randomness every cycle on their rnd ports (the random source is outside).
// Each core's shared ciphertext is brought out as it is and also collapsed by
// an XOR tree (ti_unmask) into the plain 128-bit ciphertext, byte 0 in bits
// [127:120]. The two cores share only the clock and the synchronous,
// active-low reset.
module aes_ti_top
  import aes_ti_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // iterative core
  input  logic                  it_in_valid,
  output logic                  it_in_ready,
  input  shstate_t              it_pt,
  input  shstate_t              it_key,
  input  iter_rnd_t             it_rnd,
  output shstate_t              it_ct,
  output logic [127:0]          it_ct_plain,
  output logic                  it_ct_valid,
  output logic                  it_ct_slot,
  // pipelined core
  input  logic                  pp_in_valid,
  input  shstate_t              pp_pt,
  input  shstate_t              pp_key,
  input  pipe_round_rnd_t [8:0] pp_rnd_round,
  input  pipe_final_rnd_t       pp_rnd_final,
  output shstate_t              pp_ct,
  output logic [127:0]          pp_ct_plain,
  output logic                  pp_ct_valid
);

  ti_aes_iterative u_iter (
    .clk, .rst_n,
    .in_valid(it_in_valid), .in_ready(it_in_ready),
    .pt(it_pt), .key(it_key), .rnd(it_rnd),
    .ct(it_ct), .ct_valid(it_ct_valid), .ct_slot(it_ct_slot)
  );

  ti_unmask u_it_unmask (.s_in(it_ct), .plain(it_ct_plain));

  ti_aes_pipelined u_pipe (
    .clk, .rst_n,
    .in_valid(pp_in_valid), .pt(pp_pt), .key(pp_key),
    .rnd_round(pp_rnd_round), .rnd_final(pp_rnd_final),
    .ct(pp_ct), .ct_valid(pp_ct_valid)
  );

  ti_unmask u_pp_unmask (.s_in(pp_ct), .plain(pp_ct_plain));

endmodule

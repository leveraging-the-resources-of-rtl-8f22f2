// ti_cubic_gadget: second-order threshold gadget for one cubic S-box half.
//
// With EXPONENT = 26, AFFINE = 0 it is SBOX_26 (y = x^26 in GF(2^8)); with
// EXPONENT = 49, AFFINE = 1 it is SBOX_49 followed by the AES affine map, so
// that the two in series give the AES S-box: A((x^26)^49) = A(x^254).
// Both power maps have algebraic degree 3 over GF(2).
//
// Ten input shares give ten output shares (s_in = s_out = 10, t = 3, d = 2).
// The component functions are built from the shared algebraic normal form:
// every cubic, quadratic or linear cross term of the shared ANF is placed in
// the first output share whose share set COVER[k] holds all of its share
// indices. The terms whose indices form the set T add up to an XOR of the
// plain function evaluated on partial share sums (see aes_ti_pkg), so each
// output share here is an XOR of F(x_a ^ x_b ^ x_c) table look-ups over the
// 175 share subsets of size 1..3, chosen by CSEL. Output share k reads only
// shares in COVER[k]; any two output shares together miss at least one input
// share. The sum of the output shares equals F(sum of the input shares).
//
// Purely combinational (one cycle in the datapath); the caller refreshes the
// outputs and registers them. The decomposition, the share counts and the
// ANF-plus-covering-set construction follow the source design; the concrete
// covering set and the table-based evaluation of the terms are this
// design's own.
module ti_cubic_gadget
  import aes_ti_pkg::*;
#(
  parameter int unsigned EXPONENT = 26,
  parameter bit          AFFINE   = 1'b0
) (
  input  shbyte_t x,   // NS shares of the input byte
  output shbyte_t y    // NS shares of the output byte
);

  localparam tab_t TAB = pow_table(EXPONENT, AFFINE);

  localparam int unsigned NM = 1 << NS;  // share sets, as masks

  gf8_t f_u [NM];  // F evaluated on the XOR of the shares in set U

  // The empty set: F(0), the constant of the function.
  assign f_u[0] = TAB[0];

  for (genvar u = 1; u < NM; u++) begin : g_sub
    if (popcnt(smask_t'(u)) <= 3) begin : g_eval
      gf8_t xs;
      always_comb begin
        xs = '0;
        for (int i = 0; i < NS; i++)
          if (u[i]) xs ^= x[i];
      end
      assign f_u[u] = TAB[xs];
    end else begin : g_none
      assign f_u[u] = 8'h00;
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_out
    always_comb begin
      y[k] = '0;
      for (int u = 0; u < NM; u++)
        if (CSEL[k][u]) y[k] ^= f_u[u];
    end
  end

endmodule

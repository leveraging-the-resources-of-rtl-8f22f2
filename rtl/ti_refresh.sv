// ti_refresh: re-randomises one shared byte after a gadget.
//
// Each of the 8 bits is held in NS = 10 shares and receives RB = 12 fresh
// random bits, so a byte refresh consumes 8*RB = 96 bits (f(s) = 12, as in
// the source design). The XOR of the shares is unchanged because every random
// bit is added to exactly two shares. The wiring of the 12 bits is this
// design's own, as the source gives only their number: bits 0..NS-1 form a
// ring (share i receives r[i] ^ r[(i+1) % NS]) and each remaining bit m is a
// chord added to shares 2m and 2m + NS/2. The conservative pairwise refresh
// (one bit per pair of shares, s(s-1)/2 bits) is the same idea with all
// chords present.
//
// Port r holds, for each of the 12 random-bit positions j, one bit per data
// bit (r[j][b]).
//
// Combinational; the register after it is part of the datapath.
module ti_refresh
  import aes_ti_pkg::*;
(
  input  shbyte_t x,  // shares in
  input  rbyte_t  r,  // r[j][b] = random bit j for data bit b
  output shbyte_t y   // refreshed shares
);

  // The 8 data bits are refreshed in parallel, so each random index j is
  // handled as a byte.
  always_comb begin
    y = x;
    for (int i = 0; i < NS; i++)
      y[i] = y[i] ^ r[i] ^ r[(i+1) % NS];
    for (int m = 0; m < int'(RB - NS); m++) begin
      y[(2*m) % NS]        = y[(2*m) % NS] ^ r[NS+m];
      y[(2*m + NS/2) % NS] = y[(2*m + NS/2) % NS] ^ r[NS+m];
    end
  end

endmodule

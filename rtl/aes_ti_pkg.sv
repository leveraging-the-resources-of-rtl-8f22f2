// aes_ti_pkg: types, constants and elaboration-time tables shared by the
// second-order threshold implementation (TI) of AES-128.
//
// Every sensitive byte travels as NS = 10 Boolean shares; the byte's value is
// the XOR of its shares. A shared AES state is 16 such bytes, byte n being
// input byte n (FIPS-197 order: byte n sits in row n%4, column n/4).
//
// The AES S-box x -> A(x^254) is split into two cubic power maps,
// x^254 = (x^26)^49, so that each half can be shared with a degree-3
// non-complete sharing in one clock cycle. The affine map A is folded into
// the second half, which therefore computes A(y^49).
//
// Non-completeness: output share k of a gadget may only read the input
// shares listed in COVER[k]. The ten sets below each hold 6 of the 10
// shares; every set of three shares lies inside at least one of them (so
// every cubic cross term can be placed), and no two of them together hold
// all ten shares (so any two probed output shares miss an input share:
// second order). The set itself is this design's own; only its size
// (10 inputs, 10 outputs, t = 3, d = 2) is taken from the source design.
//
// Refresh randomness: RB = 12 random bits per shared bit (f(s) = 12), so a
// byte refresh consumes 8*RB = 96 bits.
package aes_ti_pkg;

  localparam int unsigned NS   = 10;  // input shares = output shares
  localparam int unsigned RB   = 12;  // random bits per shared bit, f(s)

  typedef logic [7:0]          gf8_t;
  typedef gf8_t   [NS-1:0]     shbyte_t;   // [i] = share i of one byte
  typedef shbyte_t [15:0]      shstate_t;  // [n] = shared state/key byte n
  typedef logic [RB-1:0][7:0]  rbyte_t;    // randomness for one byte refresh:
                                           // [j][b] = random bit j of data bit b
  typedef logic [NS-1:0]       smask_t;    // a set of share indices

  // Refresh randomness of the iterative datapath, per clock cycle.
  typedef struct packed {
    rbyte_t [15:0] s_sb;  // state, after SBOX_26
    rbyte_t [15:0] s_mc;  // state, after MixColumns
    rbyte_t [3:0]  k_sb;  // key lanes, after SBOX_26
    rbyte_t [3:0]  k_xl;  // key lanes, into the XOR layer
  } iter_rnd_t;

  // Refresh randomness of one main round of the pipeline, per clock cycle.
  typedef struct packed {
    rbyte_t [15:0] s26;   // state, after SBOX_26
    rbyte_t [15:0] s49;   // state, after SBOX_49
    rbyte_t [15:0] sark;  // state, after AddRoundKey
    rbyte_t [3:0]  k26;   // key lanes, after SBOX_26
    rbyte_t [3:0]  k49;   // key lanes, after SBOX_49
    rbyte_t [3:0]  kxl;   // key lanes, after the XOR layer
  } pipe_round_rnd_t;

  // Refresh randomness of the pipeline's final round, per clock cycle.
  typedef struct packed {
    rbyte_t [15:0] s26;
    rbyte_t [3:0]  k26;
  } pipe_final_rnd_t;

  // Component-function share sets (bit i set: share i may be read).
  localparam smask_t COVER [NS] = '{
    10'b1101000111, 10'b0011010111, 10'b0101111010, 10'b1111110000,
    10'b1110001011, 10'b1011011100, 10'b0011101101, 10'b1100110101,
    10'b1000111011, 10'b0110101110
  };

  // ---------------------------------------------------------------- GF(2^8)
  function automatic gf8_t xtime(gf8_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic gf8_t gf_mul(gf8_t a, gf8_t b);
    gf8_t p = '0;
    gf8_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic gf8_t gf_pow(gf8_t a, int unsigned e);
    gf8_t r = 8'h01;
    for (int i = 7; i >= 0; i--) begin
      r = gf_mul(r, r);
      if (e[i]) r = gf_mul(r, a);
    end
    return r;
  endfunction

  // AES affine map, including the constant 0x63.
  function automatic gf8_t aes_affine(gf8_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  typedef gf8_t tab_t [256];

  // Truth table of the unshared gadget function: x^exp, optionally followed
  // by the AES affine map. Built from powers of the generator 0x03:
  // (3^i)^exp = 3^(i*exp mod 255).
  function automatic tab_t pow_table(int unsigned exp, bit affine);
    tab_t t;
    gf8_t ex [255];
    gf8_t p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      ex[i] = p;
      p = p ^ xtime(p);
    end
    t[0] = (exp == 0) ? 8'h01 : 8'h00;
    for (int i = 0; i < 255; i++) t[ex[i]] = ex[(i * exp) % 255];
    if (affine)
      for (int x = 0; x < 256; x++) t[x] = aes_affine(t[x]);
    return t;
  endfunction

  // Round constants; index r = 1..10 is the constant of round key r.
  function automatic gf8_t rcon(int unsigned r);
    gf8_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return (r == 0) ? 8'h00 : c;
  endfunction

  // ---------------------------------------------- share-subset bookkeeping
  function automatic int unsigned popcnt(smask_t m);
    int unsigned c = 0;
    for (int i = 0; i < NS; i++) c += m[i];
    return c;
  endfunction

  // Component function owning the cross terms whose share indices form the
  // set T: the first k whose COVER[k] contains T.
  function automatic int owner(smask_t t);
    for (int k = 0; k < NS; k++)
      if ((t & ~COVER[k]) == '0) return k;
    return 0;
  endfunction

  typedef logic [(1<<NS)-1:0] usel_t;   // indexed by a share-set mask
  typedef usel_t csel_t [NS];

  // For a cubic F and shares x_0..x_9, the terms of the shared ANF whose share
  // indices form exactly the set T add up to
  //   g_T = XOR over U subset of T of F(XOR of x_u, u in U)
  // (Moebius inversion; g_T = 0 for |T| > 3). Output share k collects g_T for
  // every T it owns, i.e. F(x_U) for every U that lies below an odd number
  // of owned T. CSEL[k][U] is that parity.
  function automatic csel_t build_csel();
    csel_t c;
    for (int k = 0; k < NS; k++) c[k] = '0;
    for (int m = 0; m < (1 << NS); m++) begin
      if (popcnt(smask_t'(m)) <= 3) begin
        smask_t t = smask_t'(m);
        smask_t u = t;
        usel_t  row = c[owner(t)];
        forever begin
          row[u] = ~row[u];
          if (u == '0) break;
          u = (u - 1'b1) & t;
        end
        c[owner(t)] = row;
      end
    end
    return c;
  endfunction

  localparam csel_t CSEL = build_csel();

  // ------------------------------------------------------ linear AES layers
  // ShiftRows on byte lanes: output byte n = input byte SR_SRC(n).
  function automatic int sr_src(int n);
    int row = n % 4;
    int col = n / 4;
    return row + 4 * ((col + row) % 4);
  endfunction

  function automatic shstate_t shift_rows(shstate_t s);
    shstate_t o;
    for (int n = 0; n < 16; n++) o[n] = s[sr_src(n)];
    return o;
  endfunction

  // MixColumns of one column of plain bytes (applied to each share alone:
  // the map is linear).
  function automatic logic [3:0][7:0] mix_col(logic [3:0][7:0] a);
    logic [3:0][7:0] o;
    for (int r = 0; r < 4; r++)
      o[r] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
           ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

endpackage

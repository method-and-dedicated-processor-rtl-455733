// rns_pkg - constants and constant functions shared by the RNS image coder.
//
// A 24-bit pixel A is represented by its residues b_i = A mod p_i for the
// five pairwise co-prime moduli 7, 23, 29, 59 and 61. Their product
// PHI = 16 803 731 exceeds 2^24, so every pixel maps to a distinct residue
// set and can be recovered with the Chinese remainder theorem.
//
// The moduli and PHI are the ones the coding method prescribes. The packing
// of the five residues into one 25-bit word (b1 in the low 3 bits, then
// 5, 5, 6 and 6 bits for b2..b5) is this design's own choice.
//
// Functions here are only evaluated at elaboration (parameters, localparams),
// so they cost no logic.
package rns_pkg;

  localparam int unsigned NMOD = 5;

  typedef int unsigned modlist_t [NMOD];
  localparam modlist_t MODULI = '{7, 23, 29, 59, 61};

  localparam longint unsigned PHI = 64'd16803731;   // 7*23*29*59*61

  // Bits needed for a residue of modulus p (values 0 .. p-1).
  function automatic int unsigned res_width(input int unsigned p);
    return $clog2(p);
  endfunction

  // Bit offset of residue field i in the packed residue word.
  function automatic int unsigned res_offset(input int unsigned i);
    int unsigned off = 0;
    for (int unsigned k = 0; k < i; k++) off += res_width(MODULI[k]);
    return off;
  endfunction

  localparam int unsigned RNS_BITS = res_offset(NMOD);   // 25

  typedef logic [RNS_BITS-1:0] rns_word_t;

  // 2^j mod p: the coefficient an encoder produces for pixel bit j.
  function automatic int unsigned pow2_mod(input int unsigned j, input int unsigned p);
    int unsigned r = 1 % p;
    for (int unsigned k = 0; k < j; k++) r = (2 * r) % p;
    return r;
  endfunction

  // Orthogonal basis for modulus p: B = (PHI/p) * d, with d in 1..p-1
  // chosen so that B = 1 (mod p); B is 0 modulo every other modulus.
  function automatic longint unsigned crt_basis(input int unsigned p);
    longint unsigned pl = longint'(p);
    longint unsigned m  = PHI / pl;
    for (longint unsigned d = 1; d < pl; d++)
      if (((m * d) % pl) == 1) return m * d;
    return 0;
  endfunction

  // Term table of the reverse converter for modulus p:
  // entry b holds (b * B) mod PHI for b < p, zero above.
  localparam int unsigned TAB_DEPTH = 64;             // >= largest modulus
  localparam int unsigned TERM_W    = $clog2(PHI);    // terms are < PHI

  typedef logic [TAB_DEPTH-1:0][TERM_W-1:0] crt_table_t;

  function automatic crt_table_t crt_table(input int unsigned p);
    crt_table_t      t  = '0;
    longint unsigned bb = crt_basis(p);
    for (int unsigned b = 0; b < p; b++) t[b] = TERM_W'((longint'(b) * bb) % PHI);
    return t;
  endfunction

endpackage

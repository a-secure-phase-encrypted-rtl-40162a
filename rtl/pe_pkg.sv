// pe_pkg: constants and helper functions shared by the phase-encrypted
// IEEE 802.15.4 (2.4 GHz O-QPSK) transceiver.
//
// Chip sequences: the sixteen 32-chip PN sequences of the 802.15.4 O-QPSK
// PHY are generated from the sequence of symbol 0. Symbols 1..7 are that
// sequence rotated by 4*s chips towards later chips; symbols 8..15 are
// symbols 0..7 with every odd-numbered chip inverted. A chip vector holds
// chip c_k in bit k, c_0 being sent first; c_0, c_2, ... go on the I rail
// and c_1, c_3, ... on the Q rail, so pair p of a symbol is (c_2p, c_2p+1).
//
// Bipolar convention used throughout: a chip bit 1 is the level +1 and a
// chip bit 0 is -1. A key-stream bit 0 keeps the sign (multiply by +1) and
// a key-stream bit 1 inverts it (multiply by -1).
//
// The 802.15.4 frame constants (four zero preamble bytes, SFD 0xA7, 7-bit
// length field) are those of the standard; the preamble length (8 symbols,
// 256 chips, 128 complex samples) is the one the design correlates on.
// Lint note: compiled on its own, some constants here are reported as
// unused; the modules that import the package use all of them.
package pe_pkg;

  localparam int unsigned PAIRS_PER_SYM  = 16;
  localparam int unsigned PREAMBLE_BYTES = 4;
  localparam int unsigned PREAMBLE_SYMS  = 2 * PREAMBLE_BYTES;           // 8
  localparam int unsigned HDR_PAIRS      = PREAMBLE_SYMS * PAIRS_PER_SYM; // 128
  localparam logic [7:0]  SFD_BYTE       = 8'hA7;

  // Chip sequence of symbol 0, chip c_k in bit k
  // (c_0..c_31 = 1101 1001 1100 0011 0101 0010 0010 1110).
  localparam logic [31:0] CHIP_SYM0 = 32'h744A_C39B;

  typedef logic [31:0] chipvec_t;

  // Chip sequence of a 4-bit symbol.
  function automatic chipvec_t chip_seq(input logic [3:0] sym);
    chipvec_t base, r;
    int unsigned sh;
    sh   = 4 * int'(sym[2:0]);
    // rotate towards later chips: chip k moves to chip k+sh (mod 32)
    base = (CHIP_SYM0 << sh) | (CHIP_SYM0 >> ((32 - sh) % 32));
    if (sh == 0) base = CHIP_SYM0;
    r = base;
    if (sym[3]) r = base ^ 32'hAAAA_AAAA;
    return r;
  endfunction

  // Pair p (0..127) of the preamble: {I chip, Q chip}.
  function automatic logic [1:0] preamble_pair(input int unsigned p);
    int unsigned k;
    k = 2 * (p % PAIRS_PER_SYM);
    return {CHIP_SYM0[k], CHIP_SYM0[k+1]};
  endfunction

  // Number of ones in a 32-bit word.
  function automatic logic [5:0] popcount32(input logic [31:0] w);
    logic [5:0] n;
    n = '0;
    for (int b = 0; b < 32; b++) n = n + 6'(w[b]);
    return n;
  endfunction

endpackage

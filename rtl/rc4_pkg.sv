// rc4_pkg: constants and types shared by the RC4 cipher modules.
//
// RC4 keeps a permutation S of the numbers 0..N-1 (the state array) and an
// index pair (i, j). The default sizes are a 128-entry state array and a key
// of 1 to 128 bytes, the configuration this RC4 core is built for. With
// N = 256 the core is the classic byte-wide RC4; with N = 4 it runs the small
// textbook example. N must be a power of two so that "mod N" is a plain
// truncation of the adder result.
package rc4_pkg;

  // Entries in the state array S (its indices and values are log2(N) bits).
  parameter int unsigned RC4_N       = 128;
  // Longest key in bytes; the key length is chosen at run time, 1..RC4_KEY_MAX.
  parameter int unsigned RC4_KEY_MAX = 128;

  typedef logic [7:0] byte_t;

  // Phase of the cipher as seen by the host.
  typedef enum logic [1:0] {
    PH_NOKEY    = 2'd0,  // after reset: no key scheduled yet
    PH_KEYSETUP = 2'd1,  // key-scheduling algorithm running on S
    PH_STREAM   = 2'd2   // keystream generator ready, data bytes accepted
  } rc4_phase_e;

endpackage

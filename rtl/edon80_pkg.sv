// Shared types and constants of the compact Edon80 keystream generator.
//
// Edon80 works on 2-bit symbols throughout: key and IV are handled as 40
// symbols each, the internal state as 80 symbols, and the keystream leaves
// the core one 2-bit symbol at a time. The sizes below are the cipher's own
// (80-bit key, 64-bit IV padded to 80 bits with the constant 32100123 in
// base 4); the padding is not added in hardware but sent by whoever drives
// the serial load port.
package edon80_pkg;

  // One 2-bit symbol: bit 1 is the high bit, bit 0 the low bit.
  typedef logic [1:0] sym_t;

  // Number of state symbols (a_0 .. a_79) and key symbols (K_0 .. K_39).
  localparam int unsigned EDON_NSTATE = 80;
  localparam int unsigned EDON_NKEY   = 40;

endpackage

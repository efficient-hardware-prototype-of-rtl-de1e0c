// Shared constants and types of the ECDSA engine.
//
// ECC_N is the operand width of every arithmetic unit: 256 bits, the size
// at which the reference implementation is evaluated. All modules take their
// width as a parameter defaulting to this value, so the whole engine can be
// rebuilt for any curve size. ecdsa_mode_e selects the operation of the top
// level: signature generation or signature verification.
package ecdsa_pkg;
  localparam int unsigned ECC_N = 256;

  typedef enum logic {
    MODE_SIGN   = 1'b0,
    MODE_VERIFY = 1'b1
  } ecdsa_mode_e;
endpackage

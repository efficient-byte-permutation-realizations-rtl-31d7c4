// Shared types for the AES byte permutation units (BPUs).
//
// A 128-bit AES state is handled as 16 bytes, byte n sitting in state row
// (n mod 4) and column (n div 4), as in the AES standard. ShiftRows rotates
// row r left by r positions; its inverse, used in decryption, rotates right.
// Every unit in this library streams those 16 bytes Q at a time (Q = 1, 2, 4
// or 8) and emits them in ShiftRows or inverse-ShiftRows order.
package aes_bpu_pkg;

  typedef logic [7:0] byte_t;

  // Permutation direction: left = ShiftRows (encryption),
  // right = InvShiftRows (decryption).
  typedef enum logic {
    SHIFT_LEFT  = 1'b0,
    SHIFT_RIGHT = 1'b1
  } shift_dir_e;

endpackage

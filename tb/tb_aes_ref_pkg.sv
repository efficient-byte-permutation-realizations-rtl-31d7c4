// Reference model for the permutation testbenches.
//
// The AES state holds byte n in row n mod 4 and column n div 4. ShiftRows
// rotates row r left by r columns, its inverse right by r columns. The
// functions return, for output byte position p, the index of the input byte
// that lands there, computed directly from that definition.
package tb_aes_ref_pkg;

  import aes_bpu_pkg::*;

  function automatic int unsigned sr_src(int unsigned p, shift_dir_e dir);
    int unsigned r, c;
    r = p % 4;
    c = p / 4;
    if (dir == SHIFT_LEFT) return r + 4 * ((c + r) % 4);
    else                   return r + 4 * ((c + 4 - r) % 4);
  endfunction

endpackage

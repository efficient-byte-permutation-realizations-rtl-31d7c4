// Row address generator of the memory-based byte permutation unit.
//
// The memory-based unit keeps one AES state in Q memories of 16/Q bytes.
// Byte h of a state always lives in memory ma = h mod Q; only its row
// (address) changes from round to round, so results can be written back into
// the very location their operand was read from. For access j (0..16/Q-1) of
// round k (0, 1, 2, ...) memory ma uses row
//   ShiftRows     : ra = ( j + 4*j*(k+1) + (4/Q)*(k+1)*ma ) mod 16/Q
//   InvShiftRows  : ra = ( j - 4*j*(k+1) - (4/Q)*(k+1)*ma ) mod 16/Q
// Reading with these rows in round k yields the bytes in (inverse) ShiftRows
// order, and writing result Q*j+ma back to the same row leaves the memories
// ready for round k+1. The pattern repeats every four rounds, so only
// (k+1) mod 4 matters and the upper two bits of k are not used. With init = 1 the generator uses k+1 = 0, i.e. ra = j:
// the natural layout used to load a new state.
//
// Because 16/Q is a power of two, "mod 16/Q" is just truncation to
// log2(16/Q) bits and no divider is needed; Q and ma are constants, so the
// products are shifts and constant multiplies. Purely combinational.
//
// The equations and their range (Q = 1, 2 or 4) are the published ones; the
// init input that stands for k = -1 is this design's way of expressing the
// initial layout. Each memory gets its own instance with MA set to its
// index; the default MA = 1 is only there so that the module on its own
// shows the general case (for Q = 4 and ma = 0 the row is always j).
module bpu_mem_addr_gen
  import aes_bpu_pkg::*;
#(
  parameter int unsigned Q  = 4,
  parameter int unsigned MA = 1,
  localparam int unsigned AW = $clog2(16 / Q)
) (
  input  logic [AW-1:0] j,
  input  logic [3:0]    k,
  input  logic          init,
  input  shift_dir_e    dir,
  output logic [AW-1:0] ra
);

  initial begin
    assert (Q == 1 || Q == 2 || Q == 4)
      else $error("bpu_mem_addr_gen: Q must be 1, 2 or 4");
    assert (MA < Q) else $error("bpu_mem_addr_gen: MA must be below Q");
  end

  localparam logic [AW-1:0] STEP = AW'((4 / Q) * MA);

  logic [1:0]    kp1;     // (k+1) mod 4
  logic [AW-1:0] jterm;   // 4*j*(k+1) mod 16/Q
  logic [AW-1:0] mterm;   // (4/Q)*(k+1)*ma mod 16/Q

  always_comb begin
    kp1   = init ? 2'd0 : (k[1:0] + 2'd1);
    jterm = AW'(4 * 32'(j) * 32'(kp1));
    mterm = AW'(32'(STEP) * 32'(kp1));
    if (dir == SHIFT_LEFT) ra = j + jterm + mterm;
    else                   ra = j - jterm - mterm;
  end

endmodule

// Frame timing for the register-based byte permutation units.
//
// A register BPU with Q ports takes one 16-byte AES state as a frame of
// FRAME = 16/Q beats and returns it LAT beats later. Frames may follow each
// other with no gap, so while frame n is still leaving the unit, frame n+1 is
// already entering. The multiplexer settings of the unit depend only on the
// frame at the output, so this block keeps:
//   * first_o - high on beat 0 of the input frame period; a frame must
//               begin with its bytes 0..Q-1 on such a beat,
//   * u_o     - time t of the frame at the output, counted as in the
//               control tables of the units: t = 0 is the beat on which its
//               first bytes were at the input, so u_o runs LAT..LAT+FRAME-1,
//   * dir_o   - the direction that frame was given when it entered
//               (dir_i is sampled on its first beat),
//   * out_valid_o / out_first_o - in_valid and the frame start, delayed by LAT.
// Every register advances only on cycles with en = 1, so a stall freezes the
// unit and its schedule together. The free-running beat counter, the enable
// and the valid flags are this design's own framing; the frame and latency
// figures are those of the published units.
module bpu_reg_ctrl
  import aes_bpu_pkg::*;
#(
  parameter int unsigned FRAME = 16,
  parameter int unsigned LAT   = 12,
  localparam int unsigned PW   = (FRAME > 1) ? $clog2(FRAME) : 1,
  localparam int unsigned UW   = $clog2(LAT + FRAME)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  shift_dir_e       dir_i,
  output logic             first_o,
  output logic [UW-1:0]    u_o,
  output shift_dir_e       dir_o,
  output logic             out_valid_o,
  output logic             out_first_o
);

  logic [PW-1:0] phase_q;
  shift_dir_e    dir_cur_q, dir_prev_q;
  shift_dir_e    dir_cur, dir_prev;
  logic [LAT-1:0] vld_q, fst_q;

  assign first_o = (phase_q == '0);

  // Direction of the frame entering now and of the one entered before it.
  assign dir_cur  = first_o ? dir_i : dir_cur_q;
  assign dir_prev = first_o ? dir_cur_q : dir_prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= '0;
      dir_cur_q  <= SHIFT_LEFT;
      dir_prev_q <= SHIFT_LEFT;
      vld_q      <= '0;
      fst_q      <= '0;
    end else if (en) begin
      phase_q    <= (phase_q == PW'(FRAME - 1)) ? '0 : phase_q + 1'b1;
      dir_cur_q  <= dir_cur;
      dir_prev_q <= dir_prev;
      // shift in at bit 0; the truncation drops the oldest bit
      vld_q      <= LAT'({vld_q, in_valid});
      fst_q      <= LAT'({fst_q, first_o & in_valid});
    end
  end

  // The frame at the output entered in this frame period once the phase has
  // reached LAT, otherwise in the previous one.
  always_comb begin
    if (32'(phase_q) >= LAT) begin
      u_o   = UW'(phase_q);
      dir_o = dir_cur;
    end else begin
      u_o   = UW'(phase_q) + UW'(FRAME);
      dir_o = dir_prev;
    end
  end

  assign out_valid_o = vld_q[LAT-1];
  assign out_first_o = fst_q[LAT-1];

endmodule

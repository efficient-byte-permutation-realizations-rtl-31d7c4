// Eight-port register-based byte permutation unit (ShiftRows / InvShiftRows).
//
// Eight bytes of an AES state enter per beat: on beat 0 lane i carries byte i
// (state columns 0 and 1), on beat 1 byte 8+i (columns 2 and 3). Lane i thus
// sees row i mod 4. Every lane has one byte register:
//   lanes 0 and 4 (row 0) are plain registers;
//   lanes 1, 2, 3, 5, 6, 7 have a register that either loads the input
//     (c = 0) or keeps its value (c = 1), and an output multiplexer that
//     passes either the input (0) or the register (1). Lane 1 is controlled
//     by c0/c1, lane 2 by c2/c3, lane 3 by c4/c5, lane 5 by c6/c7,
//     lane 6 by c8/c9 and lane 7 by c10/c11.
// A lane either delays each byte by one beat or swaps the order of its two
// bytes (the first is held, the second bypasses it). The crossing wires then
// take lane 5 to output 1, lane 1 to output 5, lane 7 to output 3 and lane 3
// to output 7; lanes 0, 2, 4 and 6 keep their position. Eight registers in
// all, latency one beat.
//
// Timing: bytes 0..7 of a state are at in_bytes on a beat with first_o = 1
// (t = 0); permuted bytes 0..7 are at out_bytes at t = 1 and bytes 8..15 at
// t = 2. States may follow back to back; dir is sampled with the first beat;
// registers advance only when en = 1.
//
// Structure, crossing and schedules follow the published eight-port unit
// (tables written with t = 0..2 from left to right). Enable, valid flags and
// reset are additions of this design.
module bpu_reg_8port
  import aes_bpu_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           in_valid,
  input  shift_dir_e     dir,
  input  byte_t [7:0]    in_bytes,
  output logic           first_o,
  output byte_t [7:0]    out_bytes,
  output logic           out_valid,
  output logic           out_first
);

  localparam int unsigned FRAME = 2;
  localparam int unsigned LAT   = 1;
  localparam int unsigned NT    = FRAME + LAT;

  // Lane schedules: hold/load select and output select, t = 0..2.
  localparam logic [0:NT-1] SWAP_HOLD  = 3'b010;  // swap the two bytes
  localparam logic [0:NT-1] SWAP_OUT   = 3'b101;
  localparam logic [0:NT-1] DELAY_HOLD = 3'b000;  // delay both by one beat
  localparam logic [0:NT-1] DELAY_OUT  = 3'b111;

  // Lanes with controls, in the order 1, 2, 3, 5, 6, 7.
  localparam int unsigned NL = 6;
  localparam int unsigned LANE [NL] = '{1, 2, 3, 5, 6, 7};
  // Lanes that swap in each direction (bit k for LANE[k]).
  localparam logic [NL-1:0] SWAP_L = 6'b110011;  // lanes 1, 2, 6, 7
  localparam logic [NL-1:0] SWAP_R = 6'b011110;  // lanes 2, 3, 5, 6

  logic [1:0] u;
  shift_dir_e odir;

  bpu_reg_ctrl #(.FRAME(FRAME), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .en, .in_valid, .dir_i(dir),
    .first_o, .u_o(u), .dir_o(odir),
    .out_valid_o(out_valid), .out_first_o(out_first)
  );

  // c[2k] = hold select, c[2k+1] = output select of LANE[k].
  logic [2*NL-1:0] c;

  always_comb begin
    for (int k = 0; k < NL; k++) begin
      if ((odir == SHIFT_LEFT) ? SWAP_L[k] : SWAP_R[k]) begin
        c[2*k]   = SWAP_HOLD[u];
        c[2*k+1] = SWAP_OUT[u];
      end else begin
        c[2*k]   = DELAY_HOLD[u];
        c[2*k+1] = DELAY_OUT[u];
      end
    end
  end

  byte_t r [8];
  byte_t lane_out [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else if (en) begin
      r[0] <= in_bytes[0];
      r[4] <= in_bytes[4];
      for (int k = 0; k < NL; k++)
        r[LANE[k]] <= c[2*k] ? r[LANE[k]] : in_bytes[LANE[k]];
    end
  end

  always_comb begin
    lane_out[0] = r[0];
    lane_out[4] = r[4];
    for (int k = 0; k < NL; k++)
      lane_out[LANE[k]] = c[2*k+1] ? r[LANE[k]] : in_bytes[LANE[k]];
  end

  // Crossing wires.
  assign out_bytes[0] = lane_out[0];
  assign out_bytes[1] = lane_out[5];
  assign out_bytes[2] = lane_out[2];
  assign out_bytes[3] = lane_out[7];
  assign out_bytes[4] = lane_out[4];
  assign out_bytes[5] = lane_out[1];
  assign out_bytes[6] = lane_out[6];
  assign out_bytes[7] = lane_out[3];

endmodule

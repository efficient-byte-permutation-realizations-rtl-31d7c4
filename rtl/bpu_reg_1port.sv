// One-port register-based byte permutation unit (ShiftRows / InvShiftRows).
//
// Bytes of an AES state enter one per beat in index order 0..15 and leave
// 12 beats later in ShiftRows order (dir = SHIFT_LEFT) or inverse ShiftRows
// order (dir = SHIFT_RIGHT). The storage is a single line of 12 byte
// registers r[0..11] in three sections of four. A byte that must wait longer
// than the line allows is taken from the last register r[11] and written back
// into the head of a section (multiplexers c0, c1, c2: backward allocation);
// a byte that must leave early is taken from the input or from the end of a
// section by the 4-input output multiplexer c3 (0 = input, 1 = r[3],
// 2 = r[7], 3 = r[11]: bypass). Twelve registers is the least any 1-byte
// ShiftRows unit can have, since a byte may have to move 12 places.
//
// Timing: the first byte of a state is at in_byte on a beat with
// first_o = 1 (t = 0); byte p of the permuted state is at out_byte at
// t = 12 + p. States may follow back to back. dir is sampled with the first
// byte. Every register advances only when en = 1.
//
// The register line, the multiplexer positions and the control schedule are
// those of the published one-port unit; the schedule tables below are written
// with t = 0..27 from left to right as in its control table. The enable, valid
// flags and reset are additions of this design.
module bpu_reg_1port
  import aes_bpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  input  shift_dir_e dir,
  input  byte_t      in_byte,
  output logic       first_o,
  output byte_t      out_byte,
  output logic       out_valid,
  output logic       out_first
);

  localparam int unsigned FRAME = 16;
  localparam int unsigned LAT   = 12;
  localparam int unsigned NT    = FRAME + LAT;

  // Control schedule of one state, indexed by t (left to right = t 0..27).
  localparam logic [0:NT-1] C0_L = 28'b0000000000000001000000000000;
  localparam logic [0:NT-1] C1_L = 28'b0000000000000010001100000000;
  localparam logic [0:NT-1] C2_L = 28'b0000000000000100010001010000;
  localparam logic [0:NT-1][1:0] C3_L = {
    2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd2,
    2'd1, 2'd0, 2'd3, 2'd2, 2'd1, 2'd1, 2'd3, 2'd2, 2'd3, 2'd2, 2'd3, 2'd3, 2'd3, 2'd3};
  localparam logic [0:NT-1] C0_R = 28'b0000000000000100000000000000;
  localparam logic [0:NT-1] C1_R = 28'b0000000000000010011000000000;
  localparam logic [0:NT-1] C2_R = 28'b0000000000000001000101010000;
  localparam logic [0:NT-1][1:0] C3_R = {
    2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd0,
    2'd1, 2'd2, 2'd3, 2'd1, 2'd1, 2'd2, 2'd3, 2'd2, 2'd3, 2'd2, 2'd3, 2'd3, 2'd3, 2'd3};

  logic [4:0] u;
  shift_dir_e odir;

  bpu_reg_ctrl #(.FRAME(FRAME), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .en, .in_valid, .dir_i(dir),
    .first_o, .u_o(u), .dir_o(odir),
    .out_valid_o(out_valid), .out_first_o(out_first)
  );

  logic       c0, c1, c2;
  logic [1:0] c3;

  always_comb begin
    if (odir == SHIFT_LEFT) begin
      c0 = C0_L[u]; c1 = C1_L[u]; c2 = C2_L[u]; c3 = C3_L[u];
    end else begin
      c0 = C0_R[u]; c1 = C1_R[u]; c2 = C2_R[u]; c3 = C3_R[u];
    end
  end

  byte_t r [12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 12; i++) r[i] <= '0;
    end else if (en) begin
      r[0] <= c0 ? r[11] : in_byte;
      r[1] <= r[0];
      r[2] <= r[1];
      r[3] <= r[2];
      r[4] <= c1 ? r[11] : r[3];
      r[5] <= r[4];
      r[6] <= r[5];
      r[7] <= r[6];
      r[8] <= c2 ? r[11] : r[7];
      r[9] <= r[8];
      r[10] <= r[9];
      r[11] <= r[10];
    end
  end

  always_comb begin
    unique case (c3)
      2'd0:    out_byte = in_byte;
      2'd1:    out_byte = r[3];
      2'd2:    out_byte = r[7];
      default: out_byte = r[11];
    endcase
  end

endmodule

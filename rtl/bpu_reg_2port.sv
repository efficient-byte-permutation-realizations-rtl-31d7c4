// Two-port register-based byte permutation unit (ShiftRows / InvShiftRows).
//
// Two bytes of an AES state enter per beat: on beat b (0..7) lane 0 carries
// byte 2b and lane 1 byte 2b+1, so lane 0 only ever sees state rows 0 and 2
// and lane 1 only rows 1 and 3. No byte has to change lanes, and each lane is
// a delay line of six byte registers with its own multiplexers:
//   lane 0: a[0..5]. a[2] is loaded from a[1] or, when c0 = 1, from the end
//           a[5] (backward allocation). Output multiplexer c1 picks a[1]
//           (c1 = 0) or a[5] (c1 = 2); these are the only two values c1 takes.
//   lane 1: b[0..5] in three sections of two. The head of each section
//           (b[0], b[2], b[4], multiplexers c2, c3, c4) is loaded either from
//           the line or from the end b[5]. Output multiplexer c5 picks the
//           input (0), b[1] (1), b[3] (2) or b[5] (3).
// Twelve registers in all, latency six beats.
//
// Timing: the first two bytes of a state are at in_bytes on a beat with
// first_o = 1 (t = 0); permuted bytes 2p and 2p+1 are at out_bytes at
// t = 6 + p. States may follow back to back; dir is sampled with the first
// beat; registers advance only when en = 1.
//
// Structure and schedules follow the published two-port unit (tables written
// with t = 0..13 from left to right). Enable, valid flags and reset are
// additions of this design.
module bpu_reg_2port
  import aes_bpu_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           in_valid,
  input  shift_dir_e     dir,
  input  byte_t [1:0]    in_bytes,
  output logic           first_o,
  output byte_t [1:0]    out_bytes,
  output logic           out_valid,
  output logic           out_first
);

  localparam int unsigned FRAME = 8;
  localparam int unsigned LAT   = 6;
  localparam int unsigned NT    = FRAME + LAT;

  // Lane 0 moves rows 0 and 2, which rotate by two either way: one schedule.
  localparam logic [0:NT-1]      C0   = 14'b00000001010000;
  localparam logic [0:NT-1][1:0] C1   = {2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2,
                                         2'd0, 2'd2, 2'd0, 2'd2, 2'd2, 2'd2, 2'd2};
  localparam logic [0:NT-1]      C2_L = 14'b00000001000000;
  localparam logic [0:NT-1]      C3_L = 14'b00000000010000;
  localparam logic [0:NT-1]      C4_L = 14'b00000010101100;
  localparam logic [0:NT-1][1:0] C5_L = {2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd2,
                                         2'd0, 2'd2, 2'd1, 2'd2, 2'd2, 2'd3, 2'd3};
  localparam logic [0:NT-1]      C2_R = 14'b00000010000000;
  localparam logic [0:NT-1]      C3_R = 14'b00000000100000;
  localparam logic [0:NT-1]      C4_R = 14'b00000001011100;
  localparam logic [0:NT-1][1:0] C5_R = {2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd3, 2'd0,
                                         2'd2, 2'd1, 2'd2, 2'd2, 2'd2, 2'd3, 2'd3};

  logic [3:0] u;
  shift_dir_e odir;

  bpu_reg_ctrl #(.FRAME(FRAME), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .en, .in_valid, .dir_i(dir),
    .first_o, .u_o(u), .dir_o(odir),
    .out_valid_o(out_valid), .out_first_o(out_first)
  );

  logic       c0, c2, c3, c4;
  logic [1:0] c1, c5;

  always_comb begin
    c0 = C0[u];
    c1 = C1[u];
    if (odir == SHIFT_LEFT) begin
      c2 = C2_L[u]; c3 = C3_L[u]; c4 = C4_L[u]; c5 = C5_L[u];
    end else begin
      c2 = C2_R[u]; c3 = C3_R[u]; c4 = C4_R[u]; c5 = C5_R[u];
    end
  end

  byte_t a [6];
  byte_t b [6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) begin
        a[i] <= '0;
        b[i] <= '0;
      end
    end else if (en) begin
      a[0] <= in_bytes[0];
      a[1] <= a[0];
      a[2] <= c0 ? a[5] : a[1];
      a[3] <= a[2];
      a[4] <= a[3];
      a[5] <= a[4];
      b[0] <= c2 ? b[5] : in_bytes[1];
      b[1] <= b[0];
      b[2] <= c3 ? b[5] : b[1];
      b[3] <= b[2];
      b[4] <= c4 ? b[5] : b[3];
      b[5] <= b[4];
    end
  end

  always_comb begin
    out_bytes[0] = (c1 == 2'd0) ? a[1] : a[5];
    unique case (c5)
      2'd0:    out_bytes[1] = in_bytes[1];
      2'd1:    out_bytes[1] = b[1];
      2'd2:    out_bytes[1] = b[3];
      default: out_bytes[1] = b[5];
    endcase
  end

endmodule

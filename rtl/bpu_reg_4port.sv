// Four-port register-based byte permutation unit (ShiftRows / InvShiftRows).
//
// Four bytes of an AES state enter per beat: on beat b (0..3) lane i carries
// byte 4b+i, i.e. lane i sees exactly state row i, one column per beat.
// ShiftRows rotates each row within itself, so each lane is handled alone:
//   lane 0: row 0 is not rotated; three plain registers give the latency.
//   lane 1: registers x[0..2]; each is loaded either from its predecessor
//           (x[0] from the input) or from the last register x[2]
//           (multiplexers c0, c1, c2). Output multiplexer c3 picks the input
//           (0), x[0] (1), x[1] (2) or x[2] (3).
//   lane 2: registers y[0..2]; y[1] is loaded from y[0] or, when c4 = 1, from
//           y[2]. Output multiplexer c5 picks y[0] (0) or y[2] (1).
//   lane 3: registers z[0..2] built like lane 1 (c6, c7, c8, output c9).
// Twelve registers in all, latency three beats. Rows 1 and 3 swap roles
// between the two directions.
//
// Timing: bytes 0..3 of a state are at in_bytes on a beat with first_o = 1
// (t = 0); permuted bytes 4p..4p+3 are at out_bytes at t = 3 + p. States may
// follow back to back; dir is sampled with the first beat; registers advance
// only when en = 1.
//
// LEFT_ONLY = 1 builds the trimmed unit for encryption only: dir is ignored,
// the row-1 registers x[0] and x[1] lose their multiplexers (c0, c1) and the
// row-1 output multiplexer c3 shrinks to two inputs (x[1] or x[2]). That
// leaves 10 multiplexers in 8-bit 2:1 equivalents instead of 14. The hold
// multiplexer c2 of x[2] stays: the left-shift schedule needs it to keep
// byte 1 for the last output beat.
//
// Structure and schedules follow the published four-port unit (tables written
// with t = 0..6 from left to right), as does the left-only trim and its
// multiplexer count. Enable, valid flags and reset are additions of this
// design.
module bpu_reg_4port
  import aes_bpu_pkg::*;
#(
  parameter bit LEFT_ONLY = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           in_valid,
  input  shift_dir_e     dir,
  input  byte_t [3:0]    in_bytes,
  output logic           first_o,
  output byte_t [3:0]    out_bytes,
  output logic           out_valid,
  output logic           out_first
);

  localparam int unsigned FRAME = 4;
  localparam int unsigned LAT   = 3;
  localparam int unsigned NT    = FRAME + LAT;

  // Schedule of a lane that rotates its row left by one / right by one.
  localparam logic [0:NT-1]      RL1_A = 7'b0000000;
  localparam logic [0:NT-1]      RL1_B = 7'b0000000;
  localparam logic [0:NT-1]      RL1_C = 7'b0001110;
  localparam logic [0:NT-1][1:0] RL1_O = {2'd3, 2'd3, 2'd3, 2'd2, 2'd2, 2'd2, 2'd3};
  localparam logic [0:NT-1]      RR1_A = 7'b0001000;
  localparam logic [0:NT-1]      RR1_B = 7'b0000100;
  localparam logic [0:NT-1]      RR1_C = 7'b0000010;
  localparam logic [0:NT-1][1:0] RR1_O = {2'd3, 2'd3, 2'd3, 2'd0, 2'd1, 2'd2, 2'd3};
  // Row 2 rotates by two either way.
  localparam logic [0:NT-1]      C4    = 7'b0001100;
  localparam logic [0:NT-1]      C5    = 7'b1110011;

  logic [2:0] u;
  shift_dir_e odir;

  shift_dir_e in_dir;
  assign in_dir = LEFT_ONLY ? SHIFT_LEFT : dir;

  bpu_reg_ctrl #(.FRAME(FRAME), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .en, .in_valid, .dir_i(in_dir),
    .first_o, .u_o(u), .dir_o(odir),
    .out_valid_o(out_valid), .out_first_o(out_first)
  );

  logic       c0, c1, c2, c4, c5, c6, c7, c8;
  logic [1:0] c3, c9;

  always_comb begin
    c4 = C4[u];
    c5 = C5[u];
    if (odir == SHIFT_LEFT) begin
      // row 1 rotates left by one, row 3 left by three (= right by one)
      c0 = RL1_A[u]; c1 = RL1_B[u]; c2 = RL1_C[u]; c3 = RL1_O[u];
      c6 = RR1_A[u]; c7 = RR1_B[u]; c8 = RR1_C[u]; c9 = RR1_O[u];
    end else begin
      c0 = RR1_A[u]; c1 = RR1_B[u]; c2 = RR1_C[u]; c3 = RR1_O[u];
      c6 = RL1_A[u]; c7 = RL1_B[u]; c8 = RL1_C[u]; c9 = RL1_O[u];
    end
  end

  byte_t w [3];
  byte_t x [3];
  byte_t y [3];
  byte_t z [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        w[i] <= '0;
        x[i] <= '0;
        y[i] <= '0;
        z[i] <= '0;
      end
    end else if (en) begin
      w[0] <= in_bytes[0];
      w[1] <= w[0];
      w[2] <= w[1];
      x[0] <= (!LEFT_ONLY && c0) ? x[2] : in_bytes[1];
      x[1] <= (!LEFT_ONLY && c1) ? x[2] : x[0];
      x[2] <= c2 ? x[2] : x[1];
      y[0] <= in_bytes[2];
      y[1] <= c4 ? y[2] : y[0];
      y[2] <= y[1];
      z[0] <= c6 ? z[2] : in_bytes[3];
      z[1] <= c7 ? z[2] : z[0];
      z[2] <= c8 ? z[2] : z[1];
    end
  end

  always_comb begin
    out_bytes[0] = w[2];
    if (LEFT_ONLY) begin
      // the left-shift schedule only uses c3 = 2 and 3
      out_bytes[1] = c3[0] ? x[2] : x[1];
    end else begin
      unique case (c3)
        2'd0:    out_bytes[1] = in_bytes[1];
        2'd1:    out_bytes[1] = x[0];
        2'd2:    out_bytes[1] = x[1];
        default: out_bytes[1] = x[2];
      endcase
    end
    out_bytes[2] = c5 ? y[2] : y[0];
    unique case (c9)
      2'd0:    out_bytes[3] = in_bytes[3];
      2'd1:    out_bytes[3] = z[0];
      2'd2:    out_bytes[3] = z[1];
      default: out_bytes[3] = z[2];
    endcase
  end

endmodule

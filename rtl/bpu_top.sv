// Collection of AES byte permutation units (ShiftRows / InvShiftRows) for
// folded AES datapaths that process Q bytes of the 16-byte state per cycle.
//
// In a folded AES round the SubBytes, MixColumns and AddRoundKey logic only
// sees Q bytes at a time, so the ShiftRows step, which moves bytes across the
// whole state, becomes a small storage problem. This top holds every unit of
// the library side by side, each with its own ports, as the ShiftRows stage
// that such a datapath would place in its loop:
//   mem_*  : memory-based unit, Q = MEM_Q (default 4) dual-port memories of
//            16/Q bytes; the state stays in place and is read back in
//            permuted order through computed row addresses (bpu_mem).
//   reg1_* : one-port register unit, 12 registers, latency 12 (bpu_reg_1port).
//   reg2_* : two-port register unit, 12 registers, latency 6 (bpu_reg_2port).
//   reg4_* : four-port register unit, 12 registers, latency 3 (bpu_reg_4port).
//   reg8_* : eight-port register unit, 8 registers, latency 1 (bpu_reg_8port).
// The datapath around them (SubBytes, MixColumns, AddRoundKey, key schedule
// and the round controller that counts j and k) is not part of this library;
// its connections are these ports. See the unit files for timing.
module bpu_top
  import aes_bpu_pkg::*;
#(
  parameter int unsigned MEM_Q = 4,
  localparam int unsigned MAW  = $clog2(16 / MEM_Q)
) (
  input  logic              clk,
  input  logic              rst_n,

  // memory-based unit
  input  logic              mem_wr_en,
  input  logic              mem_wr_init,
  input  logic [MAW-1:0]    mem_wr_j,
  input  logic [3:0]        mem_wr_k,
  input  shift_dir_e        mem_wr_dir,
  input  byte_t [MEM_Q-1:0] mem_wr_bytes,
  input  logic              mem_rd_en,
  input  logic              mem_rd_init,
  input  logic [MAW-1:0]    mem_rd_j,
  input  logic [3:0]        mem_rd_k,
  input  shift_dir_e        mem_rd_dir,
  output byte_t [MEM_Q-1:0] mem_rd_bytes,

  // one-port register unit
  input  logic              reg1_en,
  input  logic              reg1_in_valid,
  input  shift_dir_e        reg1_dir,
  input  byte_t             reg1_in_byte,
  output logic              reg1_first,
  output byte_t             reg1_out_byte,
  output logic              reg1_out_valid,
  output logic              reg1_out_first,

  // two-port register unit
  input  logic              reg2_en,
  input  logic              reg2_in_valid,
  input  shift_dir_e        reg2_dir,
  input  byte_t [1:0]       reg2_in_bytes,
  output logic              reg2_first,
  output byte_t [1:0]       reg2_out_bytes,
  output logic              reg2_out_valid,
  output logic              reg2_out_first,

  // four-port register unit
  input  logic              reg4_en,
  input  logic              reg4_in_valid,
  input  shift_dir_e        reg4_dir,
  input  byte_t [3:0]       reg4_in_bytes,
  output logic              reg4_first,
  output byte_t [3:0]       reg4_out_bytes,
  output logic              reg4_out_valid,
  output logic              reg4_out_first,

  // eight-port register unit
  input  logic              reg8_en,
  input  logic              reg8_in_valid,
  input  shift_dir_e        reg8_dir,
  input  byte_t [7:0]       reg8_in_bytes,
  output logic              reg8_first,
  output byte_t [7:0]       reg8_out_bytes,
  output logic              reg8_out_valid,
  output logic              reg8_out_first
);

  bpu_mem #(.Q(MEM_Q)) u_mem (
    .clk,
    .wr_en(mem_wr_en), .wr_init(mem_wr_init), .wr_j(mem_wr_j), .wr_k(mem_wr_k),
    .wr_dir(mem_wr_dir), .wr_bytes(mem_wr_bytes),
    .rd_en(mem_rd_en), .rd_init(mem_rd_init), .rd_j(mem_rd_j), .rd_k(mem_rd_k),
    .rd_dir(mem_rd_dir), .rd_bytes(mem_rd_bytes)
  );

  bpu_reg_1port u_reg1 (
    .clk, .rst_n, .en(reg1_en), .in_valid(reg1_in_valid), .dir(reg1_dir),
    .in_byte(reg1_in_byte), .first_o(reg1_first), .out_byte(reg1_out_byte),
    .out_valid(reg1_out_valid), .out_first(reg1_out_first)
  );

  bpu_reg_2port u_reg2 (
    .clk, .rst_n, .en(reg2_en), .in_valid(reg2_in_valid), .dir(reg2_dir),
    .in_bytes(reg2_in_bytes), .first_o(reg2_first), .out_bytes(reg2_out_bytes),
    .out_valid(reg2_out_valid), .out_first(reg2_out_first)
  );

  bpu_reg_4port u_reg4 (
    .clk, .rst_n, .en(reg4_en), .in_valid(reg4_in_valid), .dir(reg4_dir),
    .in_bytes(reg4_in_bytes), .first_o(reg4_first), .out_bytes(reg4_out_bytes),
    .out_valid(reg4_out_valid), .out_first(reg4_out_first)
  );

  bpu_reg_8port u_reg8 (
    .clk, .rst_n, .en(reg8_en), .in_valid(reg8_in_valid), .dir(reg8_dir),
    .in_bytes(reg8_in_bytes), .first_o(reg8_first), .out_bytes(reg8_out_bytes),
    .out_valid(reg8_out_valid), .out_first(reg8_out_first)
  );

endmodule

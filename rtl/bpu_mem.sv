// Memory-based byte permutation unit (in-place ShiftRows / InvShiftRows).
//
// A folded AES datapath that handles Q bytes per cycle (Q = 1, 2 or 4) keeps
// the 16-byte state in Q dual-port memories of 16/Q bytes each and reads it
// back, Q bytes per access, in the order the next round needs. Byte h always
// sits in memory h mod Q, so each memory port connects straight to one byte
// lane of the datapath with no multiplexing. Only the row changes: the row
// address generators compute it from the access index j and the round index
// k, which the datapath controller counts anyway. Results of access j in
// round k are written back to exactly the rows that access read, so exactly
// 16 bytes of storage are needed and no second buffer. After four rounds the
// layout is back to its start.
//
// Use:
//   load     : write bytes Q*j .. Q*j+Q-1 of a state with wr_init = 1,
//              j = 0 .. 16/Q-1 (natural layout).
//   round k  : read with rd_k = k, j = 0 .. 16/Q-1; rd_bytes then carries
//              bytes Q*j .. Q*j+Q-1 of the (inverse) shifted state one cycle
//              after rd_en. Write the processed bytes back with wr_k = k and
//              the same j, at any later cycle.
//   unload   : read with rd_k = k of the last round written to get the state
//              in natural byte order.
// The two ports are independent, so round k may still be writing while it
// reads. A row must not be read for round k+1 before round k has written it;
// keeping to that is the job of whoever drives j and k.
//
// The storage organisation, byte-to-memory mapping and address equations are
// the published ones; the port set, the one-cycle read latency and the init
// input that stands for the natural layout are this design's choices.
module bpu_mem
  import aes_bpu_pkg::*;
#(
  parameter int unsigned Q  = 4,
  localparam int unsigned W  = 16 / Q,
  localparam int unsigned AW = $clog2(W)
) (
  input  logic          clk,
  // write port
  input  logic          wr_en,
  input  logic          wr_init,
  input  logic [AW-1:0] wr_j,
  input  logic [3:0]    wr_k,
  input  shift_dir_e    wr_dir,
  input  byte_t [Q-1:0] wr_bytes,
  // read port
  input  logic          rd_en,
  input  logic          rd_init,
  input  logic [AW-1:0] rd_j,
  input  logic [3:0]    rd_k,
  input  shift_dir_e    rd_dir,
  output byte_t [Q-1:0] rd_bytes
);

  for (genvar ma = 0; ma < Q; ma++) begin : g_mod
    logic [AW-1:0] wra, rra;

    bpu_mem_addr_gen #(.Q(Q), .MA(ma)) u_wag (
      .j(wr_j), .k(wr_k), .init(wr_init), .dir(wr_dir), .ra(wra)
    );
    bpu_mem_addr_gen #(.Q(Q), .MA(ma)) u_rag (
      .j(rd_j), .k(rd_k), .init(rd_init), .dir(rd_dir), .ra(rra)
    );

    bpu_dpram #(.DEPTH(W), .WIDTH(8)) u_mem (
      .clk,
      .we(wr_en), .waddr(wra), .wdata(wr_bytes[ma]),
      .re(rd_en), .raddr(rra), .rdata(rd_bytes[ma])
    );
  end

endmodule

// Self-checking testbench of the memory-based permutation unit: runs the
// in-place load / rounds / unload sequence of tb_bpu_mem_agent on units with
// Q = 4 (the default), 2 and 1 memories, in both directions.
module tb_bpu_mem;
  import aes_bpu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [3];
  int   c [3], f [3], r [3], w [3];

  for (genvar g = 0; g < 3; g++) begin : g_q
    localparam int unsigned Q  = 4 >> g;
    localparam int unsigned AW = $clog2(16 / Q);
    logic          wr_en, wr_init, rd_en, rd_init;
    logic [AW-1:0] wr_j, rd_j;
    logic [3:0]    wr_k, rd_k;
    shift_dir_e    wr_dir, rd_dir;
    byte_t [Q-1:0] wr_bytes, rd_bytes;

    bpu_mem #(.Q(Q)) dut (
      .clk, .wr_en, .wr_init, .wr_j, .wr_k, .wr_dir, .wr_bytes,
      .rd_en, .rd_init, .rd_j, .rd_k, .rd_dir, .rd_bytes
    );
    tb_bpu_mem_agent #(.Q(Q)) agent (
      .clk, .wr_en, .wr_init, .wr_j, .wr_k, .wr_dir, .wr_bytes,
      .rd_en, .rd_init, .rd_j, .rd_k, .rd_dir, .rd_bytes,
      .done(done[g]), .checks(c[g]), .failures(f[g]), .rounds_run(r[g]), .wraps(w[g])
    );
  end

  initial begin
    int checks, failures;
    wait (done[0] && done[1] && done[2]);
    checks   = c[0] + c[1] + c[2] + 1;
    failures = f[0] + f[1] + f[2];
    if (w[0] == 0 || w[1] == 0 || w[2] == 0) begin
      failures++; $display("address cycle never wrapped");
    end
    $display("rounds run: Q=4 %0d, Q=2 %0d, Q=1 %0d", r[0], r[1], r[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule

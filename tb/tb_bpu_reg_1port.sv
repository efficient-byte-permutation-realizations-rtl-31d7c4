// Self-checking testbench of the 1-port register byte permutation unit.
// tb_bpu_reg_agent streams random states through it back to back, with random
// directions, invalid states and stalls, and checks the (inverse) ShiftRows
// order and the latency of 12 beats.
module tb_bpu_reg_1port;
  import aes_bpu_pkg::*;

  localparam int Q = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          en, in_valid, first_o, out_valid, out_first, done;
  shift_dir_e    dir;
  byte_t [Q-1:0] in_bytes, out_bytes;
  int checks, failures, n_left, n_right, n_switch, n_gap, n_stall;

  bpu_reg_1port dut (
    .clk, .rst_n, .en, .in_valid, .dir,
    .in_byte(in_bytes[0]), .first_o, .out_byte(out_bytes[0]),
    .out_valid, .out_first
  );

  tb_bpu_reg_agent #(.Q(Q), .LAT(12)) agent (
    .clk, .rst_n, .en, .in_valid, .dir, .in_bytes, .first_o, .out_bytes,
    .out_valid, .out_first, .done, .checks, .failures,
    .n_left, .n_right, .n_switch, .n_gap, .n_stall
  );

  initial begin
    int c, f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    c = checks + 1;
    f = failures;
    if (n_left == 0 || n_right == 0 || n_switch == 0 || n_gap == 0 || n_stall == 0) begin
      f++; $display("a feature was not exercised");
    end
    $display("left %0d right %0d switches %0d gaps %0d stalls %0d",
             n_left, n_right, n_switch, n_gap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

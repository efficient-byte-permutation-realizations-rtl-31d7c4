// Self-checking testbench of the 4-port register byte permutation unit.
// tb_bpu_reg_agent streams random states through it back to back, with random
// directions, invalid states and stalls, and checks the (inverse) ShiftRows
// order and the latency of 3 beats. A second instance, built left-shift only
// (LEFT_ONLY = 1), gets left-shift states with a random dir input, which it
// must ignore.
module tb_bpu_reg_4port;
  import aes_bpu_pkg::*;

  localparam int Q = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // full unit
  logic          en, in_valid, first_o, out_valid, out_first, done;
  shift_dir_e    dir;
  byte_t [Q-1:0] in_bytes, out_bytes;
  int checks, failures, n_left, n_right, n_switch, n_gap, n_stall;

  // left-only unit
  logic          l_en, l_in_valid, l_first_o, l_out_valid, l_out_first, l_done;
  shift_dir_e    l_dir_agent, l_dir;
  byte_t [Q-1:0] l_in_bytes, l_out_bytes;
  int l_checks, l_failures, l_left, l_right, l_switch, l_gap, l_stall;

  bpu_reg_4port dut (
    .clk, .rst_n, .en, .in_valid, .dir,
    .in_bytes, .first_o, .out_bytes, .out_valid, .out_first
  );

  tb_bpu_reg_agent #(.Q(Q), .LAT(3)) agent (
    .clk, .rst_n, .en, .in_valid, .dir, .in_bytes, .first_o, .out_bytes,
    .out_valid, .out_first, .done, .checks, .failures,
    .n_left, .n_right, .n_switch, .n_gap, .n_stall
  );

  always @(negedge clk) l_dir <= shift_dir_e'($urandom % 2);

  bpu_reg_4port #(.LEFT_ONLY(1'b1)) dut_left (
    .clk, .rst_n, .en(l_en), .in_valid(l_in_valid), .dir(l_dir),
    .in_bytes(l_in_bytes), .first_o(l_first_o), .out_bytes(l_out_bytes),
    .out_valid(l_out_valid), .out_first(l_out_first)
  );

  tb_bpu_reg_agent #(.Q(Q), .LAT(3), .FORCE_LEFT(1'b1)) agent_left (
    .clk, .rst_n, .en(l_en), .in_valid(l_in_valid), .dir(l_dir_agent), .in_bytes(l_in_bytes),
    .first_o(l_first_o), .out_bytes(l_out_bytes), .out_valid(l_out_valid),
    .out_first(l_out_first), .done(l_done), .checks(l_checks), .failures(l_failures),
    .n_left(l_left), .n_right(l_right), .n_switch(l_switch), .n_gap(l_gap), .n_stall(l_stall)
  );

  initial begin
    int c, f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done && l_done);
    c = checks + l_checks + 2;
    f = failures + l_failures;
    if (n_left == 0 || n_right == 0 || n_switch == 0 || n_gap == 0 || n_stall == 0) begin
      f++; $display("a feature was not exercised");
    end
    if (l_left == 0 || l_right != 0) begin
      f++; $display("left-only unit not exercised as intended");
    end
    $display("full: left %0d right %0d switches %0d gaps %0d stalls %0d",
             n_left, n_right, n_switch, n_gap, n_stall);
    $display("left-only: states %0d", l_left);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + l_checks, failures + l_failures + 1);
    $finish;
  end
endmodule

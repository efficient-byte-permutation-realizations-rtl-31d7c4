// End-to-end testbench of bpu_top at its default parameters.
//
// All five units run at the same time: the four register units each stream
// random states back to back (random directions, invalid states, stalls)
// and the memory unit runs load / rounds / unload sequences the way a folded
// AES datapath would. Every output byte is compared with the reference
// ShiftRows / InvShiftRows model and every latency is checked. The testbench
// also counts how often each mechanism of the units happened and fails if
// one never did:
//   backward allocation - a register unit writes its last register back into
//                         the head of a section (or holds it, eight-port);
//   bypass              - an output multiplexer takes a byte from the input
//                         or from the middle of a line instead of its end;
//   back-to-back states, direction changes, invalid states, stalls;
//   memory unit: read and write in the same cycle, and the four-round
//   address cycle wrapping round.
module tb_bpu_top;
  import aes_bpu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // memory-based unit
  logic          mem_wr_en, mem_wr_init, mem_rd_en, mem_rd_init;
  logic [1:0]    mem_wr_j, mem_rd_j;
  logic [3:0]    mem_wr_k, mem_rd_k;
  shift_dir_e    mem_wr_dir, mem_rd_dir;
  byte_t [3:0]   mem_wr_bytes, mem_rd_bytes;

  // register units, indexed 0..3 for 1, 2, 4 and 8 ports
  logic          en [4], in_valid [4], first [4], out_valid [4], out_first [4], done [4];
  shift_dir_e    dir [4];
  byte_t [0:0]   in1, out1;
  byte_t [1:0]   in2, out2;
  byte_t [3:0]   in4, out4;
  byte_t [7:0]   in8, out8;
  int c [4], f [4], nl [4], nr [4], ns [4], ng [4], nst [4];

  bpu_top dut (
    .clk, .rst_n,
    .mem_wr_en, .mem_wr_init, .mem_wr_j, .mem_wr_k, .mem_wr_dir, .mem_wr_bytes,
    .mem_rd_en, .mem_rd_init, .mem_rd_j, .mem_rd_k, .mem_rd_dir, .mem_rd_bytes,
    .reg1_en(en[0]), .reg1_in_valid(in_valid[0]), .reg1_dir(dir[0]),
    .reg1_in_byte(in1[0]), .reg1_first(first[0]), .reg1_out_byte(out1[0]),
    .reg1_out_valid(out_valid[0]), .reg1_out_first(out_first[0]),
    .reg2_en(en[1]), .reg2_in_valid(in_valid[1]), .reg2_dir(dir[1]),
    .reg2_in_bytes(in2), .reg2_first(first[1]), .reg2_out_bytes(out2),
    .reg2_out_valid(out_valid[1]), .reg2_out_first(out_first[1]),
    .reg4_en(en[2]), .reg4_in_valid(in_valid[2]), .reg4_dir(dir[2]),
    .reg4_in_bytes(in4), .reg4_first(first[2]), .reg4_out_bytes(out4),
    .reg4_out_valid(out_valid[2]), .reg4_out_first(out_first[2]),
    .reg8_en(en[3]), .reg8_in_valid(in_valid[3]), .reg8_dir(dir[3]),
    .reg8_in_bytes(in8), .reg8_first(first[3]), .reg8_out_bytes(out8),
    .reg8_out_valid(out_valid[3]), .reg8_out_first(out_first[3])
  );

  tb_bpu_reg_agent #(.Q(1), .LAT(12)) a1 (
    .clk, .rst_n, .en(en[0]), .in_valid(in_valid[0]), .dir(dir[0]), .in_bytes(in1),
    .first_o(first[0]), .out_bytes(out1), .out_valid(out_valid[0]), .out_first(out_first[0]),
    .done(done[0]), .checks(c[0]), .failures(f[0]), .n_left(nl[0]), .n_right(nr[0]),
    .n_switch(ns[0]), .n_gap(ng[0]), .n_stall(nst[0]));
  tb_bpu_reg_agent #(.Q(2), .LAT(6)) a2 (
    .clk, .rst_n, .en(en[1]), .in_valid(in_valid[1]), .dir(dir[1]), .in_bytes(in2),
    .first_o(first[1]), .out_bytes(out2), .out_valid(out_valid[1]), .out_first(out_first[1]),
    .done(done[1]), .checks(c[1]), .failures(f[1]), .n_left(nl[1]), .n_right(nr[1]),
    .n_switch(ns[1]), .n_gap(ng[1]), .n_stall(nst[1]));
  tb_bpu_reg_agent #(.Q(4), .LAT(3)) a4 (
    .clk, .rst_n, .en(en[2]), .in_valid(in_valid[2]), .dir(dir[2]), .in_bytes(in4),
    .first_o(first[2]), .out_bytes(out4), .out_valid(out_valid[2]), .out_first(out_first[2]),
    .done(done[2]), .checks(c[2]), .failures(f[2]), .n_left(nl[2]), .n_right(nr[2]),
    .n_switch(ns[2]), .n_gap(ng[2]), .n_stall(nst[2]));
  tb_bpu_reg_agent #(.Q(8), .LAT(1)) a8 (
    .clk, .rst_n, .en(en[3]), .in_valid(in_valid[3]), .dir(dir[3]), .in_bytes(in8),
    .first_o(first[3]), .out_bytes(out8), .out_valid(out_valid[3]), .out_first(out_first[3]),
    .done(done[3]), .checks(c[3]), .failures(f[3]), .n_left(nl[3]), .n_right(nr[3]),
    .n_switch(ns[3]), .n_gap(ng[3]), .n_stall(nst[3]));

  logic mdone;
  int   mc, mf, mr, mw;
  tb_bpu_mem_agent #(.Q(4)) am (
    .clk, .wr_en(mem_wr_en), .wr_init(mem_wr_init), .wr_j(mem_wr_j), .wr_k(mem_wr_k),
    .wr_dir(mem_wr_dir), .wr_bytes(mem_wr_bytes),
    .rd_en(mem_rd_en), .rd_init(mem_rd_init), .rd_j(mem_rd_j), .rd_k(mem_rd_k),
    .rd_dir(mem_rd_dir), .rd_bytes(mem_rd_bytes),
    .done(mdone), .checks(mc), .failures(mf), .rounds_run(mr), .wraps(mw));

  // Mechanism counters, sampled on enabled cycles of each unit.
  int backalloc [4], bypass [4], simul_rw;
  initial begin
    for (int i = 0; i < 4; i++) begin backalloc[i] = 0; bypass[i] = 0; end
    simul_rw = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (en[0]) begin
      if (dut.u_reg1.c0 || dut.u_reg1.c1 || dut.u_reg1.c2) backalloc[0]++;
      if (dut.u_reg1.c3 != 2'd3 && out_valid[0]) bypass[0]++;
    end
    if (en[1]) begin
      if (dut.u_reg2.c0 || dut.u_reg2.c2 || dut.u_reg2.c3 || dut.u_reg2.c4) backalloc[1]++;
      if ((dut.u_reg2.c1 == 2'd0 || dut.u_reg2.c5 != 2'd3) && out_valid[1]) bypass[1]++;
    end
    if (en[2]) begin
      if (dut.u_reg4.c0 || dut.u_reg4.c1 || dut.u_reg4.c2 || dut.u_reg4.c4 ||
          dut.u_reg4.c6 || dut.u_reg4.c7 || dut.u_reg4.c8) backalloc[2]++;
      if ((dut.u_reg4.c3 != 2'd3 || !dut.u_reg4.c5 || dut.u_reg4.c9 != 2'd3) && out_valid[2])
        bypass[2]++;
    end
    if (en[3]) begin
      if (dut.u_reg8.c[0] || dut.u_reg8.c[2] || dut.u_reg8.c[4] || dut.u_reg8.c[6] ||
          dut.u_reg8.c[8] || dut.u_reg8.c[10]) backalloc[3]++;
      if (!(dut.u_reg8.c[1] && dut.u_reg8.c[3] && dut.u_reg8.c[5] && dut.u_reg8.c[7] &&
            dut.u_reg8.c[9] && dut.u_reg8.c[11]) && out_valid[3]) bypass[3]++;
    end
    if (mem_wr_en && mem_rd_en) simul_rw++;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && mdone);
    checks = mc + 1; failures = mf;
    for (int i = 0; i < 4; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      $display("%0d-port: left %0d right %0d dir changes %0d invalid %0d stalls %0d backward %0d bypass %0d",
               1 << i, nl[i], nr[i], ns[i], ng[i], nst[i], backalloc[i], bypass[i]);
      if (nl[i] == 0 || nr[i] == 0 || ns[i] == 0 || ng[i] == 0 || nst[i] == 0 ||
          backalloc[i] == 0 || bypass[i] == 0) begin
        failures++; $display("%0d-port: a mechanism never happened", 1 << i);
      end
    end
    $display("memory unit: rounds %0d, states past four rounds %0d, read+write cycles %0d",
             mr, mw, simul_rw);
    checks++;
    if (mr == 0 || mw == 0 || simul_rw == 0) begin
      failures++; $display("memory unit: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", mc + c[0] + c[1] + c[2] + c[3],
             mf + f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule

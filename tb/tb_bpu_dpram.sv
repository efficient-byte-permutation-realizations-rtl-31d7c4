// Self-checking testbench of the dual-port byte memory: random writes and
// reads on both ports in the same cycles, compared with a model array.
// Checks the one-cycle read latency and that a read of the address being
// written returns the old word.
module tb_bpu_dpram;
  localparam int DEPTH = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we = 1'b0, re = 1'b0;
  logic [2:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;

  bpu_dpram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0, same_addr = 0;

  initial begin
    logic [7:0] exp_d;
    logic       exp_v;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    exp_v = 1'b0; exp_d = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_d) begin
          failures++; $display("read %0d: got %02x exp %02x", i, rdata, exp_d);
        end
      end
      we = 1'($urandom); re = 1'($urandom);
      waddr = 3'($urandom); raddr = ($urandom % 4 == 0) ? waddr : 3'($urandom);
      wdata = 8'($urandom);
      if (re && we && raddr == waddr) same_addr++;
      exp_v = re;
      exp_d = model[raddr];                 // old word, read before the write
      if (we) model[waddr] = wdata;
      if (!re) exp_v = 1'b0;
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Stimulus and checker for one register-based permutation unit with Q ports.
//
// Streams NFR random AES states through the unit with no gap between them,
// with a random direction per state, some states marked invalid and random
// stall cycles (en = 0). Each valid state must come out in (inverse)
// ShiftRows order, computed by the reference model, starting exactly LAT
// enabled cycles after its first beat went in. Counts how often each feature
// was exercised: left and right states, direction changes between
// consecutive valid states, invalid states and stall cycles.
module tb_bpu_reg_agent
  import aes_bpu_pkg::*;
  import tb_aes_ref_pkg::*;
#(
  parameter int Q   = 4,
  parameter int LAT = 3,
  parameter int NFR = 200,
  parameter bit FORCE_LEFT = 1'b0   // only left-shift states (left-only units)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          en,
  output logic          in_valid,
  output shift_dir_e    dir,
  output byte_t [Q-1:0] in_bytes,
  input  logic          first_o,
  input  byte_t [Q-1:0] out_bytes,
  input  logic          out_valid,
  input  logic          out_first,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_left,
  output int            n_right,
  output int            n_switch,
  output int            n_gap,
  output int            n_stall
);
  localparam int FRAME = 16 / Q;

  byte_t exp_q [$];
  int    start_q [$];
  int    ecount = 0;
  int    obeat = 0;

  initial begin
    en = 1'b0; in_valid = 1'b0; dir = SHIFT_LEFT; in_bytes = '0; done = 1'b0;
    checks = 0; failures = 0;
    n_left = 0; n_right = 0; n_switch = 0; n_gap = 0; n_stall = 0;
  end

  // Output checker, on every enabled cycle.
  always @(posedge clk) begin
    if (rst_n && en) begin
      if (out_valid) begin
        if (obeat == 0) begin
          checks++;
          if (!out_first) begin
            failures++; $display("Q=%0d: missing out_first", Q);
          end
          checks++;
          if (start_q.size() == 0 || ecount != start_q[0] + LAT) begin
            failures++;
            $display("Q=%0d: latency error, first output on enabled cycle %0d", Q, ecount);
          end
          if (start_q.size() != 0) void'(start_q.pop_front());
        end
        for (int i = 0; i < Q; i++) begin
          byte_t e;
          checks++;
          e = (exp_q.size() != 0) ? exp_q.pop_front() : 8'h00;
          if (out_bytes[i] != e) begin
            failures++;
            if (failures < 20)
              $display("Q=%0d: data error beat %0d lane %0d got %02x exp %02x",
                       Q, obeat, i, out_bytes[i], e);
          end
        end
        obeat = (obeat + 1) % FRAME;
      end
      ecount++;
    end
  end

  initial begin
    byte_t st [16];
    bit    v;
    shift_dir_e d, last_d;
    bit    have_last;
    have_last = 1'b0; last_d = SHIFT_LEFT;
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < NFR + 2; f++) begin
      v = (f < NFR) && (($urandom % 8) != 0);
      d = FORCE_LEFT ? SHIFT_LEFT : shift_dir_e'($urandom % 2);
      for (int n = 0; n < 16; n++) st[n] = byte_t'($urandom);
      if (v) begin
        for (int p = 0; p < 16; p++) exp_q.push_back(st[sr_src(p, d)]);
        if (d == SHIFT_LEFT) n_left++; else n_right++;
        if (have_last && d != last_d) n_switch++;
        last_d = d; have_last = 1'b1;
      end else if (f < NFR) begin
        n_gap++;
      end
      for (int b = 0; b < FRAME; b++) begin
        while (($urandom % 6) == 0) begin
          en = 1'b0; n_stall++;
          @(negedge clk);
        end
        en = 1'b1;
        in_valid = v;
        dir = (b == 0) ? d : shift_dir_e'($urandom % 2);   // sampled on beat 0 only
        for (int i = 0; i < Q; i++) in_bytes[i] = st[b * Q + i];
        checks++;
        if (first_o != (b == 0)) begin
          failures++; $display("Q=%0d: first_o misaligned", Q);
        end
        if (b == 0 && v) start_q.push_back(ecount);
        @(negedge clk);
      end
    end
    en = 1'b1; in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("Q=%0d: %0d bytes never came out", Q, exp_q.size());
    end
    done = 1'b1;
  end
endmodule

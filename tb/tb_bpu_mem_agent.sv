// Drives one memory-based permutation unit the way a folded AES datapath
// would, and checks it. For each of NST random states: load the state in
// natural order, run a random number of rounds (up to 14, so the four-round
// address cycle wraps), and unload. In every round each access reads Q
// bytes, which must be the (inverse) shifted state, and one cycle later
// writes them back transformed (x ^ round constant) while the next access
// is being read. One idle cycle separates rounds, so a round never reads a
// row the previous round has not written yet. The unit itself is outside;
// the agent drives its ports and reports its counts on ports.
module tb_bpu_mem_agent
  import aes_bpu_pkg::*;
  import tb_aes_ref_pkg::*;
#(
  parameter int unsigned Q   = 4,
  parameter int unsigned NST = 40,
  localparam int unsigned AW = $clog2(16 / Q)
) (
  input  logic clk,
  output logic          wr_en,
  output logic          wr_init,
  output logic [AW-1:0] wr_j,
  output logic [3:0]    wr_k,
  output shift_dir_e    wr_dir,
  output byte_t [Q-1:0] wr_bytes,
  output logic          rd_en,
  output logic          rd_init,
  output logic [AW-1:0] rd_j,
  output logic [3:0]    rd_k,
  output shift_dir_e    rd_dir,
  input  byte_t [Q-1:0] rd_bytes,
  output logic done,
  output int   checks,
  output int   failures,
  output int   rounds_run,
  output int   wraps
);
  localparam int unsigned W  = 16 / Q;

  function automatic byte_t xf(byte_t x, int k);
    return x ^ byte_t'(8'h3b * (k + 1));
  endfunction

  initial begin
    byte_t st [16], nx [16];
    shift_dir_e d;
    int nr;
    done = 1'b0; checks = 0; failures = 0; rounds_run = 0; wraps = 0;
    wr_en = 1'b0; wr_init = 1'b0; wr_j = '0; wr_k = '0; wr_dir = SHIFT_LEFT; wr_bytes = '0;
    rd_en = 1'b0; rd_init = 1'b0; rd_j = '0; rd_k = '0; rd_dir = SHIFT_LEFT;
    @(negedge clk);
    for (int s = 0; s < NST; s++) begin
      d  = shift_dir_e'($urandom % 2);
      nr = 1 + ($urandom % 14);
      if (nr > 4) wraps++;
      for (int n = 0; n < 16; n++) st[n] = byte_t'($urandom);
      // load
      for (int j = 0; j < W; j++) begin
        wr_en = 1'b1; wr_init = 1'b1; wr_j = AW'(j); wr_k = 4'($urandom); wr_dir = d;
        for (int m = 0; m < Q; m++) wr_bytes[m] = st[Q * j + m];
        @(negedge clk);
      end
      wr_en = 1'b0; wr_init = 1'b0;
      // rounds
      for (int k = 0; k < nr; k++) begin
        for (int p = 0; p < 16; p++) nx[p] = xf(st[sr_src(p, d)], k);
        for (int j = 0; j <= W; j++) begin
          // read access j
          rd_en = (j < W); rd_init = 1'b0; rd_j = AW'(j); rd_k = 4'(k); rd_dir = d;
          // write back access j-1, whose data is on rd_bytes now
          wr_en = (j > 0); wr_init = 1'b0; wr_j = AW'(j - 1); wr_k = 4'(k); wr_dir = d;
          if (j > 0) begin
            for (int m = 0; m < Q; m++) begin
              checks++;
              if (rd_bytes[m] !== st[sr_src(Q * (j - 1) + m, d)]) begin
                failures++;
                if (failures < 10)
                  $display("Q=%0d state %0d round %0d access %0d mod %0d: got %02x exp %02x",
                           Q, s, k, j - 1, m, rd_bytes[m], st[sr_src(Q * (j - 1) + m, d)]);
              end
              wr_bytes[m] = xf(rd_bytes[m], k);
            end
          end
          @(negedge clk);
        end
        rd_en = 1'b0; wr_en = 1'b0;
        @(negedge clk);   // idle cycle between rounds
        st = nx;
        rounds_run++;
      end
      // unload in natural order
      for (int j = 0; j <= W; j++) begin
        rd_en = (j < W); rd_j = AW'(j); rd_k = 4'(nr - 1); rd_dir = d;
        if (j > 0)
          for (int m = 0; m < Q; m++) begin
            checks++;
            if (rd_bytes[m] !== st[Q * (j - 1) + m]) begin
              failures++;
              $display("Q=%0d state %0d unload access %0d mod %0d: got %02x exp %02x",
                       Q, s, j - 1, m, rd_bytes[m], st[Q * (j - 1) + m]);
            end
          end
        @(negedge clk);
      end
      rd_en = 1'b0;
    end
    done = 1'b1;
  end
endmodule

// Self-checking testbench of the row address generator.
//
// For Q = 4, 2 and 1 and both directions, the testbench keeps its own map of
// which byte sits in which row of which memory, starting from the natural
// layout. In round k, access j of memory ma must address the row that holds
// the byte ShiftRows brings to position Q*j+ma; that row then receives new
// byte Q*j+ma. The generated rows are compared with this map over 12 rounds,
// and with init = 1 the row must equal j. For Q = 4 and a left shift the
// layout after rounds k = 0, 1, 2 is also compared cell by cell with the
// memory contents tabulated in FIG3 (memory ma, row ra holds byte
// FIG3[k][4*ma+ra]); after k = 3 the layout must be the initial one again.
module tb_bpu_mem_addr_gen;
  import aes_bpu_pkg::*;
  import tb_aes_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] k;
  logic       init;
  shift_dir_e dir;
  logic [3:0] j1;  logic [3:0] ra1 [1];
  logic [2:0] j2;  logic [2:0] ra2 [2];
  logic [1:0] j4;  logic [1:0] ra4 [4];

  for (genvar m = 0; m < 1; m++) begin : g1
    bpu_mem_addr_gen #(.Q(1), .MA(m)) u (.j(j1), .k, .init, .dir, .ra(ra1[m]));
  end
  for (genvar m = 0; m < 2; m++) begin : g2
    bpu_mem_addr_gen #(.Q(2), .MA(m)) u (.j(j2), .k, .init, .dir, .ra(ra2[m]));
  end
  for (genvar m = 0; m < 4; m++) begin : g4
    bpu_mem_addr_gen #(.Q(4), .MA(m)) u (.j(j4), .k, .init, .dir, .ra(ra4[m]));
  end

  function automatic int get_ra(int q, int m);
    case (q)
      1:       return int'(ra1[m]);
      2:       return int'(ra2[m]);
      default: return int'(ra4[m]);
    endcase
  endfunction

  // memory contents after rounds k = 0, 1, 2 of a left shift with Q = 4
  localparam int FIG3 [3][16] = '{
    '{ 0,  4,  8, 12,  13,  1,  5,  9,  10, 14,  2,  6,   7, 11, 15,  3},
    '{ 0,  4,  8, 12,   9, 13,  1,  5,   2,  6, 10, 14,  11, 15,  3,  7},
    '{ 0,  4,  8, 12,   5,  9, 13,  1,  10, 14,  2,  6,  15,  3,  7, 11}
  };

  task automatic set_j(int q, int jj);
    j1 = 4'(jj); j2 = 3'(jj); j4 = 2'(jj);
  endtask

  initial begin
    int where_ma [16], where_ra [16];   // location of each byte index
    int q, w, src, nra [16];
    for (int qi = 0; qi < 3; qi++) begin
      q = 1 << (2 - qi);   // 4, 2, 1
      w = 16 / q;
      for (int d = 0; d < 2; d++) begin
        dir = shift_dir_e'(d);
        // initial layout
        init = 1'b1; k = 4'($urandom);
        for (int jj = 0; jj < w; jj++) begin
          set_j(q, jj); #1;
          for (int m = 0; m < q; m++) begin
            checks++;
            if (get_ra(q, m) != jj) begin failures++; $display("init row wrong"); end
            where_ma[q * jj + m] = m;
            where_ra[q * jj + m] = jj;
          end
        end
        init = 1'b0;
        for (int kk = 0; kk < 12; kk++) begin
          k = 4'(kk);
          for (int jj = 0; jj < w; jj++) begin
            set_j(q, jj); #1;
            for (int m = 0; m < q; m++) begin
              src = int'(sr_src(q * jj + m, dir));
              checks++;
              if (where_ma[src] != m || get_ra(q, m) != where_ra[src]) begin
                failures++;
                if (failures < 10)
                  $display("Q=%0d dir=%0d k=%0d j=%0d ma=%0d: ra %0d, byte %0d is at ma %0d row %0d",
                           q, d, kk, jj, m, get_ra(q, m), src, where_ma[src], where_ra[src]);
              end
              nra[q * jj + m] = get_ra(q, m);
            end
          end
          for (int n = 0; n < 16; n++) begin
            where_ma[n] = n % q;
            where_ra[n] = nra[n];
          end
          if (q == 4 && dir == SHIFT_LEFT && kk < 4) begin
            for (int c = 0; c < 16; c++) begin
              int b;
              b = (kk < 3) ? FIG3[kk][c] : (c % 4) * 4 + c / 4;  // (a): ma + 4*ra
              checks++;
              if (where_ma[b] != c / 4 || where_ra[b] != c % 4) begin
                failures++;
                $display("after k=%0d byte %0d at ma %0d row %0d, expected ma %0d row %0d",
                         kk, b, where_ma[b], where_ra[b], c / 4, c % 4);
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

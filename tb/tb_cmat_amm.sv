// tb_cmat_amm: random test of the address mapping mechanism (B = 4).
// The testbench keeps its own occupancy bits and load counters and checks:
//   * ext_hit = request inside the 4 x 4 window at (win_row0, win_col0),
//     with the window wrapping at the matrix edge, and position occupied;
//   * the buffer address: external LSBs on a hit, else the row (column) load
//     counter during a row (column) load, else the tester's LSBs;
//   * load counters load, count up and count down modulo 4.
module tb_cmat_amm;
  localparam int unsigned B = 4;
  localparam int unsigned N = 1 << B;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ext_req = 0, ext_hit;
  logic [B-1:0] ext_row = '0, ext_col = '0, win_row0 = '0, win_col0 = '0;
  logic [1:0] pg_row = '0, pg_col = '0, rcnt_val = '0, ccnt_val = '0;
  logic row_load = 0, col_load = 0, set_occ = 0, clr_occ = 0;
  logic rcnt_ld = 0, rcnt_up = 0, ccnt_ld = 0, ccnt_up = 0, ccnt_dn = 0;
  logic [1:0] row_load_cnt, col_load_cnt, buf_row, buf_col;
  int checks = 0, failures = 0;
  bit occ [4][4];
  int rc = 0, cc = 0;
  int n_hits = 0;

  cmat_amm #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int dr, dc, tr, tc;
      bit exp_hit;
      @(negedge clk);
      ext_req = 1'($urandom);
      win_row0 = B'($urandom_range(3, 0) + 6);
      win_col0 = ($urandom_range(3, 0) == 0) ? B'(N - 2) : B'(6);
      ext_row = win_row0 + B'($urandom_range(5, 0)) - B'(1);
      ext_col = win_col0 + B'($urandom_range(5, 0)) - B'(1);
      pg_row = 2'($urandom); pg_col = 2'($urandom);
      row_load = ($urandom_range(3, 0) == 0);
      col_load = !row_load && ($urandom_range(3, 0) == 0);
      set_occ = 1'($urandom); clr_occ = !set_occ && 1'($urandom);
      rcnt_ld = ($urandom_range(7, 0) == 0); rcnt_val = 2'($urandom);
      rcnt_up = 1'($urandom);
      ccnt_ld = ($urandom_range(7, 0) == 0); ccnt_val = 2'($urandom);
      ccnt_up = 1'($urandom); ccnt_dn = 1'($urandom);
      #1;
      dr = (int'(ext_row) - int'(win_row0) + N) % N;
      dc = (int'(ext_col) - int'(win_col0) + N) % N;
      exp_hit = ext_req && dr < 4 && dc < 4 && occ[ext_row[1:0]][ext_col[1:0]];
      if (exp_hit) n_hits++;
      chk(ext_hit == exp_hit, "ext_hit");
      tr = row_load ? rc : int'(pg_row);
      tc = col_load ? cc : int'(pg_col);
      chk(int'(buf_row) == (exp_hit ? int'(ext_row[1:0]) : tr) &&
          int'(buf_col) == (exp_hit ? int'(ext_col[1:0]) : tc), "buffer address");
      chk(int'(row_load_cnt) == rc && int'(col_load_cnt) == cc, "load counters");
      @(posedge clk);
      if (set_occ) occ[tr][tc] = 1;
      if (clr_occ) occ[tr][tc] = 0;
      if (rcnt_ld) rc = int'(rcnt_val); else if (rcnt_up) rc = (rc + 1) % 4;
      if (ccnt_ld) cc = int'(ccnt_val); else if (ccnt_up) cc = (cc + 1) % 4;
      else if (ccnt_dn) cc = (cc + 3) % 4;
    end
    chk(n_hits > 100, "hits occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

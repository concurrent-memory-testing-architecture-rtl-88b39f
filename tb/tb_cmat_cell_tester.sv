// tb_cmat_cell_tester: the serial memory-cell tester on a matrix modelled
// by the testbench (B = 3, N = 8).
//   * Undisturbed pass: the ASND centres must be visited in serpentine order
//     (odd rows left to right, even rows right to left, 1..N-2), the pass must
//     take 18 + K(N-2)^2 + 6((N-2)^2-1) cycles, no compare may fail, and the
//     matrix must hold its original data afterwards.
//   * Pass with random external traffic, half aimed at the ASND under test:
//     the tester stalls on every request, requests to buffered cells are
//     served by the buffer (ext_hit, ext_buf_rdata), all others by the
//     matrix; every read must return the current data and the matrix must be
//     consistent at the end.
//   * A stuck-at-1 cell in the model must make a compare fail.
module tb_cmat_cell_tester;
  import cmat_pkg::*;
  localparam int unsigned B = 3;
  localparam int unsigned N = 1 << B;
  localparam int unsigned CELL_CYC = 18 + ASND_K * (N - 2) * (N - 2) + 6 * ((N - 2) * (N - 2) - 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stall;
  arr_op_t op;
  logic arr_rdata, check, ref_bit, busy, done;
  cell_state_e state_o;
  logic [B-1:0] ci, cj;
  logic ext_req = 0, ext_we = 0, ext_wdata = 0, ext_hit, ext_buf_rdata;
  logic [B-1:0] ext_row = '0, ext_col = '0;
  int checks = 0, failures = 0;

  logic mem [N][N];        // matrix model
  logic ref_mem [N][N];    // what the user has stored
  int stuck_r = -1, stuck_c = -1;
  int mismatches = 0, n_detour = 0;
  int visit_r[$], visit_c[$];

  assign stall = ext_req;

  cmat_cell_tester #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  function automatic logic rd(int r, int c);
    return (r == stuck_r && c == stuck_c) ? 1'b1 : mem[r][c];
  endfunction

  // matrix model: the tester drives it unless the external port takes it
  always_comb begin
    if (ext_req) arr_rdata = rd(int'(ext_row), int'(ext_col));
    else         arr_rdata = rd(int'(op.row[B-1:0]), int'(op.col[B-1:0]));
  end
  always @(posedge clk) begin
    if (!rst_n) begin
      // matrix untouched during reset
    end else if (ext_req) begin
      if (ext_we && !ext_hit) mem[ext_row][ext_col] <= ext_wdata;
    end else if (op.en && op.we) begin
      mem[op.row[B-1:0]][op.col[B-1:0]] <= op.wdata;
    end
    if (rst_n && !ext_req && check && (arr_rdata != ref_bit)) mismatches++;
    if (rst_n && !ext_req && op.en) begin
      checks++;
      if (!(op.row_en && op.col_en && !op.rn_en && !op.cn_en)) begin
        failures++; $display("FAIL op lines");
      end
    end
    if (rst_n && state_o == CT_TEST && $past(state_o) != CT_TEST) begin
      visit_r.push_back(int'(ci)); visit_c.push_back(int'(cj));
    end
  end

  task automatic run_pass(input bit traffic, output int cycles);
    cycles = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    while (busy) begin
      if (traffic && $urandom_range(1, 0) == 1) begin
        logic [B-1:0] r, c;
        bit exp_hit;
        logic expv;
        if ($urandom_range(1, 0) == 1) begin
          r = ci + B'($urandom_range(3, 0)) - B'(1);
          c = cj + B'($urandom_range(4, 0)) - B'(2);
        end else begin
          r = B'($urandom); c = B'($urandom);
        end
        ext_req = 1; ext_row = r; ext_col = c; ext_we = 1'($urandom); ext_wdata = 1'($urandom);
        #1;
        if (ext_hit) n_detour++;
        expv = ext_hit ? ext_buf_rdata : arr_rdata;
        if (!ext_we) chk(expv == ref_mem[r][c], $sformatf("ext read (%0d,%0d) hit=%0d", r, c, ext_hit));
        else ref_mem[r][c] = ext_wdata;
        @(negedge clk);
        ext_req = 0;
      end else begin
        cycles++;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        mem[r][c] = 1'($urandom); ref_mem[r][c] = mem[r][c];
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // undisturbed pass
    run_pass(0, cyc);
    chk(cyc == CELL_CYC, $sformatf("pass length %0d exp %0d", cyc, CELL_CYC));
    chk(mismatches == 0, "no compare failure on a good matrix");
    chk(visit_r.size() == (N - 2) * (N - 2), "number of ASNDs tested");
    for (int i = 1; i <= N - 2; i++)
      for (int k = 0; k < N - 2; k++) begin
        int j;
        j = (i % 2 == 1) ? 1 + k : N - 2 - k;
        chk(visit_r.pop_front() == i && visit_c.pop_front() == j,
            $sformatf("serpentine order at (%0d,%0d)", i, j));
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        chk(mem[r][c] == ref_mem[r][c], $sformatf("data kept (%0d,%0d)", r, c));

    // pass with traffic
    run_pass(1, cyc);
    chk(n_detour > 50, "requests detoured to the buffer");
    chk(mismatches == 0, "no compare failure with traffic");
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        chk(mem[r][c] == ref_mem[r][c], $sformatf("data consistent (%0d,%0d)", r, c));

    // stuck-at-1 cell
    stuck_r = 4; stuck_c = 5;
    run_pass(0, cyc);
    chk(mismatches > 0, "stuck-at-1 cell found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmat_top: end-to-end test of the CMAT memory matrix.
//
// A small matrix (B = 3, N = 8, sense-amplifier constant k = 3) is filled
// with random data through the external port, then the built-in tester runs
// free while random reads and writes arrive on about half of the cycles, a
// good share of them aimed at the 3 x 3 neighborhood under test so that
// they are detoured to the TND buffer. Every read is compared with a
// reference copy of the memory kept by the testbench. After several passes
// the tester is stopped and the whole matrix is read back. Further checks:
//   * the length of an undisturbed pass (peripheral part 12N + N(2k+4)
//     cycles, cell part 18 + K(N-2)^2 + 6((N-2)^2-1) cycles, each plus one
//     start cycle);
//   * no fault is reported on a good matrix;
//   * a stuck-at-0 cell in the row neighborhood is found by the peripheral
//     test, a stuck-at-1 regular cell by the cell test;
//   * a stuck address line at the row decoder input, and one at the column
//     decoder input, are found by the decoder test.
// Each mechanism (detoured read, detoured write, tester stall, left and right
// column moves, row moves, both tester phases, complete passes, fault
// detection in both phases) is counted and must occur.
module tb_cmat_top;
  import cmat_pkg::*;

  localparam int unsigned B    = 3;
  localparam int unsigned N    = 1 << B;
  localparam int unsigned K_SA = 3;
  localparam int unsigned PERIPH_CYC = 12 * N + N * (2 * K_SA + 4);
  localparam int unsigned CELL_CYC   = 18 + ASND_K * (N - 2) * (N - 2)
                                       + 6 * ((N - 2) * (N - 2) - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic test_en = 1'b0;
  logic ext_req = 1'b0, ext_we = 1'b0, ext_wdata = 1'b0;
  logic [B-1:0] ext_row = '0, ext_col = '0;
  logic ext_rvalid, ext_rdata, ext_detour;
  bit_phase_e  bit_phase, fault_phase;
  cell_state_e cell_state;
  logic fault, fault_detected, pass_done;
  logic [15:0] fault_count, pass_count;
  logic [B-1:0] tnd_row, tnd_col;

  cmat_top #(.B(B), .K_SA(K_SA)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic model [N][N];

  // mechanism counters
  int n_detour_rd = 0, n_detour_wr = 0, n_stall = 0, n_reads = 0;
  int n_move_r = 0, n_move_l = 0, n_move_row = 0, n_periph = 0, n_cells = 0;
  int n_pass = 0, n_dec_faults = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // One external access in the current cycle; for a read the result is
  // compared with the model one cycle later.
  task automatic ext_access(input bit we, input logic [B-1:0] r,
                            input logic [B-1:0] c, input bit d);
    logic expv;
    bit   hit;
    ext_req = 1'b1; ext_we = we; ext_row = r; ext_col = c; ext_wdata = d;
    expv = model[r][c];
    #1;
    hit = ext_detour;
    if (bit_phase != BIT_IDLE) n_stall++;
    if (hit && we)  n_detour_wr++;
    if (hit && !we) n_detour_rd++;
    @(posedge clk);
    if (we) model[r][c] = d;
    #1;
    ext_req = 1'b0; ext_we = 1'b0;
    if (!we) begin
      n_reads++;
      check(ext_rvalid && (ext_rdata == expv),
            $sformatf("read (%0d,%0d) got %0d exp %0d detour=%0d",
                      r, c, ext_rdata, expv, hit));
    end
  endtask

  task automatic idle_cycle();
    @(posedge clk);
    #1;
  endtask

  // Mechanism monitor.
  cell_state_e prev_state = CT_IDLE;
  bit_phase_e  prev_phase = BIT_IDLE;
  logic [B-1:0] prev_col = '0;
  always @(posedge clk) begin
    if (cell_state == CT_SAVEC && prev_state == CT_LOADC) begin
      if (tnd_row[0]) n_move_r++; else n_move_l++;
    end
    if (cell_state == CT_LOADR && prev_state != CT_LOADR) n_move_row++;
    if (bit_phase == BIT_PERIPH && prev_phase != BIT_PERIPH) n_periph++;
    if (bit_phase == BIT_CELLS && prev_phase != BIT_CELLS) n_cells++;
    if (pass_done) n_pass++;
    prev_state <= cell_state;
    prev_phase <= bit_phase;
    prev_col   <= tnd_col;
  end

  // Watchdog.
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc_p, cyc_c;
  int start_pass;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    idle_cycle();

    // 1. Fill the matrix with random data, tester off.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        ext_access(1'b1, B'(r), B'(c), 1'($urandom));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        ext_access(1'b0, B'(r), B'(c), 1'b0);

    // 2. One undisturbed pass: measure both phases.
    test_en = 1'b1;
    cyc_p = 0; cyc_c = 0;
    while (bit_phase == BIT_IDLE) idle_cycle();
    while (bit_phase == BIT_PERIPH) begin cyc_p++; idle_cycle(); end
    while (bit_phase == BIT_CELLS)  begin cyc_c++; idle_cycle(); end
    check(cyc_p == PERIPH_CYC + 1,
          $sformatf("peripheral test length %0d exp %0d", cyc_p, PERIPH_CYC + 1));
    check(cyc_c == CELL_CYC + 1,
          $sformatf("cell test length %0d exp %0d", cyc_c, CELL_CYC + 1));
    check(!fault_detected, "no fault on a good matrix (undisturbed pass)");

    // 3. Two more passes with random traffic.
    start_pass = int'(pass_count);
    while (int'(pass_count) < start_pass + 2) begin
      if ($urandom_range(1, 0) == 1) begin
        logic [B-1:0] r, c;
        if ($urandom_range(1, 0) == 1 && bit_phase == BIT_CELLS) begin
          r = tnd_row + B'($urandom_range(2, 0)) - B'(1);
          c = tnd_col + B'($urandom_range(2, 0)) - B'(1);
        end else begin
          r = B'($urandom); c = B'($urandom);
        end
        ext_access(1'($urandom), r, c, 1'($urandom));
      end else begin
        idle_cycle();
      end
    end
    check(!fault_detected, "no fault on a good matrix (with traffic)");

    // 4. Stop the tester and read everything back.
    test_en = 1'b0;
    while (bit_phase != BIT_IDLE) idle_cycle();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        ext_access(1'b0, B'(r), B'(c), 1'b0);

    // 5. Stuck-at-0 RN cell: found by the peripheral test.
    force dut.u_matrix.rn_cells[2] = 1'b0;
    test_en = 1'b1;
    while (bit_phase != BIT_CELLS && !fault_detected) idle_cycle();
    check(fault_detected && fault_phase == BIT_PERIPH,
          "stuck-at-0 RN cell found by the peripheral test");
    release dut.u_matrix.rn_cells[2];
    test_en = 1'b0;
    while (bit_phase != BIT_IDLE) idle_cycle();

    // 6. Stuck-at-1 regular cell: found by the cell test.
    rst_n = 1'b0; idle_cycle(); rst_n = 1'b1; idle_cycle();
    check(!fault_detected, "fault flag cleared by reset");
    force dut.u_matrix.cells[4] = dut.u_matrix.cells[4] | 8'h20;
    test_en = 1'b1;
    while (bit_phase != BIT_CELLS) idle_cycle();
    while (bit_phase == BIT_CELLS && !fault_detected) idle_cycle();
    check(fault_detected && fault_phase == BIT_CELLS,
          "stuck-at-1 cell found by the cell test");
    release dut.u_matrix.cells[4];
    test_en = 1'b0;
    while (bit_phase != BIT_IDLE) idle_cycle();

    // 7. Row decoder fault (address bit 1 stuck at 0: rows 2, 3 alias 0, 1):
    //    found by the decoder test through CN/RN.
    rst_n = 1'b0; idle_cycle(); rst_n = 1'b1; idle_cycle();
    force dut.row_addr[1] = 1'b0;
    test_en = 1'b1;
    while (bit_phase != BIT_CELLS && !fault_detected) idle_cycle();
    check(fault_detected && fault_phase == BIT_PERIPH, "row decoder fault found");
    if (fault_detected && fault_phase == BIT_PERIPH) n_dec_faults++;
    release dut.row_addr[1];
    test_en = 1'b0;
    while (bit_phase != BIT_IDLE) idle_cycle();

    // 8. Column decoder fault (address bit 0 stuck at 1).
    rst_n = 1'b0; idle_cycle(); rst_n = 1'b1; idle_cycle();
    force dut.col_addr[0] = 1'b1;
    test_en = 1'b1;
    while (bit_phase != BIT_CELLS && !fault_detected) idle_cycle();
    check(fault_detected && fault_phase == BIT_PERIPH, "column decoder fault found");
    if (fault_detected && fault_phase == BIT_PERIPH) n_dec_faults++;
    release dut.col_addr[0];

    $display("mechanisms: detour_rd=%0d detour_wr=%0d stall=%0d reads=%0d move_r=%0d move_l=%0d move_row=%0d periph=%0d cells=%0d pass=%0d",
             n_detour_rd, n_detour_wr, n_stall, n_reads, n_move_r, n_move_l,
             n_move_row, n_periph, n_cells, n_pass);
    check(n_detour_rd > 0, "detoured read happened");
    check(n_detour_wr > 0, "detoured write happened");
    check(n_stall > 0, "tester stall happened");
    check(n_move_r > 0, "right column move happened");
    check(n_move_l > 0, "left column move happened");
    check(n_move_row > 0, "row move happened");
    check(n_periph > 0, "peripheral phase happened");
    check(n_cells > 0, "cell phase happened");
    check(n_pass >= 3, "complete passes happened");
    check(n_dec_faults == 2, "both decoder faults detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmat_bit: the built-in tester driving a real matrix with its decoders
// (B = 3, N = 8, k = 2). Checked:
//   * nothing happens until test_en; then peripheral test and cell test
//     alternate, each phase lasting its pattern length plus one start cycle
//     (12N + N(2k+4) and 18 + K(N-2)^2 + 6((N-2)^2-1) cycles when undisturbed);
//   * on every cycle with an external request the tester leaves the matrix
//     idle (normal access has priority), and a stalled pass still completes;
//   * the matrix holds its data after the passes, no fault is reported;
//   * clearing test_en returns the tester to idle after the current pass;
//   * a stuck-at-1 CN cell is reported as a fault of the peripheral phase.
module tb_cmat_bit;
  import cmat_pkg::*;
  localparam int unsigned B = 3;
  localparam int unsigned N = 1 << B;
  localparam int unsigned K_SA = 2;
  localparam int unsigned PERIPH_CYC = 12 * N + N * (2 * K_SA + 4);
  localparam int unsigned CELL_CYC   = 18 + ASND_K * (N - 2) * (N - 2) + 6 * ((N - 2) * (N - 2) - 1);

  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0;
  arr_op_t op;
  logic arr_rdata, cn_rdata;
  logic ext_req = 0, ext_we = 0, ext_wdata = 0, ext_hit, ext_buf_rdata;
  logic [B-1:0] ext_row = '0, ext_col = '0;
  bit_phase_e phase, fault_phase;
  cell_state_e cell_state;
  logic fault, fault_detected, pass_done;
  logic [15:0] fault_count, pass_count;
  logic [B-1:0] tnd_row, tnd_col;
  int checks = 0, failures = 0;

  cmat_bit #(.B(B), .K_SA(K_SA)) dut (.*);
  always #5 clk = ~clk;

  // matrix driven by the tester only (external requests here only stall)
  logic [N-1:0] wl, cs;
  cmat_decoder #(.B(B)) u_rd (.en(op.en && op.row_en && rst_n), .addr(op.row[B-1:0]), .sel(wl));
  cmat_decoder #(.B(B)) u_cd (.en(op.en && op.col_en && rst_n), .addr(op.col[B-1:0]), .sel(cs));
  cmat_matrix  #(.B(B)) u_m (.clk, .wl, .cs,
                             .rn_en(op.en && op.rn_en && rst_n), .cn_en(op.en && op.cn_en && rst_n),
                             .we(op.en && op.we && rst_n), .wdata(op.wdata),
                             .rdata(arr_rdata), .cn_rdata);

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  always @(posedge clk) if (rst_n && ext_req) begin
    checks++;
    if (op != ARR_IDLE) begin failures++; $display("FAIL op during external request"); end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] snap [N];

  initial begin
    int cp, cc;
    for (int r = 0; r < N; r++) begin
      u_m.cells[r] = N'($urandom);
      snap[r] = u_m.cells[r];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) begin
      @(negedge clk);
      chk(phase == BIT_IDLE && !op.en, "idle without test_en");
    end
    test_en = 1'b1;
    // one undisturbed pass
    while (phase == BIT_IDLE) @(negedge clk);
    cp = 0; cc = 0;
    while (phase == BIT_PERIPH) begin cp++; @(negedge clk); end
    while (phase == BIT_CELLS)  begin cc++; @(negedge clk); end
    chk(cp == PERIPH_CYC + 1, $sformatf("peripheral phase %0d exp %0d", cp, PERIPH_CYC + 1));
    chk(cc == CELL_CYC + 1, $sformatf("cell phase %0d exp %0d", cc, CELL_CYC + 1));
    chk(phase == BIT_PERIPH && pass_count == 16'd1, "next pass started, one pass counted");
    // a pass with random stalls
    while (pass_count < 16'd2) begin
      ext_req = ($urandom_range(2, 0) == 0);
      ext_row = 3'd0; ext_col = 3'd0;    // reads only; a hit only returns buffer data
      @(negedge clk);
    end
    ext_req = 1'b0;
    test_en = 1'b0;
    while (phase != BIT_IDLE) @(negedge clk);
    chk(pass_count == 16'd3, "test_en low stops after the current pass");
    chk(!fault_detected, "no fault on a good matrix");
    for (int r = 0; r < N; r++) chk(u_m.cells[r] == snap[r], $sformatf("row %0d kept", r));
    // stuck-at-1 CN cell
    force u_m.cn_cells[5] = 1'b1;
    test_en = 1'b1;
    while (phase != BIT_CELLS) @(negedge clk);
    chk(fault_detected && fault_phase == BIT_PERIPH && fault_count > 0, "CN fault found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

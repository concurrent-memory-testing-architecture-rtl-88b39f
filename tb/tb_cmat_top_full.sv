// tb_cmat_top_full: one complete test pass of the CMAT matrix at its full
// size (N = 256, 64 Kbit, k = 10), with normal traffic running alongside.
// The matrix is filled with random data through the external port. Then the
// tester is enabled for exactly one pass, during which a random read or write
// arrives on about one cycle in sixteen, half of them aimed at the ASND under
// test. Every read is compared with a reference copy. Checked afterwards:
//   * the pass took 2 + 12N + N(2k+4) + 18 + K(N-2)^2 + 6((N-2)^2-1) cycles
//     plus one cycle per request made during it (each request stalls the
//     tester for exactly one cycle);
//   * no fault was reported, some requests were detoured to the buffer;
//   * the whole matrix reads back as the reference copy.
module tb_cmat_top_full;
  import cmat_pkg::*;

  localparam int unsigned B    = 8;
  localparam int unsigned N    = 256;
  localparam int unsigned K_SA = 10;
  localparam longint PERIPH_CYC = 12 * N + N * (2 * K_SA + 4);
  localparam longint CELL_CYC   = 18 + longint'(ASND_K) * (N - 2) * (N - 2)
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

  cmat_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic model [N][N];
  longint n_detour = 0, n_req = 0, n_cyc = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic ext_access(input bit we, input logic [B-1:0] r,
                            input logic [B-1:0] c, input bit d);
    logic expv;
    ext_req = 1'b1; ext_we = we; ext_row = r; ext_col = c; ext_wdata = d;
    expv = model[r][c];
    #1;
    if (ext_detour) n_detour++;
    @(posedge clk);
    if (we) model[r][c] = d;
    #1;
    ext_req = 1'b0; ext_we = 1'b0;
    if (!we)
      check(ext_rvalid && (ext_rdata == expv),
            $sformatf("read (%0d,%0d) got %0d exp %0d", r, c, ext_rdata, expv));
  endtask

  initial begin
    repeat (130000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        ext_access(1'b1, B'(r), B'(c), 1'($urandom));

    test_en = 1'b1;
    @(posedge clk); #1;
    test_en = 1'b0;        // exactly one pass
    while (bit_phase != BIT_IDLE) begin
      n_cyc++;
      if ($urandom_range(15, 0) == 0) begin
        logic [B-1:0] r, c;
        if ($urandom_range(1, 0) == 1 && bit_phase == BIT_CELLS) begin
          r = tnd_row + B'($urandom_range(2, 0)) - B'(1);
          c = tnd_col + B'($urandom_range(2, 0)) - B'(1);
        end else begin
          r = B'($urandom); c = B'($urandom);
        end
        n_req++;
        ext_access(1'($urandom), r, c, 1'($urandom));
      end else begin
        @(posedge clk); #1;
      end
    end
    // n_cyc counted the cycle test_en was seen as well
    check(n_cyc == 2 + PERIPH_CYC + CELL_CYC + n_req,
          $sformatf("pass length %0d exp %0d", n_cyc, 2 + PERIPH_CYC + CELL_CYC + n_req));
    check(pass_count == 16'd1, "one pass completed");
    check(!fault_detected, "no fault on a good matrix");
    check(n_detour > 0, "requests detoured to the buffer");
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        ext_access(1'b0, B'(r), B'(c), 1'b0);
    $display("pass cycles=%0d requests=%0d detoured=%0d", n_cyc, n_req, n_detour);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

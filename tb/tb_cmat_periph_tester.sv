// tb_cmat_periph_tester: the peripheral tester (B = 3, k = 3) must issue
//   * the decoder march up(w0); up(r,w1); down(r,w0); up(r), each operation
//     first on the row decoder with the CN line (column decoder off), then on
//     the column decoder with the RN line (row decoder off);
//   * then, per column i, the sense-amplifier pattern w0^k w1 r w1^k w0 r
//     with row decoder off and column i, RN and CN lines on;
// advancing only on cycles without stall, in 12N + N(2k+4) active cycles.
// The testbench models the RN, CN and corner cells, answers cn_rdata, and
// checks that every compare request (check) carries the right reference:
// the CN cell latched in the preceding half of a decoder read, or the CN
// sense amplifier in the sense-amplifier test.
module tb_cmat_periph_tester;
  import cmat_pkg::*;
  localparam int unsigned B = 3;
  localparam int unsigned N = 1 << B;
  localparam int unsigned K_SA = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stall = 1'b0;
  logic cn_rdata, busy, check, ref_bit, done;
  arr_op_t op;
  int checks = 0, failures = 0;

  typedef struct { bit we; bit d; bit rowdec; bit sa; int a; } eop_t;
  eop_t q[$];
  bit rn [N];
  bit cn [N];
  bit corner;

  cmat_periph_tester #(.B(B), .K_SA(K_SA)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  task automatic both(input bit we, input bit d, input int a);
    q.push_back('{we, d, 1, 0, a});
    q.push_back('{we, d, 0, 0, a});
  endtask

  // CN sense amplifier model
  always_comb begin
    cn_rdata = 1'b0;
    if (op.cn_en && op.row_en) cn_rdata = cn[op.row[B-1:0]];
    else if (op.cn_en && op.rn_en) cn_rdata = corner;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int active;
    for (int i = 0; i < N; i++) both(1, 0, i);
    for (int i = 0; i < N; i++) begin both(0, 0, i); both(1, 1, i); end
    for (int i = N - 1; i >= 0; i--) begin both(0, 0, i); both(1, 0, i); end
    for (int i = 0; i < N; i++) both(0, 0, i);
    for (int i = 0; i < N; i++) begin
      for (int t = 0; t < K_SA; t++) q.push_back('{1, 0, 0, 1, i});
      q.push_back('{1, 1, 0, 1, i});
      q.push_back('{0, 0, 0, 1, i});
      for (int t = 0; t < K_SA; t++) q.push_back('{1, 1, 0, 1, i});
      q.push_back('{1, 0, 0, 1, i});
      q.push_back('{0, 0, 0, 1, i});
    end
    chk(q.size() == 12 * N + N * (2 * K_SA + 4), "expected length");

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    active = 0;
    while (busy) begin
      stall = ($urandom_range(3, 0) == 0);
      #1;
      if (!stall) begin
        eop_t e;
        bit exp_ref;
        e = q.pop_front();
        active++;
        if (e.sa)
          chk(op.en && !op.row_en && op.col_en && op.rn_en && op.cn_en &&
              int'(op.col) == e.a && op.we == e.we && (!e.we || op.wdata == e.d),
              $sformatf("SA op %0d", active));
        else if (e.rowdec)
          chk(op.en && op.row_en && !op.col_en && !op.rn_en && op.cn_en &&
              int'(op.row) == e.a && op.we == e.we && (!e.we || op.wdata == e.d),
              $sformatf("row-decoder op %0d", active));
        else
          chk(op.en && !op.row_en && op.col_en && op.rn_en && !op.cn_en &&
              int'(op.col) == e.a && op.we == e.we && (!e.we || op.wdata == e.d),
              $sformatf("column-decoder op %0d", active));
        chk(check == (!e.rowdec && !e.we), "compare request");
        if (check) begin
          exp_ref = e.sa ? corner : cn[e.a];
          chk(ref_bit == exp_ref, "reference bit");
        end
        chk(done == (q.size() == 0), "done flag");
        if (op.we) begin
          if (op.row_en && op.cn_en) cn[op.row[B-1:0]] = op.wdata;
          if (op.rn_en)              rn[op.col[B-1:0]] = op.wdata;
          if (op.rn_en && op.cn_en)  corner = op.wdata;
        end
      end else begin
        chk(done == 1'b0, "no done while stalled");
      end
      @(negedge clk);
    end
    chk(active == 12 * N + N * (2 * K_SA + 4),
        $sformatf("active cycles %0d exp %0d", active, 12 * N + N * (2 * K_SA + 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

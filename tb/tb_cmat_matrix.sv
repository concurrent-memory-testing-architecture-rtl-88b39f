// tb_cmat_matrix: test of the N x N matrix with its row and column
// neighborhoods (B = 3). The testbench drives one-hot word lines and column
// selects as a decoder would, keeps a reference copy of the regular cells,
// RN, CN and the corner cell, and checks:
//   * random single-cell reads and writes of the regular cells;
//   * RN cells selected by rn_en + column select, read on rdata;
//   * CN cells selected by word line + cn_en, read on cn_rdata, while
//     regular cells of that row stay untouched (no column selected);
//   * the corner cell selected by rn_en + cn_en;
//   * two word lines on at once: both rows written, read returns the OR.
module tb_cmat_matrix;
  localparam int unsigned B = 3;
  localparam int unsigned N = 1 << B;
  logic clk = 1'b0;
  logic [N-1:0] wl = '0, cs = '0;
  logic rn_en = 1'b0, cn_en = 1'b0, we = 1'b0, wdata = 1'b0;
  logic rdata, cn_rdata;
  logic m [N][N];
  logic rn [N];
  logic cn [N];
  logic corner;
  int checks = 0, failures = 0;

  cmat_matrix #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic cyc(input logic [N-1:0] w, input logic [N-1:0] c,
                     input bit rne, input bit cne, input bit wr, input bit d);
    @(negedge clk);
    wl = w; cs = c; rn_en = rne; cn_en = cne; we = wr; wdata = d;
    @(posedge clk);
    #1 we = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise everything through the normal paths
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        m[r][c] = 1'($urandom);
        cyc(N'(1) << r, N'(1) << c, 0, 0, 1, m[r][c]);
      end
    for (int i = 0; i < N; i++) begin
      rn[i] = 1'($urandom); cyc('0, N'(1) << i, 1, 0, 1, rn[i]);
      cn[i] = 1'($urandom); cyc(N'(1) << i, '0, 0, 1, 1, cn[i]);
    end
    corner = 1'b1; cyc('0, '0, 1, 1, 1, 1'b1);
    // regular cells unchanged, neighborhoods as written
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk); wl = N'(1) << r; cs = N'(1) << c; rn_en = 0; cn_en = 0; #1;
        chk(rdata == m[r][c], $sformatf("cell (%0d,%0d)", r, c));
      end
    for (int i = 0; i < N; i++) begin
      @(negedge clk); wl = '0; cs = N'(1) << i; rn_en = 1; cn_en = 0; #1;
      chk(rdata == rn[i], $sformatf("RN %0d", i));
      @(negedge clk); wl = N'(1) << i; cs = '0; rn_en = 0; cn_en = 1; #1;
      chk(cn_rdata == cn[i], $sformatf("CN %0d", i));
      chk(rdata == 1'b0, "no column selected reads 0");
    end
    @(negedge clk); wl = '0; cs = N'(1) << 3; rn_en = 1; cn_en = 1; #1;
    chk(cn_rdata == corner && rdata == rn[3], "corner and RN together");
    corner = 1'b0; rn[3] = 1'b0; cyc('0, N'(1) << 3, 1, 1, 1, 1'b0);
    @(negedge clk); #1;
    chk(cn_rdata == 1'b0 && rdata == 1'b0, "corner and RN written together");
    // random regular traffic
    for (int n = 0; n < 300; n++) begin
      int r, c;
      r = $urandom_range(N - 1, 0); c = $urandom_range(N - 1, 0);
      if ($urandom_range(1, 0) == 1) begin
        m[r][c] = 1'($urandom); cyc(N'(1) << r, N'(1) << c, 0, 0, 1, m[r][c]);
      end else begin
        @(negedge clk); wl = N'(1) << r; cs = N'(1) << c; rn_en = 0; cn_en = 0; #1;
        chk(rdata == m[r][c], $sformatf("random read (%0d,%0d)", r, c));
      end
    end
    // two word lines: write both, read the OR
    m[1][2] = 1'b0; m[5][2] = 1'b0;
    cyc((N'(1) << 1) | (N'(1) << 5), N'(1) << 2, 0, 0, 1, 1'b0);
    m[5][2] = 1'b1; cyc(N'(1) << 5, N'(1) << 2, 0, 0, 1, 1'b1);
    @(negedge clk); wl = (N'(1) << 1) | (N'(1) << 5); cs = N'(1) << 2; #1;
    chk(rdata == 1'b1, "double word line reads OR");
    @(negedge clk); wl = N'(1) << 1; #1;
    chk(rdata == 1'b0, "double word line wrote row 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

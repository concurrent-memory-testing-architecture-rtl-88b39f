// tb_cmat_array4x4: random writes and reads of the 4 x 4 buffer/mirror array
// compared with a reference copy; reset must clear every cell.
module tb_cmat_array4x4;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, wdata = 1'b0, rdata;
  logic [1:0] row = '0, col = '0;
  logic model [4][4];
  int checks = 0, failures = 0;

  cmat_array4x4 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        row = 2'(r); col = 2'(c); model[r][c] = 1'b0;
        #1; checks++;
        if (rdata !== 1'b0) begin failures++; $display("FAIL reset (%0d,%0d)", r, c); end
      end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      row = 2'($urandom); col = 2'($urandom); we = 1'($urandom); wdata = 1'($urandom);
      #1;
      if (!we) begin
        checks++;
        if (rdata != model[row][col]) begin
          failures++; $display("FAIL read (%0d,%0d)=%0d exp %0d", row, col, rdata, model[row][col]);
        end
      end
      @(posedge clk);
      if (we) model[row][col] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

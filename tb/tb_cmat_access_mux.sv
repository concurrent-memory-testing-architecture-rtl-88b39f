// tb_cmat_access_mux: random test of the multiplexers between external
// port and tester. A non-detoured request drives the decoders with its
// address, a detoured one leaves the matrix idle, no request passes the
// tester's operation. The registered read data come one cycle later from
// the matrix or, when detoured, from the buffer.
module tb_cmat_access_mux;
  import cmat_pkg::*;
  localparam int unsigned B = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ext_req = 0, ext_we = 0, ext_wdata = 0, ext_hit = 0, buf_rdata = 0, arr_rdata = 0;
  logic [B-1:0] ext_row = '0, ext_col = '0;
  logic ext_rvalid, ext_rdata;
  arr_op_t bit_op = ARR_IDLE;
  logic [B-1:0] row_addr, col_addr;
  logic row_en, col_en, rn_en, cn_en, we, wdata;
  int checks = 0, failures = 0;
  bit exp_valid = 0, exp_data = 0;

  cmat_access_mux #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      chk(ext_rvalid == exp_valid && (!exp_valid || ext_rdata == exp_data), "read data");
      ext_req = 1'($urandom); ext_we = 1'($urandom); ext_wdata = 1'($urandom);
      ext_hit = ext_req & 1'($urandom);
      ext_row = B'($urandom); ext_col = B'($urandom);
      buf_rdata = 1'($urandom); arr_rdata = 1'($urandom);
      bit_op = arr_op_t'({$urandom, $urandom});
      #1;
      if (ext_req && !ext_hit)
        chk(row_addr == ext_row && col_addr == ext_col && row_en && col_en && !rn_en
            && !cn_en && we == ext_we && wdata == ext_wdata, "external to matrix");
      else if (ext_req)
        chk(!row_en && !col_en && !rn_en && !cn_en && !we, "detoured: matrix idle");
      else
        chk(row_addr == bit_op.row[B-1:0] && col_addr == bit_op.col[B-1:0] &&
            row_en == (bit_op.en && bit_op.row_en) && col_en == (bit_op.en && bit_op.col_en) &&
            rn_en == (bit_op.en && bit_op.rn_en) && cn_en == (bit_op.en && bit_op.cn_en) &&
            we == (bit_op.en && bit_op.we) && wdata == bit_op.wdata, "tester to matrix");
      exp_valid = ext_req && !ext_we;
      if (exp_valid) exp_data = ext_hit ? buf_rdata : arr_rdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

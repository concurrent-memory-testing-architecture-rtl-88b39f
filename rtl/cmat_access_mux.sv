// cmat_access_mux: address multiplexers, read/write control and data I/O
// buffer between the external port, the built-in tester and one matrix.
//
// In every cycle the matrix's decoders and read/write control are driven
// either by the external request or by the tester:
//   * ext_req and not ext_hit: the external row/column address reaches the
//     row and column decoders, both decoders enabled, neighborhood lines off;
//   * ext_req and ext_hit: the request is served by the TND buffer, so the
//     matrix is left idle this cycle;
//   * no request: the tester's operation (bit_op) drives the matrix.
// The data I/O buffer registers the read data of an external read at the
// clock edge that ends the request cycle: ext_rvalid/ext_rdata are valid in
// the following cycle, from the TND buffer for a detoured request and from
// the matrix otherwise. Every request is served in the cycle it is made.
// The multiplexers between the external and the pattern-generator address
// follow the modelled design; the one-cycle request protocol is this
// design's choice.
module cmat_access_mux
  import cmat_pkg::*;
#(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // external port
  input  logic         ext_req,
  input  logic         ext_we,
  input  logic [B-1:0] ext_row,
  input  logic [B-1:0] ext_col,
  input  logic         ext_wdata,
  output logic         ext_rvalid,
  output logic         ext_rdata,
  // detour
  input  logic         ext_hit,
  input  logic         buf_rdata,
  // tester
  input  arr_op_t      bit_op,
  // to the decoders and the matrix
  output logic [B-1:0] row_addr,
  output logic [B-1:0] col_addr,
  output logic         row_en,
  output logic         col_en,
  output logic         rn_en,
  output logic         cn_en,
  output logic         we,
  output logic         wdata,
  input  logic         arr_rdata
);
  always_comb begin
    if (ext_req) begin
      row_addr = ext_row;
      col_addr = ext_col;
      row_en   = !ext_hit;
      col_en   = !ext_hit;
      rn_en    = 1'b0;
      cn_en    = 1'b0;
      we       = ext_we && !ext_hit;
      wdata    = ext_wdata;
    end else begin
      row_addr = bit_op.row[B-1:0];
      col_addr = bit_op.col[B-1:0];
      row_en   = bit_op.en && bit_op.row_en;
      col_en   = bit_op.en && bit_op.col_en;
      rn_en    = bit_op.en && bit_op.rn_en;
      cn_en    = bit_op.en && bit_op.cn_en;
      we       = bit_op.en && bit_op.we;
      wdata    = bit_op.wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_rvalid <= 1'b0;
      ext_rdata  <= 1'b0;
    end else begin
      ext_rvalid <= ext_req && !ext_we;
      if (ext_req && !ext_we) ext_rdata <= ext_hit ? buf_rdata : arr_rdata;
    end
  end
endmodule

// cmat_top: one memory matrix with concurrent memory access and on-chip
// testing (CMAT).
//
// An N x N bit matrix (N = 2**B, default 256, a 64 Kbit matrix) is tested
// continuously by its built-in tester while it serves normal reads and
// writes. The tester tests the peripheral circuits through a dedicated row
// and column neighborhood, and tests the cells one 3 x 3 neighborhood (ASND)
// at a time after saving that neighborhood's data in a small buffer. A normal
// request always wins the cycle; one that addresses a cell whose data sit in
// the buffer is detoured to the buffer, so test and use never disturb each
// other's data.
// External port: ext_req with ext_we, ext_row, ext_col, ext_wdata is served
// in the cycle it is made; for a read, ext_rvalid/ext_rdata follow one cycle
// later. ext_detour shows a request that was served by the buffer.
// Tester status: test_en lets the tester start a pass (it always finishes
// a pass it has begun); bit_phase, fault, fault_detected, fault_count,
// fault_phase, pass_done, pass_count and tnd_row/tnd_col (centre of the
// ASND under test) report its progress and results.
// Structure (row decoder, column decoder, multiplexers between external and
// tester addresses, RN/CN, buffer, mirror, AMM, comparator) follows the
// modelled design; port protocol and status outputs are this design's.
module cmat_top
  import cmat_pkg::*;
#(
  parameter int unsigned B    = 8,
  parameter int unsigned N    = 1 << B,
  parameter int unsigned K_SA = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_en,
  input  logic         ext_req,
  input  logic         ext_we,
  input  logic [B-1:0] ext_row,
  input  logic [B-1:0] ext_col,
  input  logic         ext_wdata,
  output logic         ext_rvalid,
  output logic         ext_rdata,
  output logic         ext_detour,
  output bit_phase_e   bit_phase,
  output cell_state_e  cell_state,
  output logic         fault,
  output logic         fault_detected,
  output logic [15:0]  fault_count,
  output bit_phase_e   fault_phase,
  output logic         pass_done,
  output logic [15:0]  pass_count,
  output logic [B-1:0] tnd_row,
  output logic [B-1:0] tnd_col
);
  arr_op_t      bit_op;
  logic         ext_hit, buf_rdata;
  logic [B-1:0] row_addr, col_addr;
  logic         row_en, col_en, rn_en, cn_en, we, wdata;
  logic [N-1:0] wl, cs;
  logic         arr_rdata, cn_rdata;

  assign ext_detour = ext_hit;

  cmat_bit #(.B(B), .N(N), .K_SA(K_SA)) u_bit (
    .clk, .rst_n, .test_en,
    .op (bit_op),
    .arr_rdata, .cn_rdata,
    .ext_req, .ext_we, .ext_row, .ext_col, .ext_wdata,
    .ext_hit,
    .ext_buf_rdata (buf_rdata),
    .phase (bit_phase),
    .cell_state,
    .fault, .fault_detected, .fault_count, .fault_phase,
    .pass_done, .pass_count, .tnd_row, .tnd_col
  );

  cmat_access_mux #(.B(B)) u_mux (
    .clk, .rst_n,
    .ext_req, .ext_we, .ext_row, .ext_col, .ext_wdata,
    .ext_rvalid, .ext_rdata,
    .ext_hit, .buf_rdata,
    .bit_op,
    .row_addr, .col_addr, .row_en, .col_en, .rn_en, .cn_en, .we, .wdata,
    .arr_rdata
  );

  cmat_decoder #(.B(B), .N(N)) u_row_dec (.en(row_en), .addr(row_addr), .sel(wl));
  cmat_decoder #(.B(B), .N(N)) u_col_dec (.en(col_en), .addr(col_addr), .sel(cs));

  cmat_matrix #(.B(B), .N(N)) u_matrix (
    .clk, .wl, .cs, .rn_en, .cn_en, .we, .wdata,
    .rdata (arr_rdata),
    .cn_rdata
  );
endmodule

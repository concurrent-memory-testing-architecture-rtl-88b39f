// cmat_amm: address mapping mechanism (AMM) between the test neighborhood
// (TND) being tested and the 4 x 4 buffer that holds its data.
//
// Cell (r, c) of the matrix lives in buffer position (r mod 4, c mod 4), so
// the AMM only has to pick which two-bit row and column index reach the
// buffer decoders:
//   * ext_hit: an external request to a cell that is held in the buffer
//     ("ASND requested") uses the LSBs of the external address;
//   * row_load: loading a row back uses the row load counter for the row
//     index and the tester's column LSBs;
//   * col_load: loading a column back uses the column load counter for the
//     column index and the tester's row LSBs;
//   * otherwise the tester's (pattern generator's) LSBs are used.
// The two load counters are two-bit up/down counters that track the buffer
// row (column) to be loaded next as the ASND slides.
// ASND requested: the AMM keeps one occupancy bit per buffer position and
// the corner (win_row0, win_col0) of the 4 x 4 window the buffered cells lie
// in; an external address hits when it lies in that window and its position
// is occupied. Occupancy is set by save (set_occ) and cleared by load
// (clr_occ) at the position selected for the tester; it resets to empty.
// Address muxing, the load counters and the LSB mapping follow the modelled
// design; the occupancy bits and window compare are this design's way of
// producing "ASND requested". Combinational outputs, counters and occupancy
// change at the rising clock edge.
module cmat_amm #(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // external request
  input  logic         ext_req,
  input  logic [B-1:0] ext_row,
  input  logic [B-1:0] ext_col,
  output logic         ext_hit,
  // window of the buffered cells
  input  logic [B-1:0] win_row0,
  input  logic [B-1:0] win_col0,
  // tester side
  input  logic [1:0]   pg_row,
  input  logic [1:0]   pg_col,
  input  logic         row_load,
  input  logic         col_load,
  input  logic         set_occ,
  input  logic         clr_occ,
  // load counters: load a value, or count up / down
  input  logic         rcnt_ld,
  input  logic [1:0]   rcnt_val,
  input  logic         rcnt_up,
  input  logic         ccnt_ld,
  input  logic [1:0]   ccnt_val,
  input  logic         ccnt_up,
  input  logic         ccnt_dn,
  output logic [1:0]   row_load_cnt,
  output logic [1:0]   col_load_cnt,
  // buffer address
  output logic [1:0]   buf_row,
  output logic [1:0]   buf_col
);
  logic [3:0] occ [4];
  logic [B-1:0] dr, dc;
  logic [1:0] t_row, t_col;

  always_comb begin
    dr      = ext_row - win_row0;
    dc      = ext_col - win_col0;
    ext_hit = ext_req && ((dr >> 2) == '0) && ((dc >> 2) == '0) &&
              occ[ext_row[1:0]][ext_col[1:0]];
    t_row   = row_load ? row_load_cnt : pg_row;
    t_col   = col_load ? col_load_cnt : pg_col;
    buf_row = ext_hit ? ext_row[1:0] : t_row;
    buf_col = ext_hit ? ext_col[1:0] : t_col;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) occ[r] <= '0;
      row_load_cnt <= '0;
      col_load_cnt <= '0;
    end else begin
      if (set_occ) occ[t_row][t_col] <= 1'b1;
      if (clr_occ) occ[t_row][t_col] <= 1'b0;
      if (rcnt_ld)      row_load_cnt <= rcnt_val;
      else if (rcnt_up) row_load_cnt <= row_load_cnt + 2'd1;
      if (ccnt_ld)      col_load_cnt <= ccnt_val;
      else if (ccnt_up) col_load_cnt <= col_load_cnt + 2'd1;
      else if (ccnt_dn) col_load_cnt <= col_load_cnt - 2'd1;
    end
  end
endmodule

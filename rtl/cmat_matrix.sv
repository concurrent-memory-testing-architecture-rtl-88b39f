// cmat_matrix: one N x N bit memory matrix of a CMAT memory, with its row
// neighborhood (RN), column neighborhood (CN) and read path.
//
// The matrix is driven by decoded select lines, not by an address, so that a
// faulty decoder (several lines or the wrong line on) shows up in its
// behaviour: every cell whose word line (wl) and column select (cs) are both
// on is written, and a read returns the OR of every selected cell.
//   * Regular cells C(i,j): selected by wl[i] & cs[j].
//   * RN: an extra row of N cells, selected by rn_en & cs[j]. It is read
//     through the regular sense amplifiers and column MUX, so it exercises
//     the column decoder without the row decoder.
//   * CN: an extra column of N cells, selected by wl[i] & cn_en, read through
//     a sense amplifier of its own (cn_rdata), so it exercises the row decoder
//     without the column decoder.
//   * The CN cell at the crossing with RN (the corner cell) is selected by
//     rn_en & cn_en. During the sense-amplifier test it is written together
//     with RN cell i and read through the CN sense amplifier, giving a
//     reference for sense amplifier i.
// Reads are combinational (rdata, cn_rdata valid in the same cycle as the
// select lines); writes happen at the rising clock edge when we is high.
// The sense amplifiers are modelled only by their digital function (the
// selected bit is passed on); their analogue recovery time is not modelled.
// RN, CN and their independent enable lines follow the modelled design; the
// wired-OR read of multiple selections and the corner cell as the CN's
// reference cell are this design's reading of it. No reset: the array holds
// user data, and every cell is written before the tester reads it.
module cmat_matrix #(
  parameter int unsigned B = 8,
  parameter int unsigned N = 1 << B
) (
  input  logic         clk,
  input  logic [N-1:0] wl,        // row decoder outputs (word lines)
  input  logic [N-1:0] cs,        // column decoder outputs (column selects)
  input  logic         rn_en,     // row neighborhood enable line
  input  logic         cn_en,     // column neighborhood enable line
  input  logic         we,
  input  logic         wdata,
  output logic         rdata,     // regular sense amplifiers + column MUX
  output logic         cn_rdata   // column neighborhood sense amplifier
);
  logic [N-1:0] cells [N];   // cells[i][j] = C(i,j)
  logic [N-1:0] rn_cells;    // row neighborhood, one cell per column
  logic [N-1:0] cn_cells;    // column neighborhood, one cell per row
  logic         corner;      // CN cell in the RN row

  logic [N-1:0] row_sel_data;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (wl[i]) cells[i] <= (cells[i] & ~cs) | (cs & {N{wdata}});
      end
      if (rn_en) rn_cells <= (rn_cells & ~cs) | (cs & {N{wdata}});
      if (cn_en) cn_cells <= (cn_cells & ~wl) | (wl & {N{wdata}});
      if (rn_en && cn_en) corner <= wdata;
    end
  end

  // Bit-line values: OR over every enabled row, then the column MUX.
  always_comb begin
    row_sel_data = rn_en ? rn_cells : '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (wl[i]) row_sel_data = row_sel_data | cells[i];
    end
    rdata    = |(row_sel_data & cs);
    cn_rdata = cn_en & ((|(cn_cells & wl)) | (rn_en & corner));
  end
endmodule

// cmat_array4x4: 4 x 4 bit cell array used twice in the built-in tester,
// as the TND buffer and as the ASND mirror.
//
// A 3 x 3 augmented single-cell test neighborhood (ASND) is stored with cell
// (r, c) of the matrix at position (r mod 4, c mod 4). Any three consecutive
// rows or columns map to distinct positions, so the two least significant
// bits of the row and column address select a cell directly and the data
// never have to be moved inside the array when the ASND slides by one row or
// column. One read/write port: the read is combinational from (row, col),
// a write happens at the rising clock edge when we is high. Contents are
// cleared by reset (this design's choice; the stored data are always written
// before they are read).
module cmat_array4x4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] row,
  input  logic [1:0] col,
  input  logic       wdata,
  output logic       rdata
);
  logic [3:0] cells [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) cells[r] <= '0;
    end else if (we) begin
      cells[row][col] <= wdata;
    end
  end

  assign rdata = cells[row][col];
endmodule

// cmat_bit: built-in tester (BIT) of one CMAT memory matrix.
//
// The BIT runs free: while test_en is high it tests the peripheral circuits
// (cmat_periph_tester: decoders through the row/column neighborhoods, then
// the sense amplifiers), then every memory cell (cmat_cell_tester: serial
// ASND test with the TND buffer and ASND mirror), and starts over. test_en is
// looked at only between passes, so a pass that has started always finishes
// and restores the matrix contents.
// Normal access has priority: any external request (ext_req) stalls the
// tester for that cycle. Requests to cells held in the TND buffer are
// detoured to it (ext_hit, ext_buf_rdata).
// All test reads are verified by one two-rail comparator: the matrix's
// regular read data against the latch/CN sense amplifier (peripheral test) or
// against the ASND mirror (cell test). A mismatch pulses fault, sets the
// sticky fault_detected and increments fault_count; fault_phase tells which
// test found it. pass_done pulses at the end of each complete test pass.
// Timing: op is the tester's array cycle for the current clock; arr_rdata and
// cn_rdata are the matrix's combinational read results for that op.
// The split into peripheral and cell testing, their order, the shared
// comparator and the priority of normal accesses follow the modelled design;
// test_en, the counters and the pass handshake are this design's choices.
module cmat_bit
  import cmat_pkg::*;
#(
  parameter int unsigned B    = 8,
  parameter int unsigned N    = 1 << B,
  parameter int unsigned K_SA = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_en,
  // matrix
  output arr_op_t      op,
  input  logic         arr_rdata,
  input  logic         cn_rdata,
  // external request (for priority and detour)
  input  logic         ext_req,
  input  logic         ext_we,
  input  logic [B-1:0] ext_row,
  input  logic [B-1:0] ext_col,
  input  logic         ext_wdata,
  output logic         ext_hit,
  output logic         ext_buf_rdata,
  // status
  output bit_phase_e   phase,
  output cell_state_e  cell_state,
  output logic         fault,
  output logic         fault_detected,
  output logic [15:0]  fault_count,
  output bit_phase_e   fault_phase,
  output logic         pass_done,
  output logic [15:0]  pass_count,
  output logic [B-1:0] tnd_row,     // centre of the ASND under test
  output logic [B-1:0] tnd_col
);
  logic    stall;
  arr_op_t p_op, c_op;
  logic    p_start, p_busy, p_check, p_ref, p_done;
  logic    c_start, c_busy, c_check, c_ref, c_done;
  logic    cmp_check, cmp_ref, mismatch;
  logic [1:0] cmp_z;

  assign stall = ext_req;

  cmat_periph_tester #(.B(B), .N(N), .K_SA(K_SA)) u_periph (
    .clk, .rst_n,
    .start (p_start),
    .stall,
    .cn_rdata,
    .op    (p_op),
    .busy  (p_busy),
    .check (p_check),
    .ref_bit (p_ref),
    .done  (p_done)
  );

  cmat_cell_tester #(.B(B), .N(N)) u_cells (
    .clk, .rst_n,
    .start (c_start),
    .stall,
    .op    (c_op),
    .arr_rdata,
    .check (c_check),
    .ref_bit (c_ref),
    .busy  (c_busy),
    .done  (c_done),
    .state_o (cell_state),
    .ci (tnd_row), .cj (tnd_col),
    .ext_req, .ext_we, .ext_row, .ext_col, .ext_wdata,
    .ext_hit, .ext_buf_rdata
  );

  always_comb begin
    p_start   = (phase == BIT_PERIPH) && !p_busy;
    c_start   = (phase == BIT_CELLS) && !c_busy;
    op        = ARR_IDLE;
    cmp_check = 1'b0;
    cmp_ref   = 1'b0;
    if (phase == BIT_PERIPH && p_busy) begin
      op = p_op;  cmp_check = p_check;  cmp_ref = p_ref;
    end else if (phase == BIT_CELLS && c_busy) begin
      op = c_op;  cmp_check = c_check;  cmp_ref = c_ref;
    end
    if (stall) begin
      op        = ARR_IDLE;
      cmp_check = 1'b0;
    end
  end

  cmat_two_rail_cmp #(.W(1)) u_cmp (
    .a (arr_rdata),
    .b (cmp_ref),
    .z (cmp_z)
  );

  // A compare fails when the comparator's output is not a two-rail code word.
  assign mismatch = cmp_check && (cmp_z[0] == cmp_z[1]);

  assign fault     = mismatch;
  assign pass_done = c_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= BIT_IDLE;
      fault_detected <= 1'b0;
      fault_count    <= '0;
      fault_phase    <= BIT_IDLE;
      pass_count     <= '0;
    end else begin
      case (phase)
        BIT_IDLE:   if (test_en) phase <= BIT_PERIPH;
        BIT_PERIPH: if (p_done)  phase <= BIT_CELLS;
        BIT_CELLS:  if (c_done)  phase <= test_en ? BIT_PERIPH : BIT_IDLE;
        default:    phase <= BIT_IDLE;
      endcase
      if (c_done) pass_count <= pass_count + 16'd1;
      if (mismatch) begin
        fault_detected <= 1'b1;
        fault_phase    <= phase;
        if (fault_count != '1) fault_count <= fault_count + 16'd1;
      end
    end
  end
endmodule

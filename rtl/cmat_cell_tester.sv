// cmat_cell_tester: serial memory-cell tester of a CMAT memory matrix.
//
// The matrix is tested one augmented single-cell test neighborhood (ASND,
// the 3 x 3 cells around centre (i, j)) at a time, for every centre with
// 1 <= i, j <= N-2 (boundary ASNDs are not centres of their own). The data
// of the ASND under test are kept in a 4 x 4 buffer while a test pattern is
// applied to the ASND and, with the same buffer-style addressing, to a 4 x 4
// ASND mirror; every read of the ASND is compared with the mirror by the
// two-rail comparator (check/ref_bit outputs).
// Traversal: ASND(1,1) is saved (9 cycles). Rows are walked in a serpentine,
// odd rows left to right, even rows right to left. Between two ASNDs of a
// row the trailing column is loaded back into the matrix and the leading
// column is saved (3 + 3 = 6 cycles); at the end of a row the top row of the
// ASND is loaded back and the row below is saved (6 cycles). After the last
// ASND its 9 cells are loaded back. One pass therefore takes
//   9 + (N-2)^2 * K + 6 * ((N-2)^2 - 1) + 9   cycles   (K = 1552, cmat_pkg::ASND_K)
// without external traffic.
// External access: stall (any external request) freezes the tester for the
// cycle. A request whose cell is held in the buffer (ext_hit, from the AMM)
// is detoured to the buffer in that cycle: ext_buf_rdata returns the cell,
// and a write updates the buffer, so the data written back later are the
// current ones. All other requests go to the matrix, whose cells outside
// the buffer always hold the current data.
// Follows the modelled design: the ASND/mirror comparison, the 4 x 4 buffer
// and mirror, the load counters, the serpentine with 6-cycle column moves,
// the detour of requests to the buffer. This design's choices: the exact
// order of load and save cycles, saving and restoring the first and last
// ASND whole, and the ASND pattern itself (cmat_asnd_pg).
module cmat_cell_tester
  import cmat_pkg::*;
#(
  parameter int unsigned B = 8,
  parameter int unsigned N = 1 << B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         stall,
  // matrix
  output arr_op_t      op,
  input  logic         arr_rdata,
  // comparator
  output logic         check,
  output logic         ref_bit,
  // status
  output logic         busy,
  output logic         done,
  output cell_state_e  state_o,
  output logic [B-1:0] ci,
  output logic [B-1:0] cj,
  // external detour
  input  logic         ext_req,
  input  logic         ext_we,
  input  logic [B-1:0] ext_row,
  input  logic [B-1:0] ext_col,
  input  logic         ext_wdata,
  output logic         ext_hit,
  output logic         ext_buf_rdata
);
  cell_state_e  state;
  logic [B-1:0] i, j;
  logic         dir;         // 1: left to right (odd rows)
  logic [3:0]   s;           // step inside a save/load state

  // pattern generator
  logic       pg_start, pg_adv, pg_active, pg_we, pg_wdata, pg_exp, pg_last;
  logic [1:0] pg_dr, pg_dc;

  // addresses
  logic [B-1:0] r, c, jend;
  logic [1:0]   s_div3, s_mod3;
  logic         is_load, is_save, last_step;

  // AMM / buffer / mirror
  logic [1:0] buf_row, buf_col, rlc, clc;
  logic       buf_we, buf_wdata, buf_rdata;
  logic       mir_we, mir_rdata;
  logic [B-1:0] win_col0;
  logic       rcnt_ld, rcnt_up, ccnt_ld, ccnt_up, ccnt_dn;
  logic [1:0] rcnt_val, ccnt_val;
  logic       leave_test;

  assign state_o = state;
  assign ci      = i;
  assign cj      = j;
  assign busy    = (state != CT_IDLE);

  always_comb begin
    s_div3 = (s >= 4'd6) ? 2'd2 : (s >= 4'd3) ? 2'd1 : 2'd0;
    s_mod3 = 2'(s - 4'(3 * s_div3));
    jend   = dir ? B'(N - 2) : B'(1);
    r = i - 1'b1;
    c = j - 1'b1;
    case (state)
      CT_SAVE0, CT_LOADF: begin r = i - 1'b1 + B'(s_div3); c = j - 1'b1 + B'(s_mod3); end
      CT_TEST:            begin r = i - 1'b1 + B'(pg_dr);  c = j - 1'b1 + B'(pg_dc);  end
      CT_LOADC:           begin r = i - 1'b1 + B'(s); c = dir ? j - 1'b1 : j + 1'b1; end
      CT_SAVEC:           begin r = i - 1'b1 + B'(s); c = dir ? j + B'(2) : j - B'(2); end
      CT_LOADR:           begin r = i - 1'b1;         c = j - 1'b1 + B'(s); end
      CT_SAVER:           begin r = i + B'(2);        c = j - 1'b1 + B'(s); end
      default: ;
    endcase
    is_load   = (state == CT_LOADC) || (state == CT_LOADR) || (state == CT_LOADF);
    is_save   = (state == CT_SAVE0) || (state == CT_SAVEC) || (state == CT_SAVER);
    last_step = (state == CT_SAVE0 || state == CT_LOADF) ? (s == 4'd8) : (s == 4'd2);
    leave_test = (state == CT_TEST) && pg_last && !stall;

    op       = ARR_IDLE;
    op.row   = MAX_B'(r);
    op.col   = MAX_B'(c);
    if (state != CT_IDLE) begin
      op.en     = 1'b1;
      op.row_en = 1'b1;
      op.col_en = 1'b1;
      op.we     = is_load || ((state == CT_TEST) && pg_we);
      op.wdata  = (state == CT_TEST) ? pg_wdata : buf_rdata;
    end
    check   = (state == CT_TEST) && !pg_we;
    ref_bit = mir_rdata;

    buf_we    = ext_hit ? ext_we : (is_save && !stall);
    buf_wdata = ext_hit ? ext_wdata : arr_rdata;
    mir_we    = (state == CT_TEST) && pg_we && !stall;
    pg_adv    = (state == CT_TEST) && !stall;
    pg_start  = !stall && last_step &&
                (state == CT_SAVE0 || state == CT_SAVEC || state == CT_SAVER);
    done      = (state == CT_LOADF) && last_step && !stall;

    win_col0 = (!dir && j > B'(1)) ? j - B'(2) : j - 1'b1;

    // Load counters: row load counter = LSBs of the ASND's top row, column
    // load counter = LSBs of the trailing column.
    rcnt_ld  = (state == CT_IDLE) && start;
    rcnt_val = 2'd0;
    rcnt_up  = (state == CT_SAVER) && last_step && !stall;
    ccnt_ld  = rcnt_ld || rcnt_up;
    ccnt_val = rcnt_ld ? 2'd0 : (dir ? 2'(j + 1'b1) : 2'(j - 1'b1));
    ccnt_up  = (state == CT_SAVEC) && last_step && !stall && dir;
    ccnt_dn  = (state == CT_SAVEC) && last_step && !stall && !dir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CT_IDLE;
      i     <= B'(1);
      j     <= B'(1);
      dir   <= 1'b1;
      s     <= '0;
    end else if (state == CT_IDLE) begin
      if (start) begin
        state <= CT_SAVE0;
        i     <= B'(1);
        j     <= B'(1);
        dir   <= 1'b1;
        s     <= '0;
      end
    end else if (!stall) begin
      if (state == CT_TEST) begin
        if (leave_test) begin
          s <= '0;
          if (j != jend)            state <= CT_LOADC;
          else if (i != B'(N - 2))  state <= CT_LOADR;
          else                      state <= CT_LOADF;
        end
      end else if (!last_step) begin
        s <= s + 4'd1;
      end else begin
        s <= '0;
        case (state)
          CT_SAVE0: state <= CT_TEST;
          CT_LOADC: state <= CT_SAVEC;
          CT_SAVEC: begin
            state <= CT_TEST;
            j     <= dir ? j + 1'b1 : j - 1'b1;
          end
          CT_LOADR: state <= CT_SAVER;
          CT_SAVER: begin
            state <= CT_TEST;
            i     <= i + 1'b1;
            dir   <= !dir;
          end
          default:  state <= CT_IDLE;   // CT_LOADF: pass complete
        endcase
      end
    end
  end

  cmat_asnd_pg u_pg (
    .clk, .rst_n,
    .start (pg_start),
    .adv   (pg_adv),
    .active(pg_active),
    .dr    (pg_dr),
    .dc    (pg_dc),
    .we    (pg_we),
    .wdata (pg_wdata),
    .exp   (pg_exp),
    .last  (pg_last)
  );

  cmat_amm #(.B(B)) u_amm (
    .clk, .rst_n,
    .ext_req, .ext_row, .ext_col, .ext_hit,
    .win_row0 (i - 1'b1),
    .win_col0 (win_col0),
    .pg_row   (r[1:0]),
    .pg_col   (c[1:0]),
    .row_load (state == CT_LOADR),
    .col_load (state == CT_LOADC),
    .set_occ  (is_save && !stall),
    .clr_occ  (is_load && !stall),
    .rcnt_ld, .rcnt_val, .rcnt_up,
    .ccnt_ld, .ccnt_val, .ccnt_up, .ccnt_dn,
    .row_load_cnt (rlc),
    .col_load_cnt (clc),
    .buf_row, .buf_col
  );

  cmat_array4x4 u_buffer (
    .clk, .rst_n,
    .we    (buf_we),
    .row   (buf_row),
    .col   (buf_col),
    .wdata (buf_wdata),
    .rdata (buf_rdata)
  );

  cmat_array4x4 u_mirror (
    .clk, .rst_n,
    .we    (mir_we),
    .row   (r[1:0]),
    .col   (c[1:0]),
    .wdata (pg_wdata),
    .rdata (mir_rdata)
  );

  assign ext_buf_rdata = buf_rdata;

  // The load counters must point at the row/column being loaded back.
  a_row_cnt: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CT_LOADR) |-> (rlc == r[1:0]));
  a_col_cnt: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CT_LOADC) |-> (clc == c[1:0]));
  // The mirror is a good copy of the ASND: it must return what the pattern
  // expects.
  a_mirror: assert property (@(posedge clk) disable iff (!rst_n)
    (check && !stall) |-> (mir_rdata == pg_exp));
  // The pattern generator runs exactly while an ASND is under test.
  a_pg: assert property (@(posedge clk) disable iff (!rst_n)
    (state == CT_TEST) |-> pg_active);
endmodule

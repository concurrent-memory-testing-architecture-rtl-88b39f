// cmat_asnd_pg: test pattern generator for one augmented single-cell test
// neighborhood (ASND, 3 x 3 cells), aimed at single-cell pattern-sensitive
// faults (SPSF) of the centre cell.
//
// Cells are numbered 0..8 row by row (cell = 3*dr + dc); cell 4 is the
// centre (base) cell, the other eight are its neighbours, neighbour k being
// cell k for k < 4 and cell k+1 otherwise. The pattern is
//   1. write 0 to all nine cells;
//   2. for p = 0 .. 255, with the neighbours holding the Gray code
//      g(p) = p ^ (p >> 1):
//        if p > 0: write the one neighbour that changes from g(p-1) to g(p)
//                  (neighbour number = trailing zeros of p), read it back;
//        base cell: w1, r, w0, r   (both transitions under this pattern);
//   3. read all nine cells.
// So every neighbourhood pattern is applied once, the base cell is written
// and read in both directions under each one, and each neighbour write is
// checked. K = 9 + 255*2 + 256*4 + 9 = 1552 operations (cmat_pkg::ASND_K).
// Interface: one operation is offered per cycle while active and consumed
// when adv is high (the tester holds adv low on cycles given to the external
// port). start loads the first operation; last marks the final one, after
// which active falls. Outputs: cell (dr, dc), we, wdata and exp, the value a
// fault-free ASND returns on a read (kept in a 9-bit shadow of what was
// written). In the tester reads are checked against the ASND mirror, which
// receives the same operations; exp serves as a cross-check of the mirror.
// Applying a fixed pattern of length K to each ASND and its mirror, with SPSF
// as the fault model, follows the modelled design; this particular pattern
// is this design's own (the published one it cites is not reproduced).
module cmat_asnd_pg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       adv,
  output logic       active,
  output logic [1:0] dr,
  output logic [1:0] dc,
  output logic       we,
  output logic       wdata,
  output logic       exp,
  output logic       last
);
  typedef enum logic [1:0] {
    PG_INIT = 2'd0,   // write 0 to all cells
    PG_NBR  = 2'd1,   // write / read the changing neighbour
    PG_BASE = 2'd2,   // base cell w1 r w0 r
    PG_FIN  = 2'd3    // read all cells
  } pg_step_e;

  pg_step_e   step;
  logic [3:0] cnt;      // cell counter (INIT, FIN) or sub-step (NBR, BASE)
  logic [8:0] p;        // neighbourhood pattern number 0..256
  logic [8:0] shadow;   // what a fault-free ASND holds
  logic [2:0] tz;       // neighbour that changes at pattern p
  logic [7:0] gray;
  logic [3:0] cidx;

  always_comb begin
    tz = 3'd0;
    for (int k = 7; k >= 0; k--) if (p[k]) tz = 3'(k);
    gray = p[7:0] ^ (p[7:0] >> 1);
    case (step)
      PG_INIT, PG_FIN: cidx = cnt;
      PG_NBR:          cidx = (tz < 3'd4) ? 4'(tz) : 4'(tz) + 4'd1;
      default:         cidx = 4'd4;
    endcase
    dr    = (cidx >= 4'd6) ? 2'd2 : (cidx >= 4'd3) ? 2'd1 : 2'd0;
    dc    = 2'(cidx - 4'(3 * dr));
    case (step)
      PG_INIT: begin we = 1'b1;       wdata = 1'b0;        end
      PG_NBR:  begin we = !cnt[0];    wdata = gray[tz];    end
      PG_BASE: begin we = !cnt[0];    wdata = !cnt[1];     end
      default: begin we = 1'b0;       wdata = 1'b0;        end
    endcase
    exp  = shadow[cidx];
    last = active && (step == PG_FIN) && (cnt == 4'd8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      step   <= PG_INIT;
      cnt    <= '0;
      p      <= '0;
      shadow <= '0;
    end else if (start) begin
      active <= 1'b1;
      step   <= PG_INIT;
      cnt    <= '0;
      p      <= '0;
    end else if (active && adv) begin
      if (we) shadow[cidx] <= wdata;
      cnt <= cnt + 4'd1;
      case (step)
        PG_INIT: if (cnt == 4'd8) begin cnt <= '0; step <= PG_BASE; end
        PG_NBR:  if (cnt == 4'd1) begin cnt <= '0; step <= PG_BASE; end
        PG_BASE: if (cnt == 4'd3) begin
                   cnt <= '0;
                   p   <= p + 9'd1;
                   step <= (p == 9'd255) ? PG_FIN : PG_NBR;
                 end
        default: if (cnt == 4'd8) active <= 1'b0;
      endcase
    end
  end
endmodule

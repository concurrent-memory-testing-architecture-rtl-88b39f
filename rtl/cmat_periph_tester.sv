// cmat_periph_tester: pattern generator for the peripheral circuits of a
// CMAT memory matrix (row decoder, column decoder, sense amplifiers).
//
// Decoder test. The row decoder is exercised through the column neighborhood
// (CN) and the column decoder through the row neighborhood (RN); while one
// decoder is tested the other is disabled. Every operation of the pattern on
// position i takes two cycles: first on the row decoder (row = i, CN line on,
// column decoder off), then on the column decoder (column = i, RN line on,
// row decoder off). A write writes CN cell i and RN cell i in the two cycles.
// A read stores CN cell i in a latch in the first cycle and compares RN cell
// i with the latch in the second. The pattern is the march
//   up(w0); up(r,w1); down(r,w0); up(r)
// = 6 operations per position, 12*N cycles.
// Sense-amplifier test. The row decoder is disabled and column i, RN line and
// CN line are on together, so RN cell i (through sense amplifier i) and the
// CN's corner cell (through the CN sense amplifier) receive the same pattern
//   w0^k w1 r w1^k w0 r      (2k+4 cycles per amplifier, N*(2k+4) in all)
// and the two amplifier outputs are compared on each read.
// Interface: op is the array cycle the tester wants; it is performed only
// when stall is low (the external port has priority), and the sequence
// advances only then. check/ref_bit ask the comparator to compare the
// matrix's regular read data with ref_bit in this cycle. done pulses in the
// last cycle of the pass. The CN/RN scheme, the latch, the two-cycle
// operations and the sense-amplifier pattern with its cycle count follow the
// modelled design; the decoder march (the design it is modelled on uses a
// longer published pattern) is this design's choice.
module cmat_periph_tester
  import cmat_pkg::*;
#(
  parameter int unsigned B = 8,
  parameter int unsigned N = 1 << B,
  parameter int unsigned K_SA = 10     // sense amplifier time constant k
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    stall,
  input  logic    cn_rdata,    // CN sense amplifier output
  output arr_op_t op,
  output logic    busy,
  output logic    check,
  output logic    ref_bit,
  output logic    done
);
  localparam int unsigned TW = $clog2(2 * K_SA + 4);

  periph_state_e  state;
  logic [1:0]     elem;        // decoder march element 0..3
  logic           rw;          // 0: read op, 1: write op (elements 1, 2)
  logic           half;        // 0: row decoder / CN, 1: column decoder / RN
  logic [B-1:0]   pos;         // address i
  logic [TW-1:0]  t;           // step of the sense-amplifier pattern
  logic           latch_q;

  logic           dec_we, dec_wd, last_pos, elem_end;
  logic [B-1:0]   addr;

  always_comb begin
    // Decoder march: element 0 writes 0; 1 reads then writes 1; 2 reads then
    // writes 0 going down; 3 reads.
    case (elem)
      2'd0:    begin dec_we = 1'b1; dec_wd = 1'b0; end
      2'd1:    begin dec_we = rw;   dec_wd = 1'b1; end
      2'd2:    begin dec_we = rw;   dec_wd = 1'b0; end
      default: begin dec_we = 1'b0; dec_wd = 1'b0; end
    endcase
    addr     = (elem == 2'd2) ? ~pos : pos;
    last_pos = (pos == B'(N - 1));
    elem_end = last_pos && half && (rw || elem == 2'd0 || elem == 2'd3);

    op      = ARR_IDLE;
    check   = 1'b0;
    ref_bit = 1'b0;
    done    = 1'b0;
    case (state)
      PT_DEC: begin
        op.en    = 1'b1;
        op.we    = dec_we;
        op.wdata = dec_wd;
        op.row   = MAX_B'(addr);
        op.col   = MAX_B'(addr);
        op.row_en = !half;
        op.cn_en  = !half;
        op.col_en = half;
        op.rn_en  = half;
        check     = half && !dec_we;
        ref_bit   = latch_q;
      end
      PT_SA: begin
        op.en     = 1'b1;
        op.col_en = 1'b1;
        op.rn_en  = 1'b1;
        op.cn_en  = 1'b1;
        op.col    = MAX_B'(pos);
        op.we     = !((t == TW'(K_SA + 1)) || (t == TW'(2 * K_SA + 3)));
        op.wdata  = (t >= TW'(K_SA)) && (t <= TW'(2 * K_SA + 1));
        check     = !op.we;
        ref_bit   = cn_rdata;
        done      = last_pos && (t == TW'(2 * K_SA + 3)) && !stall;
      end
      default: ;
    endcase
  end

  assign busy = (state != PT_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PT_IDLE;
      elem    <= '0;
      rw      <= 1'b0;
      half    <= 1'b0;
      pos     <= '0;
      t       <= '0;
      latch_q <= 1'b0;
    end else if (state == PT_IDLE) begin
      if (start) begin
        state <= PT_DEC;
        elem  <= '0;
        rw    <= 1'b0;
        half  <= 1'b0;
        pos   <= '0;
        t     <= '0;
      end
    end else if (!stall) begin
      if (state == PT_DEC) begin
        if (!half && !dec_we) latch_q <= cn_rdata;
        half <= !half;
        if (half) begin
          if (elem == 2'd1 || elem == 2'd2) rw <= !rw;
          if (elem == 2'd0 || elem == 2'd3 || rw) begin
            pos <= pos + 1'b1;
            if (elem_end) begin
              pos <= '0;
              if (elem == 2'd3) state <= PT_SA;
              else              elem  <= elem + 2'd1;
            end
          end
        end
      end else begin
        if (t == TW'(2 * K_SA + 3)) begin
          t   <= '0;
          pos <= pos + 1'b1;
          if (last_pos) state <= PT_IDLE;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end
endmodule

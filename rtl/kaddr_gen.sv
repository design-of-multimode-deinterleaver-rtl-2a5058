// kaddr_gen: deinterleaver address generator built from counters, one
// small block per modulation, a modulation mux, a multiply by d and an
// adder.
//
// For received bit j of a block, the deinterleaver equations (3) and (4)
// give the original position k_j. Write j = R*a + b with R = N/d rows,
// a = 0..d-1 and b = 0..R-1. Equation (4) then reduces to
//     k = d * X + a,   X = s*floor(b/s) + ((b + a) mod s)
// where X = m_j mod R is the first-level permutation m_j taken modulo R.
// The sign inside the modulo is "+", so that the result is the exact
// inverse of the interleaver equations (1)-(2). With "-" the 64-QAM
// addresses would not undo the interleaver. For s = 1 and s = 2 the two
// signs give the same result. The hardware follows this form:
//   column counter i = b (inner, 0..R-1), row counter = a (outer, 0..15),
//   BPSK and QPSK blocks:  X = i              (s = 1)
//   16-QAM block:          X = i with bit 0 flipped when a is odd (s = 2)
//   64-QAM block:          X = 3*floor(i/3) + ((i + a) mod 3)   (s = 3)
//   mux M8 picks X by mod_typ, ML3 multiplies by d = 16, A9 adds a.
// Writing received bit j to address k_j and reading the memory in order
// deinterleaves the block.
//
// Interface and timing: the control behaves exactly like addr_gen, so the
// two run in lockstep when driven alike. clr and a mode change at a block
// boundary cost one pre-computation cycle with valid = 0. After that a new
// address k appears after every rising edge with en high. k_addr is decoded
// from the counters in the same cycle. The counters, per-modulation blocks,
// mux, multiplier and adder follow the document's block diagram. The
// formulas inside the blocks are derived here from equations (3) and (4).
// The diagram also feeds a code-rate input to the blocks, but the block
// size does not depend on the code rate, so there is no such input here.
module kaddr_gen
  import deint_pkg::*;
(
  input  logic          clk,
  input  logic          clr,       // synchronous clear
  input  logic          en,        // advance to the next received bit
  input  mod_t          mod_typ,   // requested modulation
  output mod_t          mode,      // modulation in use
  output logic          valid,     // address valid (not pre-computing)
  output logic [AW-1:0] k_addr,    // deinterleaved position k_j
  output logic          blk_last   // current bit is the last of its block
);

  logic             pre;        // pre-computation state
  logic [ROW_W-1:0] col_i;      // column counter i (0..R-1)
  logic [COL_W-1:0] row_a;      // row counter (0..d-1)
  logic [ROW_W-1:0] col_last;   // R-1 of the current mode
  logic             col_end;

  logic [ROW_W-1:0] bpsk_x, qpsk_x, qam16_x, qam64_x, m8;
  logic [ROW_W-1:0] i_div3x3;
  logic [1:0]       ia_mod3;

  always_comb begin
    valid    = !pre;
    col_end  = (col_i == col_last);
    blk_last = valid && col_end && (row_a == COL_W'(D_COLS - 1));

    bpsk_x   = col_i;
    qpsk_x   = col_i;
    qam16_x  = {col_i[ROW_W-1:1], col_i[0] ^ row_a[0]};
    i_div3x3 = col_i - ROW_W'(col_i % ROW_W'(3));
    // (i + a) mod 3
    ia_mod3  = 2'((6'(col_i) + 6'(row_a)) % 6'd3);
    qam64_x  = i_div3x3 + ROW_W'(ia_mod3);

    case (mode)
      MOD_BPSK:  m8 = bpsk_x;
      MOD_QPSK:  m8 = qpsk_x;
      MOD_QAM16: m8 = qam16_x;
      default:   m8 = qam64_x;
    endcase

    // ML3: multiply by d; A9: add the row counter.
    k_addr = AW'(m8) * AW'(D_COLS) + AW'(row_a);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      pre      <= 1'b1;
      mode     <= MOD_BPSK;
      col_last <= '0;
      col_i    <= '0;
      row_a    <= '0;
    end else if (pre) begin
      pre      <= 1'b0;
      mode     <= mod_typ;
      col_last <= nrows(mod_typ) - ROW_W'(1);
      col_i    <= '0;
      row_a    <= '0;
    end else if (en) begin
      if (col_end) begin
        col_i <= '0;
        row_a <= row_a + COL_W'(1);
        if (blk_last && mod_typ != mode) pre <= 1'b1;
      end else begin
        col_i <= col_i + ROW_W'(1);
      end
    end
  end

endmodule

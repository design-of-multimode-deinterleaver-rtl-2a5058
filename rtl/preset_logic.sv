// preset_logic: the controlling state machine of the address generator.
//
// The accumulator of the address generator adds a fixed step within a row
// of the block interleaver. At the start of every row it must instead be
// set to the row's first write address. From equations (1) and (2) that
// address equals the row index r for every modulation. This block tells the
// accumulator when to load and what to load.
//
// States: ST_PRE is the pre-computation state, entered on clr and whenever
// a new modulation is taken up. It latches mod_typ, sets the row limit of
// the mode and clears the counters and the accumulator (load with row 0).
// ST_BPSK, ST_QPSK, ST_QAM16 and ST_QAM64 are the execution states, one per
// modulation. The state itself is the mode. In an execution state every
// enabled cycle advances the column counter (0..15). After column 15 the
// row counter (0..N/16-1) advances and load is raised with the next row
// index. After the last row the sequence restarts at row 0. If mod_typ
// differs from the current mode at that point, the machine goes through
// ST_PRE to the new state. So a new modulation takes effect at a block
// boundary, one cycle later.
//
// Timing: all outputs are decoded from registers or from en in the same
// cycle. load is raised in the cycle whose rising edge loads the
// accumulator. The document gives the FSM's role, the pre-computation and
// execution modes, one state per modulation, clr, and the row and column
// counters. The exact transitions are choices made here.
module preset_logic
  import deint_pkg::*;
(
  input  logic             clk,
  input  logic             clr,       // synchronous clear
  input  logic             en,        // advance to the next address
  input  mod_t             mod_typ,   // requested modulation
  output mod_t             mode,      // modulation in use
  output logic             exec,      // execution state: the address is valid
  output logic             step,      // address advances within a row
  output logic             load,      // accumulator loads load_row
  output logic [ROW_W-1:0] load_row,  // row whose first address is loaded
  output logic [COL_W-1:0] col,       // column of the current address
  output logic [ROW_W-1:0] row,       // row of the current address
  output logic             blk_last   // current address is the last of a block
);

  typedef enum logic [2:0] {
    ST_PRE   = 3'd0,
    ST_BPSK  = 3'd1,
    ST_QPSK  = 3'd2,
    ST_QAM16 = 3'd3,
    ST_QAM64 = 3'd4
  } state_t;

  state_t           state;
  logic [ROW_W-1:0] row_last;
  mod_t             mode_q;

  function automatic state_t state_of(input mod_t m);
    case (m)
      MOD_BPSK:  return ST_BPSK;
      MOD_QPSK:  return ST_QPSK;
      MOD_QAM16: return ST_QAM16;
      default:   return ST_QAM64;
    endcase
  endfunction

  logic row_end;
  always_comb begin
    exec     = (state != ST_PRE);
    mode     = mode_q;
    row_end  = (col == COL_W'(D_COLS - 1));
    blk_last = exec && row_end && (row == row_last);
    step     = exec && en && !row_end;
    load     = !exec || (en && row_end);
    load_row = (!exec || row == row_last) ? '0 : row + ROW_W'(1);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      state    <= ST_PRE;
      mode_q   <= MOD_BPSK;
      row_last <= '0;
      col      <= '0;
      row      <= '0;
    end else if (state == ST_PRE) begin
      state    <= state_of(mod_typ);
      mode_q   <= mod_typ;
      row_last <= nrows(mod_typ) - ROW_W'(1);
      col      <= '0;
      row      <= '0;
    end else if (en) begin
      col <= col + COL_W'(1);
      if (row_end) begin
        row <= load_row;
        if (row == row_last && mod_typ != mode_q) state <= ST_PRE;
      end
    end
  end

  // The mode register always agrees with the execution state.
  a_state_mode : assert property (@(posedge clk) disable iff (clr)
    (state != ST_PRE) |-> (state == state_of(mode_q)));

endmodule

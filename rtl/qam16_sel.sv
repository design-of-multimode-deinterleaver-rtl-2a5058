// qam16_sel: select line of mux-1 in the address generator (16-QAM steps).
//
// In 16-QAM the interleaver write address advances by 13 and 11 in turn.
// Which of the two comes first depends on the row: the step from column c
// to c+1 of row r is 13 when (r - c) is even and 11 when it is odd. This
// follows from permutation equations (1) and (2) with N = 192, d = 16,
// s = 2. The block keeps that parity in one flip-flop. A load at the start
// of a row sets it to the row's parity. Every step of the address toggles
// it. sel = 0 picks 13 and sel = 1 picks 11.
//
// Timing: clr, load and step act on the rising clock edge. load wins over
// step. The select is valid in the cycle the current address is presented.
// The document names this block and its mux. The parity rule is derived
// here from the equations.
module qam16_sel
  import deint_pkg::*;
(
  input  logic             clk,
  input  logic             clr,       // synchronous clear (row 0, column 0)
  input  logic             load,      // start of a row
  input  logic [ROW_W-1:0] load_row,  // index of the row that starts
  input  logic             step,      // address advances one column
  output logic             sel        // 0: step 13, 1: step 11
);

  always_ff @(posedge clk) begin
    if (clr)       sel <= 1'b0;
    else if (load) sel <= load_row[0];
    else if (step) sel <= ~sel;
  end

endmodule

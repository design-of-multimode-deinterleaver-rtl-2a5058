// qam64_sel: select lines of mux-2 in the address generator (64-QAM steps).
//
// In 64-QAM the write address advances by 20, 17, 17 in a rotating order.
// With N = 288, d = 16 and s = 3, equations (1) and (2) give the step from
// column c to c+1 of row r as 20 when (r - c) mod 3 = 0 and as 17
// otherwise. The block keeps the phase (r - c) mod 3 in a 2-bit register.
// A load at the start of a row sets it to r mod 3. Each step decrements it
// modulo 3. sel = 0 picks 20, and sel = 1 or 2 picks 17 (the three mux-2
// inputs are 20, 17 and 17).
//
// Timing: clr, load and step act on the rising clock edge. load wins over
// step. The document names this block and its mux. The phase rule is
// derived here from the equations.
module qam64_sel
  import deint_pkg::*;
(
  input  logic             clk,
  input  logic             clr,       // synchronous clear (row 0, column 0)
  input  logic             load,      // start of a row
  input  logic [ROW_W-1:0] load_row,  // index of the row that starts
  input  logic             step,      // address advances one column
  output logic [1:0]       sel        // 0: step 20, 1/2: step 17
);

  logic [1:0] row_mod3;
  always_comb row_mod3 = 2'(load_row % ROW_W'(3));

  always_ff @(posedge clk) begin
    if (clr)       sel <= 2'd0;
    else if (load) sel <= row_mod3;
    else if (step) sel <= (sel == 2'd0) ? 2'd2 : sel - 2'd1;
  end

endmodule

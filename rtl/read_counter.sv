// read_counter: the 9-bit up counter that gives the sequential address.
//
// The counter runs 0, 1, ..., N-1 and wraps to 0, where N is the block size
// of the current modulation (48, 96, 192 or 288). The modulation input sets
// the wrap point. It steps when en is high and restarts at 0 on clr or
// start (start marks the pre-computation cycle before a new block
// sequence). The value is a register, so it is valid in the same cycle as
// the other generator outputs. The document gives the 9-bit width and the
// mod_typ input. The wrap at N is a choice made here.
module read_counter
  import deint_pkg::*;
(
  input  logic          clk,
  input  logic          clr,    // synchronous clear
  input  logic          start,  // restart at 0
  input  logic          en,     // advance
  input  mod_t          mode,   // sets the wrap point
  output logic [AW-1:0] count
);

  logic last;
  always_comb last = (count == ncbps(mode) - AW'(1));

  always_ff @(posedge clk) begin
    if (clr || start) count <= '0;
    else if (en)      count <= last ? '0 : count + AW'(1);
  end

endmodule

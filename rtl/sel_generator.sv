// sel_generator: the memory selection line of the address generator.
//
// The (de)interleaver memory has two banks. One is filled with the current
// block while the other, which holds the previous block, is read out. sel
// names the bank being written. It flips after the last address of every
// block, so the roles of the banks swap at each block boundary. clr
// selects bank 0. The document names this block and its output only. Its
// use as a ping-pong bank select is a choice made here.
module sel_generator (
  input  logic clk,
  input  logic clr,      // synchronous clear: bank 0
  input  logic blk_end,  // last address of a block is being used
  output logic sel       // bank that is written, the other one is read
);

  always_ff @(posedge clk) begin
    if (clr)          sel <= 1'b0;
    else if (blk_end) sel <= ~sel;
  end

endmodule

// addr_gen: FSM-controlled address generator for the multimode
// (de)interleaver memory.
//
// The generator produces, one per enabled cycle, the write addresses j_k of
// the block interleaver of equations (1) and (2). It uses no table and no
// multiplier: an accumulator adds a small step, and a preset at the start
// of every row restarts it. The step comes from three multiplexers:
//   mux-1 : 13 or 11, selected by qam16_sel (16-QAM)
//   mux-2 : 20, 17 or 17, selected by qam64_sel (64-QAM)
//   mux-3 : 3 (BPSK), 6 (QPSK), mux-1 or mux-2, selected by the mode
// The 6-bit step is zero-padded to 9 bits and added to the previous address
// by the adder. The accumulator stores the sum, or the row start from
// preset_logic. A 9-bit up counter gives the matching sequential address
// 0..N-1, and sel_generator gives the memory bank select.
//
// Sequences (first two rows of a block):
//   BPSK  0 3 6 .. 45 | 1 4 ..      QPSK  0 6 12 .. 90 | 1 7 ..
//   16QAM 0 13 24 37 .. | 1 12 25 ..  64QAM 0 20 37 54 74 .. | 1 18 38 55 ..
//
// Interface and timing: on clr, and after a mode change at a block
// boundary, the generator spends one pre-computation cycle (valid = 0).
// After that a new address is presented every cycle in which en is high.
// write_addr, read_addr, sel and blk_last all refer to the same position k
// of the block. They are registered, so they change right after the rising
// edge on which en was high. mod_typ is sampled only at block boundaries.
// The structure (three muxes, adder, accumulator, counter, preset logic,
// select generators, widths 6 and 9) follows the document's schematic. The
// select rules, the pre-computation cycle and the bank select are choices
// made here.
module addr_gen
  import deint_pkg::*;
(
  input  logic          clk,
  input  logic          clr,         // synchronous clear
  input  logic          en,          // advance to the next address
  input  mod_t          mod_typ,     // requested modulation
  output mod_t          mode,        // modulation in use
  output logic          valid,       // addresses are valid (not pre-computing)
  output logic [AW-1:0] write_addr,  // permuted address j_k
  output logic [AW-1:0] read_addr,   // sequential address k
  output logic          sel,         // memory bank written in this block
  output logic          blk_last     // current address is the last of its block
);

  logic             step, load;
  logic [ROW_W-1:0] load_row;
  logic             sel16;
  logic [1:0]       sel64;
  logic [5:0]       mux1, mux2, mux3;
  logic [AW-1:0]    sum;

  preset_logic u_preset (
    .clk, .clr, .en, .mod_typ,
    .mode, .exec(valid), .step, .load, .load_row, .col(), .row(), .blk_last
  );

  qam16_sel u_qam16_sel (
    .clk, .clr, .load, .load_row, .step, .sel(sel16)
  );

  qam64_sel u_qam64_sel (
    .clk, .clr, .load, .load_row, .step, .sel(sel64)
  );

  always_comb begin
    mux1 = sel16 ? 6'd11 : 6'd13;
    mux2 = (sel64 == 2'd0) ? 6'd20 : 6'd17;
    case (mode)
      MOD_BPSK:  mux3 = 6'd3;
      MOD_QPSK:  mux3 = 6'd6;
      MOD_QAM16: mux3 = mux1;
      default:   mux3 = mux2;
    endcase
    sum = write_addr + {3'b000, mux3};
  end

  // Accumulator.
  always_ff @(posedge clk) begin
    if (clr)       write_addr <= '0;
    else if (load) write_addr <= AW'(load_row);
    else if (step) write_addr <= sum;
  end

  read_counter u_read_counter (
    .clk, .clr, .start(!valid), .en(valid && en), .mode, .count(read_addr)
  );

  sel_generator u_sel_generator (
    .clk, .clr, .blk_end(blk_last && en), .sel
  );

endmodule

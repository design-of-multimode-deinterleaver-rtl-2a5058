// deint_memory: two-bank (ping-pong) memory of the multimode
// (de)interleaver.
//
// Each bank holds one block of up to DEPTH entries of DW bits. The address
// generator drives both ports. One bank takes the current block at the
// write address while the other bank, holding the previous block, is read
// at the read address. The selection line wbank names the bank written.
// The read bank is chosen separately with rbank, normally !wbank.
//
// Timing: the write happens on the rising edge when we is high. A read
// started by re on one edge delivers rdata after that edge (one cycle of
// latency). rdata holds its value while re is low. The two-bank
// organisation is a choice made here. The document shows only a memory
// driven by read/write addresses and selection lines.
module deint_memory #(
  parameter int unsigned DW    = 1,    // bits per entry (1: hard bits)
  parameter int unsigned AW    = 9,    // address width
  parameter int unsigned DEPTH = 512   // entries per bank
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] bank0 [DEPTH];
  logic [DW-1:0] bank1 [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !wbank) bank0[waddr] <= wdata;
    if (we &&  wbank) bank1[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= rbank ? bank1[raddr] : bank0[raddr];
  end

endmodule

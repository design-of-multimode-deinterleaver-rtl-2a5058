// multimode_deinterleaver: streaming block deinterleaver (and interleaver)
// for BPSK, QPSK, 16-QAM and 64-QAM OFDM symbols, with 802.11n stream
// rotation addresses and, beside it, a row/column matrix interleaver.
//
// Datapath: bits arrive one per accepted cycle (in_valid && in_ready) and
// are stored in one bank of a two-bank memory. The previous block is read
// from the other bank at the same time. Two address generators run in
// lockstep and produce, for each position of the block:
//   kaddr_gen - k_j from the deinterleaver equations (3)-(4)
//   addr_gen  - j_k from the interleaver equations (1)-(2), the sequential
//               counter 0..N-1 and the bank select
// Deinterleaving (deint = 1) writes received bit j at address k_j and reads
// in order. Interleaving (deint = 0) writes bit k at j_k and reads in order.
// Either way, output bit t of a block is the input block permuted. It
// appears one block plus one cycle after the input.
//
// Mode changes: mod_typ and deint are taken up at block boundaries. When
// either differs from the one in use at the end of a block, that block must
// still be read out with its own size. So the design first runs one drain
// block: in_ready is low, the generators keep the old mode, and the stored
// block is read out. Only then does the new mode start (a mode change adds
// one pre-computation cycle). When in_valid is low the generators stall,
// and nothing is written or read.
//
// 802.11n: stream_addr is the generator's interleaver address j_k rotated
// for spatial stream iss (20 or 40 MHz), modulo the block size of the
// mode. It is an observation output computed next to gen_j_addr, as in the
// document's combined WLAN/WiMAX/802.11n address platform. It does not
// steer the memory.
//
// matrix_interleaver: the row-write/column-read matrix interleaver stands
// beside the design with its own mi_* ports.
//
// Timing: single clock, synchronous active-high clr. After clr, the first
// block starts once the pre-computation cycle is over (in_ready rises).
// out_valid/out_data are registered.
module multimode_deinterleaver
  import deint_pkg::*;
#(
  parameter int unsigned DW = 1,  // bits per stored sample (1: hard bits)
  parameter int unsigned MN = 8   // matrix interleaver size (N x N)
) (
  input  logic                  clk,
  input  logic                  clr,
  // block (de)interleaver stream
  input  mod_t                  mod_typ,      // requested modulation
  input  logic                  deint,        // 1: deinterleave, 0: interleave
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [DW-1:0]         in_data,
  output logic                  out_valid,
  output logic [DW-1:0]         out_data,
  output mod_t                  cur_mode,     // modulation in use
  output logic                  draining,     // a drain block is running
  // address observation and 802.11n stream rotation
  input  logic [1:0]            iss,          // spatial stream (0..3)
  input  logic                  bw40,         // 40 MHz channel
  output logic                  gen_valid,
  output logic [AW-1:0]         gen_j_addr,   // interleaver address j_k
  output logic [AW-1:0]         gen_k_addr,   // deinterleaver address k_j
  output logic [9:0]            stream_addr,  // j_k after stream rotation
  // matrix interleaver
  input  logic [1:0]            mi_mode,
  input  logic [$clog2(MN):0]   mi_rows,      // active rows (1..MN)
  input  logic [$clog2(MN):0]   mi_cols,      // active columns (1..MN)
  input  logic                  mi_we,
  input  logic                  mi_re,
  input  logic [$clog2(MN)-1:0] mi_addr,
  input  logic [MN-1:0]         mi_din,
  output logic [MN-1:0]         mi_dout
);

  mod_t          gen_mod_in, k_mode;
  logic          k_valid, k_blk_last, blk_last;
  logic [AW-1:0] seq_addr;
  logic          sel;
  logic          step, drain_q, pending_q, dir_q, change;

  // The generators keep the running mode except while pre-computing or
  // draining, when they may take up the requested one at the block end.
  always_comb begin
    gen_mod_in = (drain_q || !gen_valid) ? mod_typ : cur_mode;
    change     = (mod_typ != cur_mode) || (deint != dir_q);
    in_ready   = gen_valid && !drain_q;
    step       = gen_valid && (drain_q || in_valid);
    draining   = drain_q;
  end

  addr_gen u_addr_gen (
    .clk, .clr, .en(step), .mod_typ(gen_mod_in),
    .mode(cur_mode), .valid(gen_valid), .write_addr(gen_j_addr),
    .read_addr(seq_addr), .sel, .blk_last
  );

  kaddr_gen u_kaddr_gen (
    .clk, .clr, .en(step), .mod_typ(gen_mod_in),
    .mode(k_mode), .valid(k_valid), .k_addr(gen_k_addr), .blk_last(k_blk_last)
  );

  deint_memory #(.DW(DW), .AW(AW), .DEPTH(512)) u_mem (
    .clk,
    .we(step && !drain_q), .wbank(sel), .waddr(dir_q ? gen_k_addr : gen_j_addr),
    .wdata(in_data),
    .re(step && pending_q), .rbank(!sel), .raddr(seq_addr), .rdata(out_data)
  );

  always_ff @(posedge clk) begin
    if (clr) begin
      drain_q   <= 1'b0;
      pending_q <= 1'b0;
      dir_q     <= deint;
      out_valid <= 1'b0;
    end else begin
      out_valid <= step && pending_q;
      if (!gen_valid) dir_q <= deint;
      if (step && blk_last) begin
        if (drain_q) begin
          drain_q   <= 1'b0;
          pending_q <= 1'b0;
          dir_q     <= deint;
        end else begin
          pending_q <= 1'b1;
          if (change) drain_q <= 1'b1;
        end
      end
    end
  end

  freq_rotation #(.RW(10)) u_rot (
    .j_in(10'(gen_j_addr)), .n_cbpss(10'(ncbps(cur_mode))), .n_bpscs(nbpsc(cur_mode)),
    .iss, .bw40, .rot_addr(stream_addr)
  );

  matrix_interleaver #(.N(MN)) u_matrix (
    .clk, .mode(mi_mode), .n_rows(mi_rows), .n_cols(mi_cols), .we(mi_we), .re(mi_re), .addr(mi_addr),
    .din(mi_din), .dout(mi_dout)
  );

  // The two generators must stay in lockstep.
  a_lockstep : assert property (@(posedge clk) disable iff (clr)
    (gen_valid == k_valid) && (blk_last == k_blk_last) &&
    (!gen_valid || cur_mode == k_mode));

endmodule

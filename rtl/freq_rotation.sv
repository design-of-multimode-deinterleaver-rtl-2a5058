// freq_rotation: frequency rotation of an interleaver address for one
// spatial stream (IEEE 802.11n).
//
// With several spatial streams, 802.11n rotates each stream's interleaver
// output by a fixed amount in frequency:
//     r = (J - F(iss) * N_ROT * N_BPSCS) mod N_CBPSS
// with F = 0, 2, 1, 3 for streams 1..4 (iss = 0..3), N_ROT = 11 at 20 MHz
// and 29 at 40 MHz. The amount is fixed for a stream, so a small table gives
// its start value: LUT = (N - F*N_ROT*N_BPSCS mod N) mod N, which turns the
// subtraction into an addition. The datapath then needs only an adder, a
// subtractor and a 2:1 mux. The adder forms J + LUT. The subtractor forms
// J + LUT - N. The sign of the difference picks which of the two is the
// rotated address. The table is computed from the standard's formula,
// reducing the offset modulo N by repeated subtraction, so it also holds
// for block sizes smaller than the offset.
//
// The circuit is combinational, with no clock. Inputs must satisfy
// J < N. The adder, subtractor, mux and LUT structure follows the
// document's schematic. The rotation constants are those of the 802.11n
// standard, which the document does not list.
module freq_rotation #(
  parameter int unsigned RW = 10  // address width (40 MHz 64-QAM: N = 648)
) (
  input  logic [RW-1:0] j_in,     // interleaver address J (< n_cbpss)
  input  logic [RW-1:0] n_cbpss,  // coded bits per symbol per stream N
  input  logic [2:0]    n_bpscs,  // coded bits per subcarrier (1,2,4,6)
  input  logic [1:0]    iss,      // spatial stream index, 0 = stream 1
  input  logic          bw40,     // 1: 40 MHz (N_ROT = 29), 0: 20 MHz (N_ROT = 11)
  output logic [RW-1:0] rot_addr  // rotated address
);

  // Start value of a stream: (N - (F*N_ROT*N_BPSCS mod N)) mod N.
  function automatic logic [RW-1:0] lut(input logic [1:0] s, input logic w40,
                                        input logic [2:0] nb, input logic [RW-1:0] n);
    logic [11:0] off;
    logic [1:0]  f;
    case (s)
      2'd0:    f = 2'd0;
      2'd1:    f = 2'd2;
      2'd2:    f = 2'd1;
      default: f = 2'd3;
    endcase
    off = 12'(f) * (w40 ? 12'd29 : 12'd11) * 12'(nb);  // at most 522
    for (int t = 0; t < 12; t++)
      if (n != '0 && off >= 12'(n)) off = off - 12'(n);
    return (off == '0) ? '0 : RW'(12'(n) - off);
  endfunction

  logic [RW-1:0] lut_q;
  logic [RW:0]   sum;
  logic [RW+1:0] diff;

  always_comb begin
    lut_q    = lut(iss, bw40, n_bpscs, n_cbpss);
    sum      = {1'b0, j_in} + {1'b0, lut_q};
    diff     = {1'b0, sum} - {2'b00, n_cbpss};
    rot_addr = diff[RW+1] ? RW'(sum) : RW'(diff);
  end

endmodule

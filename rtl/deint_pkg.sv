// deint_pkg: types and constants shared by the multimode (de)interleaver.
//
// The modulation type is a 2-bit code. Its order (BPSK, QPSK, 16-QAM,
// 64-QAM = 0..3) is the input order of the modulation multiplexer in the
// block diagram of the address generator. Every mode uses a block
// interleaver with D = 16 columns. The block size N_CBPS for each mode is
// 48, 96, 192 or 288 coded bits, the 802.11a values. These are the sizes
// that reproduce the published write-address sequences (BPSK step 3, QPSK
// step 6, 16-QAM steps 13/11, 64-QAM steps 20/17/17). So a block has
// N/16 = 3, 6, 12 or 18 rows. S = max(N_BPSC/2, 1) is the bit-swap group
// size of the second permutation.
package deint_pkg;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_t;

  localparam int unsigned D_COLS  = 16;  // columns of the block interleaver
  localparam int unsigned AW      = 9;   // address width (block sizes up to 511)
  localparam int unsigned ROW_W   = 5;   // row index width (up to 18 rows)
  localparam int unsigned COL_W   = 4;   // column index width (16 columns)

  // Coded bits per OFDM symbol (block size) of a mode.
  function automatic logic [AW-1:0] ncbps(input mod_t m);
    case (m)
      MOD_BPSK:  return AW'(48);
      MOD_QPSK:  return AW'(96);
      MOD_QAM16: return AW'(192);
      default:   return AW'(288);
    endcase
  endfunction

  // Rows of the block (N_CBPS / 16).
  function automatic logic [ROW_W-1:0] nrows(input mod_t m);
    case (m)
      MOD_BPSK:  return ROW_W'(3);
      MOD_QPSK:  return ROW_W'(6);
      MOD_QAM16: return ROW_W'(12);
      default:   return ROW_W'(18);
    endcase
  endfunction

  // Coded bits per subcarrier (N_BPSC): 1, 2, 4, 6.
  function automatic logic [2:0] nbpsc(input mod_t m);
    case (m)
      MOD_BPSK:  return 3'd1;
      MOD_QPSK:  return 3'd2;
      MOD_QAM16: return 3'd4;
      default:   return 3'd6;
    endcase
  endfunction

endpackage

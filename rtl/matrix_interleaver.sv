// matrix_interleaver: row-write / column-read matrix block interleaver.
//
// A matrix memory of N x N bits (8 x 8 by default) is written one whole row
// per cycle and read one whole column per cycle. A block of R rows and C
// columns (R, C <= N) is therefore interleaved in R + C cycles, where a
// bit-serial interleaver needs 2*R*C. Before a word is stored, an
// intra-row permutation reorders its bits. After a column is read, an
// intra-column permutation reorders the bits read. A control LUT keeps one
// entry per row and per column for each mode, and the entry chooses the
// permutation for that row or column. The block size is set with n_rows
// and n_cols. Rows and columns beyond them are switched off: a write to
// such a row is ignored, such columns are stored as 0, and reading such a
// column returns 0.
//
// Permutations and table: each entry is a rotation amount within the
// active width. A row word (its C active bits) is rotated left by the
// amount before storing. A column word (its R active bits) is rotated left
// by its amount after reading. The LUT is computed, not stored as data:
// mode 0 uses no rotation (a plain row/column interleaver). In mode m
// (1..3), row r uses (m*r) mod C and column c uses (m*(c+1)) mod R.
//
// Interface and timing: we with addr = row writes din into that row on the
// rising edge. re with addr = column loads dout with the permuted column on
// the rising edge (one cycle of latency). Bit r of the column word is the
// bit of row r. n_rows and n_cols are 1..N and must stay constant during a
// block. The data bus, address bus, mode input, control LUT, the two
// permutation blocks, the row-write/column-read matrix and the switching
// off of unused rows and columns follow the document's description. The
// rotation rule of the LUT is a choice made here, because the document
// gives no permutation tables.
module matrix_interleaver #(
  parameter int unsigned N = 8  // rows = columns = data bus width
) (
  input  logic                 clk,
  input  logic [1:0]           mode,    // permutation scheme
  input  logic [$clog2(N):0]   n_rows,  // active rows R (1..N)
  input  logic [$clog2(N):0]   n_cols,  // active columns C (1..N)
  input  logic                 we,      // write row addr
  input  logic                 re,      // read column addr
  input  logic [$clog2(N)-1:0] addr,    // row (write) or column (read)
  input  logic [N-1:0]         din,
  output logic [N-1:0]         dout
);

  localparam int unsigned LW = $clog2(N);

  logic [N-1:0] mem [N];  // mem[row][col]

  // v mod w for v < 4N (w >= 1), by restoring division: subtract w*2^k
  // wherever it fits, for k from high to low.
  function automatic logic [LW:0] mod_w(input logic [LW+2:0] v, input logic [LW:0] w);
    logic [2*LW+4:0] t;
    t = (2*LW+5)'(v);
    for (int k = LW + 2; k >= 0; k--)
      if (w != '0 && t >= ((2*LW+5)'(w) << k)) t = t - ((2*LW+5)'(w) << k);
    return (LW+1)'(t);
  endfunction

  // Rotate the low w bits of v left by a (a < w); bits at w and above are 0.
  function automatic logic [N-1:0] rotl_w(input logic [N-1:0] v, input logic [LW:0] a,
                                          input logic [LW:0] w);
    logic [N-1:0]  o;
    logic [LW+1:0] idx;
    for (int c = 0; c < N; c++) begin
      idx = (LW+2)'(c) + (LW+2)'(w) - (LW+2)'(a);
      if (idx >= (LW+2)'(w)) idx = idx - (LW+2)'(w);
      o[c] = ((LW+1)'(c) < w) ? v[LW'(idx)] : 1'b0;
    end
    return o;
  endfunction

  // Control LUT: rotation of row idx (is_col = 0) or column idx (is_col = 1).
  function automatic logic [LW:0] ctrl_lut(input logic [1:0] m, input logic is_col,
                                           input logic [LW-1:0] idx,
                                           input logic [LW:0] rows, input logic [LW:0] cols);
    logic [LW+2:0] prod;
    prod = (LW+3)'(m) * (is_col ? (LW+3)'(idx) + (LW+3)'(1) : (LW+3)'(idx));
    return mod_w(prod, is_col ? rows : cols);
  endfunction

  logic [N-1:0] row_perm, col_word, col_perm;
  logic         row_on, col_on;

  always_comb begin
    row_on   = ((LW+1)'(addr) < n_rows);
    col_on   = ((LW+1)'(addr) < n_cols);
    row_perm = rotl_w(din, ctrl_lut(mode, 1'b0, addr, n_rows, n_cols), n_cols);
    for (int r = 0; r < N; r++)
      col_word[r] = mem[r][addr];
    col_perm = rotl_w(col_word, ctrl_lut(mode, 1'b1, addr, n_rows, n_cols), n_rows);
  end

  always_ff @(posedge clk) begin
    if (we && row_on) mem[addr] <= row_perm;
    if (re) dout <= col_on ? col_perm : '0;
  end

endmodule

// tb_matrix_interleaver: writes random blocks of R x C bits (full 8x8 and
// random smaller sizes) row by row and reads them column by column, in each
// of the four modes. Every column word is compared with a bit-level model
// of the permutations: the C active bits of row r are rotated left by
// (m*r) mod C before storing, and the R active bits of column c are
// rotated left by (m*(c+1)) mod R after reading. The test also checks that
// a block takes R + C cycles, that mode 0 at 8x8 is a plain transpose and
// that columns at C and above read as 0.
module tb_matrix_interleaver;
  localparam int N = 8;

  logic         clk = 0, we, re;
  logic [1:0]   mode;
  logic [3:0]   n_rows, n_cols;
  int           R, C;
  logic [2:0]   addr;
  logic [N-1:0] din, dout;
  logic [N-1:0] rows [N];
  int checks = 0, failures = 0;

  matrix_interleaver #(.N(N)) dut (.clk, .mode, .n_rows, .n_cols, .we, .re, .addr, .din, .dout);

  always #5 clk = ~clk;

  // stored bit at (r, c) and expected output bit b of column c
  function automatic bit stored(input int m, input int r, input int c);
    int a;
    if (c >= C || r >= R) return 0;
    a = (m * r) % C;
    return rows[r][(c - a + C) % C];
  endfunction

  function automatic logic [N-1:0] col_expect(input int m, input int c);
    logic [N-1:0] w;
    int a;
    w = '0;
    if (c >= C) return w;
    a = (m * (c + 1)) % R;
    for (int b = 0; b < R; b++) w[b] = stored(m, (b - a + R) % R, c);
    return w;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    we = 0; re = 0; addr = 0; din = 0; mode = 0;
    @(posedge clk); #1;
    for (int blk = 0; blk < 40; blk++) begin
      mode = 2'(blk % 4);
      R = (blk < 8) ? N : $urandom_range(1, N);
      C = (blk < 8) ? N : $urandom_range(1, N);
      n_rows = 4'(R); n_cols = 4'(C);
      for (int r = 0; r < N; r++) rows[r] = '0;
      cycles = 0;
      for (int r = 0; r < R; r++) begin
        rows[r] = N'($urandom);
        we = 1; addr = 3'(r); din = rows[r];
        @(posedge clk); #1; cycles++;
      end
      we = 0;
      for (int c = 0; c < C; c++) begin
        re = 1; addr = 3'(c);
        @(posedge clk); #1; cycles++;
        checks++;
        if (dout != col_expect(mode, c)) begin
          failures++;
          $display("mode %0d col %0d: got %b want %b", mode, c, dout, col_expect(mode, c));
        end
        if (mode == 0 && R == N && C == N) begin
          logic [N-1:0] tcol;
          for (int r = 0; r < N; r++) tcol[r] = rows[r][c];
          checks++;
          if (dout != tcol) failures++;
        end
      end
      // a switched-off column reads as 0
      if (C < N) begin
        re = 1; addr = 3'(N - 1);
        @(posedge clk); #1;
        checks++;
        if (dout != '0) failures++;
      end
      re = 0;
      checks++;
      if (cycles != R + C) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

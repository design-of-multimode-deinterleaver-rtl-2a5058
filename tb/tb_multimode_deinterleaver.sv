// tb_multimode_deinterleaver: end-to-end test of the streaming
// (de)interleaver at its default parameters.
//
// Random bits are streamed in with random gaps in in_valid. The test walks
// through all eight (modulation, direction) pairs and comes back to some,
// changing the request only while input is being accepted. A cycle-level
// model of the block protocol (pre-computation cycle, block boundaries,
// drain block on a change) predicts in_ready, draining and cur_mode in
// every cycle, and which bit must come out when. Output bit t of a block
// must be input bit j_t (deinterleave) or k_t (interleave) of the previous
// block, computed from the equations. It must appear exactly one cycle
// after the step at position t of the following block. The generator
// addresses and the 802.11n stream address are also checked every cycle,
// with random stream index and bandwidth. A short run of the matrix
// interleaver checks its side of the design. Each mechanism (stall, drain,
// mode switch, direction switch, every modulation in both directions,
// rotated streams at both bandwidths, matrix transfer) is counted, and one
// that never happens counts as a failure.
module tb_multimode_deinterleaver;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 0, clr;
  mod_t          mod_typ, cur_mode;
  logic          deint, in_valid, in_ready, out_valid, draining;
  logic [0:0]    in_data, out_data;
  logic [1:0]    iss;
  logic          bw40, gen_valid;
  logic [AW-1:0] gen_j_addr, gen_k_addr;
  logic [9:0]    stream_addr;
  logic [1:0]    mi_mode;
  logic [3:0]    mi_rows, mi_cols;
  logic          mi_we, mi_re;
  logic [2:0]    mi_addr;
  logic [7:0]    mi_din, mi_dout;

  int checks = 0, failures = 0;

  multimode_deinterleaver dut (
    .clk, .clr, .mod_typ, .deint, .in_valid, .in_ready, .in_data, .out_valid,
    .out_data, .cur_mode, .draining, .iss, .bw40, .gen_valid, .gen_j_addr,
    .gen_k_addr, .stream_addr, .mi_mode, .mi_rows, .mi_cols, .mi_we, .mi_re, .mi_addr, .mi_din,
    .mi_dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  bit m_pre, m_drain, m_pending, m_rd_dir, m_dir;
  int m_mode, m_rd_mode, m_pos, m_nblocks;
  bit in_blk [512];
  bit rd_blk [512];
  bit exp_valid, exp_bit;
  // mechanism counters
  int n_stall, n_drain, n_mode_switch, n_dir_switch, n_rot20, n_rot40, n_matrix;
  int n_blk [2][4];

  // request plan: (mode, direction) pairs
  int plan_mode [12] = '{0, 1, 2, 3, 3, 2, 1, 0, 2, 3, 0, 1};
  int plan_dir  [12] = '{1, 1, 1, 1, 0, 0, 0, 0, 1, 1, 1, 0};
  int plan_idx;

  initial begin
    clr = 1; in_valid = 0; in_data = 0; iss = 0; bw40 = 0;
    plan_idx = 0;
    mod_typ = mod_t'(plan_mode[0]); deint = plan_dir[0][0];
    m_pre = 1; m_drain = 0; m_pending = 0; m_pos = 0; m_mode = 0; m_dir = 0;
    m_nblocks = 0; exp_valid = 0; exp_bit = 0;
    n_stall = 0; n_drain = 0; n_mode_switch = 0; n_dir_switch = 0;
    n_rot20 = 0; n_rot40 = 0;
    foreach (n_blk[d, m]) n_blk[d][m] = 0;
    repeat (2) @(posedge clk);
    #1 clr = 0;
    forever begin
      bit step;
      int n, t;
      // drive inputs for this cycle
      in_valid = ($urandom_range(5) != 0);
      in_data  = 1'($urandom);
      iss      = 2'($urandom);
      bw40     = 1'($urandom);
      // move to the next request after two blocks in the current one
      if (!m_pre && !m_drain && m_nblocks >= 2 && plan_idx < 11) begin
        plan_idx++;
        mod_typ = mod_t'(plan_mode[plan_idx]);
        deint   = plan_dir[plan_idx][0];
        m_nblocks = 0;
      end
      #1;
      // compare outputs with the model
      check(out_valid == exp_valid, "out_valid");
      if (exp_valid) check(out_data[0] == exp_bit, "out_data");
      check(in_ready == (!m_pre && !m_drain), "in_ready");
      check(draining == m_drain, "draining");
      check(gen_valid == !m_pre, "gen_valid");
      if (!m_pre) begin
        n = ref_n(m_mode);
        check(int'(cur_mode) == m_mode, "cur_mode");
        check(int'(gen_j_addr) == ref_jk(m_mode, m_pos), $sformatf("interleaver address pos %0d mode %0d got %0d want %0d step %0d", m_pos, m_mode, gen_j_addr, ref_jk(m_mode, m_pos), in_valid));
        check(int'(gen_k_addr) == ref_kj(m_mode, m_pos), "deinterleaver address");
        check(int'(stream_addr) ==
              ref_rot(ref_jk(m_mode, m_pos), n, ref_nbpsc(m_mode), iss, bw40),
              "stream address");
        if (iss != 0) begin
          if (bw40) n_rot40++;
          else      n_rot20++;
        end
        if (in_ready && !in_valid) n_stall++;
      end
      step = !m_pre && (m_drain || in_valid);
      // model: output of the next cycle
      exp_valid = step && m_pending;
      if (exp_valid) begin
        t = m_rd_dir ? ref_jk(m_rd_mode, m_pos) : ref_kj(m_rd_mode, m_pos);
        exp_bit = rd_blk[t];
      end
      // model: state after the clock edge
      if (m_pre) begin
        m_pre = 0; m_mode = int'(mod_typ); m_dir = deint; m_pos = 0;
      end else if (step) begin
        n = ref_n(m_mode);
        if (!m_drain) in_blk[m_pos] = in_data[0];
        if (m_pos == n - 1) begin
          m_pos = 0;
          if (m_drain) begin
            m_drain = 0; m_pending = 0;
            if (int'(mod_typ) != m_mode) begin m_pre = 1; n_mode_switch++; end
            if (deint != m_dir) n_dir_switch++;
            m_dir = deint;
          end else begin
            rd_blk = in_blk; m_rd_mode = m_mode; m_rd_dir = m_dir;
            m_pending = 1;
            m_nblocks++;
            n_blk[m_dir][m_mode]++;
            if (int'(mod_typ) != m_mode || deint != m_dir) begin
              m_drain = 1; n_drain++;
            end
          end
        end else m_pos++;
      end
      @(posedge clk); #1;
      if (plan_idx == 11 && m_nblocks >= 2) break;
    end
    check(out_valid == exp_valid, "last out_valid");
    if (exp_valid) check(out_data[0] == exp_bit, "last out_data");
    // every mechanism must have happened
    check(n_stall > 0, "stall never happened");
    check(n_drain > 0, "drain never happened");
    check(n_mode_switch > 0, "mode switch never happened");
    check(n_dir_switch > 0, "direction switch never happened");
    check(n_rot20 > 0 && n_rot40 > 0, "stream rotation not exercised");
    foreach (n_blk[d, m]) check(n_blk[d][m] > 0, "a (direction, modulation) pair never ran");
    wait (n_matrix == 8);
    $display("stalls %0d, drains %0d, mode switches %0d, direction switches %0d",
             n_stall, n_drain, n_mode_switch, n_dir_switch);
    $display("rotated stream addresses: 20 MHz %0d, 40 MHz %0d; matrix blocks %0d",
             n_rot20, n_rot40, n_matrix);
    for (int d = 0; d < 2; d++)
      $display("%s blocks per modulation: %0d %0d %0d %0d", d ? "deinterleave" : "interleave",
               n_blk[d][0], n_blk[d][1], n_blk[d][2], n_blk[d][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------- matrix interleaver
  logic [7:0] rows [8];

  initial begin
    int R, C, m;
    n_matrix = 0;
    mi_mode = 0; mi_rows = 4'd8; mi_cols = 4'd8; mi_we = 0; mi_re = 0; mi_addr = 0; mi_din = 0;
    @(negedge clr);
    for (int blk = 0; blk < 8; blk++) begin
      @(posedge clk); #1;
      m = blk % 4;
      R = (blk < 4) ? 8 : $urandom_range(1, 8);
      C = (blk < 4) ? 8 : $urandom_range(1, 8);
      mi_mode = 2'(m); mi_rows = 4'(R); mi_cols = 4'(C);
      for (int r = 0; r < R; r++) begin
        rows[r] = 8'($urandom);
        mi_we = 1; mi_addr = 3'(r); mi_din = rows[r];
        @(posedge clk); #1;
      end
      mi_we = 0;
      for (int c = 0; c < C; c++) begin
        logic [7:0] w;
        int ac;
        mi_re = 1; mi_addr = 3'(c);
        @(posedge clk); #1;
        // column c: bit b holds row (b - ac) mod R, whose stored bit at c is
        // input bit (c - (m*r) mod C) mod C of that row
        ac = (m * (c + 1)) % R;
        w = '0;
        for (int b = 0; b < R; b++) begin
          int r;
          r = (b - ac + R) % R;
          w[b] = rows[r][(c - (m * r) % C + C) % C];
        end
        check(mi_dout == w, "matrix interleaver column");
      end
      mi_re = 0;
      n_matrix++;
    end
  end
endmodule

// tb_preset_logic: drives the preset state machine with random enables and
// mode requests. A counter model in the testbench checks the column and row
// counters, the row-start load and its value (the next row index, 0 after
// the last row), block_last, the pre-computation cycle after clr and after
// a mode change, and that a new mode is taken up only at a block boundary.
module tb_preset_logic;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic             clk = 0, clr, en;
  mod_t             mod_typ, mode;
  logic             exec, step, load, blk_last;
  logic [ROW_W-1:0] load_row, row;
  logic [COL_W-1:0] col;
  int checks = 0, failures = 0;
  int m_col, m_row, m_mode, n_pre, n_switch;
  bit m_pre;

  preset_logic dut (.clk, .clr, .en, .mod_typ, .mode, .exec, .step, .load,
                    .load_row, .col, .row, .blk_last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s (col %0d row %0d mode %0d)", $time, what, col, row, mode);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows;
    clr = 1; en = 0; mod_typ = MOD_QAM16;
    @(posedge clk); #1 clr = 0;
    m_pre = 1; m_col = 0; m_row = 0; m_mode = 0; n_pre = 0; n_switch = 0;
    for (int t = 0; t < 12000; t++) begin
      en = ($urandom_range(5) != 0);
      if ($urandom_range(400) == 0) mod_typ = mod_t'($urandom_range(3));
      #1;
      rows = ref_n(m_mode) / 16;
      check(exec == !m_pre, "exec");
      if (m_pre) begin
        check(load && load_row == 0, "pre-computation load");
      end else begin
        check(int'(col) == m_col && int'(row) == m_row, "counters");
        check(int'(mode) == m_mode, "mode");
        check(blk_last == (m_col == 15 && m_row == rows - 1), "blk_last");
        check(load == (en && m_col == 15), "load");
        if (load) check(int'(load_row) == ((m_row == rows - 1) ? 0 : m_row + 1), "load_row");
        check(step == (en && m_col != 15), "step");
      end
      @(posedge clk); #1;
      // model update
      if (m_pre) begin
        m_pre = 0; m_mode = int'(mod_typ); m_col = 0; m_row = 0; n_pre++;
      end else if (en) begin
        if (m_col == 15) begin
          m_col = 0;
          if (m_row == rows - 1) begin
            m_row = 0;
            if (int'(mod_typ) != m_mode) begin m_pre = 1; n_switch++; end
          end else m_row++;
        end else m_col++;
      end
    end
    check(n_switch > 2, "mode switches happened");
    $display("pre-computation cycles %0d, mode switches %0d", n_pre, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_read_counter: runs the sequential counter in every mode with random
// idle cycles and checks that it counts 0..N-1, wraps at the block size of
// the mode, holds while idle and restarts on start.
module tb_read_counter;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 0, clr, start, en;
  mod_t          mode;
  logic [AW-1:0] count;
  int checks = 0, failures = 0;
  int expect_cnt;

  read_counter dut (.clk, .clr, .start, .en, .mode, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; start = 0; en = 0; mode = MOD_BPSK;
    @(posedge clk); #1 clr = 0;
    for (int m = 0; m < 4; m++) begin
      mode = mod_t'(m);
      start = 1; @(posedge clk); #1 start = 0;
      expect_cnt = 0;
      for (int t = 0; t < 2 * ref_n(m) + 7; t++) begin
        en = ($urandom_range(4) != 0);
        checks++;
        if (int'(count) != expect_cnt) begin
          failures++;
          $display("mode %0d t %0d: count %0d want %0d", m, t, count, expect_cnt);
        end
        @(posedge clk); #1;
        if (en) expect_cnt = (expect_cnt + 1) % ref_n(m);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sel_generator: pulses the block-end input at random and checks that
// the bank select flips exactly once per pulse and starts at bank 0.
module tb_sel_generator;
  logic clk = 0, clr, blk_end, sel;
  logic want;
  int checks = 0, failures = 0;

  sel_generator dut (.clk, .clr, .blk_end, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; blk_end = 0;
    @(posedge clk); #1 clr = 0;
    want = 0;
    for (int t = 0; t < 200; t++) begin
      checks++;
      if (sel != want) begin
        failures++;
        $display("t %0d: sel %0d want %0d", t, sel, want);
      end
      blk_end = ($urandom_range(2) == 0);
      @(posedge clk); #1;
      if (blk_end) want = ~want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

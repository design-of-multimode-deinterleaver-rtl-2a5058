// tb_qam16_sel: checks the 16-QAM step select against the reference
// interleaver sequence. For each of the 12 rows it loads the row index,
// steps through the 16 columns, and checks that the step the select picks
// (13 or 11) equals j_{k+1} - j_k of equations (1)-(2) with N = 192.
module tb_qam16_sel;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic             clk = 0, clr, load, step, sel;
  logic [ROW_W-1:0] load_row;
  int checks = 0, failures = 0;

  qam16_sel dut (.clk, .clr, .load, .load_row, .step, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; load = 0; step = 0; load_row = '0;
    @(posedge clk); #1 clr = 0;
    for (int r = 0; r < 12; r++) begin
      load = 1; load_row = ROW_W'(r);
      @(posedge clk); #1 load = 0;
      for (int c = 0; c < 15; c++) begin
        int k, want;
        k = 16 * r + c;
        want = ref_jk(2, k + 1) - ref_jk(2, k);
        checks++;
        if ((sel ? 11 : 13) != want) begin
          failures++;
          $display("row %0d col %0d: sel=%0d, want step %0d", r, c, sel, want);
        end
        // random idle cycles must not change the select
        if ($urandom_range(3) == 0) @(posedge clk);
        #1 step = 1;
        @(posedge clk); #1 step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

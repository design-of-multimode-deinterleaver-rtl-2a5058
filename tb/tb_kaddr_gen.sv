// tb_kaddr_gen: checks the deinterleaver address generator against
// equations (3)-(4). For each modulation it runs three blocks with random
// idle cycles and compares every address with k_j from the reference
// model. It also checks that k_j inverts the interleaver (k_{j_k} = k),
// blk_last, and the single pre-computation cycle on a mode change.
module tb_kaddr_gen;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 0, clr, en;
  mod_t          mod_typ, mode;
  logic          valid, blk_last;
  logic [AW-1:0] k_addr;
  int checks = 0, failures = 0;
  int seen [512];

  kaddr_gen dut (.clk, .clr, .en, .mod_typ, .mode, .valid, .k_addr, .blk_last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s (mode %0d k %0d)", $time, what, mode, k_addr);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int j, pre_cycles;
    clr = 1; en = 0; mod_typ = MOD_BPSK;
    @(posedge clk); #1 clr = 0;
    for (int m = 0; m < 4; m++) begin
      mod_typ = mod_t'(m);
      en = 1;
      pre_cycles = 0;
      #1;
      while (!valid || int'(mode) != m) begin
        if (!valid) pre_cycles++;
        @(posedge clk); #1;
      end
      check(pre_cycles == 1, "one pre-computation cycle");
      // the reference deinterleaver must invert the interleaver
      for (int k = 0; k < ref_n(m); k++)
        check(ref_kj(m, ref_jk(m, k)) == k, "reference k_j inverts j_k");
      for (int g = 0; g < 3 * ref_n(m); g++) begin
        j = g % ref_n(m);
        if (j == 0) foreach (seen[i]) seen[i] = 0;
        do begin
          en = ($urandom_range(3) != 0);
          #1;
          check(valid, "valid");
          check(int'(k_addr) == ref_kj(m, j), "address k_j");
          check(blk_last == (j == ref_n(m) - 1), "blk_last");
          if (j == ref_n(m) - 1 && g / ref_n(m) == 2) mod_typ = mod_t'((m + 1) % 4);
          @(posedge clk); #1;
        end while (!en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_addr_gen: checks the address generator against equations (1)-(2).
//
// 1. The first 32 write addresses of each modulation are compared with the
//    published address table (rows of 8 values below).
// 2. For each modulation, three whole blocks run with random idle cycles,
//    and every write address is compared with j_k from the reference model.
//    The sequential address is compared with k, blk_last with k = N-1, and
//    the bank select with the block parity.
// 3. Rate: with en held high, one new address per clock and exactly one
//    pre-computation cycle after clr and after a mode change.
module tb_addr_gen;
  import deint_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 0, clr, en;
  mod_t          mod_typ, mode;
  logic          valid, sel, blk_last;
  logic [AW-1:0] write_addr, read_addr;
  int checks = 0, failures = 0;

  addr_gen dut (.clk, .clr, .en, .mod_typ, .mode, .valid, .write_addr,
                .read_addr, .sel, .blk_last);

  always #5 clk = ~clk;

  // Published table: first 32 write addresses per modulation.
  int table_ref [4][32] = '{
    '{0,3,6,9,12,15,18,21, 24,27,30,33,36,39,42,45, 1,4,7,10,13,16,19,22, 25,28,31,34,37,40,43,46},
    '{0,6,12,18,24,30,36,42, 48,54,60,66,72,78,84,90, 1,7,13,19,25,31,37,43, 49,55,61,67,73,79,85,91},
    '{0,13,24,37,48,61,72,85, 96,109,120,133,144,157,168,181, 1,12,25,36,49,60,73,84, 97,108,121,132,145,156,169,180},
    '{0,20,37,54,74,91,108,128, 145,162,182,199,216,236,253,270, 1,18,38,55,72,92,109,126, 146,163,180,200,217,234,254,271}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s (mode %0d wa %0d ra %0d)", $time, what, mode, write_addr, read_addr);
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
    int k, blk, pre_cycles;
    bit sel0;
    clr = 1; en = 0; mod_typ = MOD_BPSK;
    @(posedge clk); #1 clr = 0;
    for (int m = 0; m < 4; m++) begin
      // switch: wait for the pre-computation cycle of the new mode
      mod_typ = mod_t'(m);
      en = 1;
      pre_cycles = 0;
      #1;
      while (!valid || int'(mode) != m) begin
        if (!valid) pre_cycles++;
        @(posedge clk); #1;
      end
      check(pre_cycles == 1, "one pre-computation cycle");
      sel0 = sel;
      // part 1: published table, en held high (one address per clock)
      for (k = 0; k < 32; k++) begin
        check(valid && int'(write_addr) == table_ref[m][k], "published table");
        @(posedge clk); #1;
      end
      // part 2: rest of three blocks with random idle cycles
      for (int g = 32; g < 3 * ref_n(m); g++) begin
        k   = g % ref_n(m);
        blk = g / ref_n(m);
        do begin
          en = ($urandom_range(3) != 0);
          #1;
          check(valid, "valid");
          check(int'(write_addr) == ref_jk(m, k), "write address j_k");
          check(int'(read_addr) == k, "read address");
          check(blk_last == (k == ref_n(m) - 1), "blk_last");
          check(sel == (sel0 ^ blk[0]), "bank select");
          if (k == ref_n(m) - 1 && blk == 2) mod_typ = mod_t'((m + 1) % 4);
          @(posedge clk); #1;
        end while (!en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

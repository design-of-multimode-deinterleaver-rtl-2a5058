// tb_deint_memory: random writes and reads on both banks of the ping-pong
// memory, compared with an array model. It checks the one-cycle read
// latency, that rdata holds while re is low, and that a write to one bank
// leaves the other untouched.
module tb_deint_memory;
  localparam int DW = 4, AW = 9, DEPTH = 512;

  logic          clk = 0, we, wbank, re, rbank;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata, want, held;
  logic [DW-1:0] model [2][DEPTH];
  int checks = 0, failures = 0;
  bit read_pending;

  deint_memory #(.DW(DW), .AW(AW), .DEPTH(DEPTH)) dut (
    .clk, .we, .wbank, .waddr, .wdata, .re, .rbank, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill both banks so every read has a known value
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        we = 1; wbank = b[0]; waddr = AW'(a); wdata = DW'($urandom);
        model[b][a] = wdata;
        @(posedge clk); #1;
      end
    we = 0;
    read_pending = 0;
    for (int t = 0; t < 5000; t++) begin
      we = $urandom_range(1); wbank = $urandom_range(1);
      waddr = AW'($urandom); wdata = DW'($urandom);
      re = $urandom_range(1); rbank = $urandom_range(1); raddr = AW'($urandom);
      if (re) want = model[rbank][raddr];
      held = rdata;
      @(posedge clk); #1;
      if (we) model[wbank][waddr] = wdata;
      checks++;
      if (re ? (rdata != want) : (rdata != held)) begin
        failures++;
        $display("t %0d: rdata %0h", t, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

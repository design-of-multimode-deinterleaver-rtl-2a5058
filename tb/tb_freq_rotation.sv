// tb_freq_rotation: sweeps the rotation stage exhaustively: every address J
// for the four 802.11a block sizes and the real 802.11n stream block sizes
// (20 MHz: 52 subcarriers, 40 MHz: 108 subcarriers, times N_BPSCS), every
// spatial stream and both bandwidths. Each result is compared with
// (J - F*N_ROT*N_BPSCS) mod N from the reference model.
module tb_freq_rotation;
  import tb_ref_pkg::*;

  logic [9:0] j_in, n_cbpss, rot_addr;
  logic [2:0] n_bpscs;
  logic [1:0] iss;
  logic       bw40;
  int checks = 0, failures = 0;

  freq_rotation #(.RW(10)) dut (.j_in, .n_cbpss, .n_bpscs, .iss, .bw40, .rot_addr);

  task automatic sweep(input int n, input int nb, input bit w40);
    for (int s = 0; s < 4; s++)
      for (int j = 0; j < n; j++) begin
        j_in = 10'(j); n_cbpss = 10'(n); n_bpscs = 3'(nb); iss = 2'(s); bw40 = w40;
        #1;
        checks++;
        if (int'(rot_addr) != ref_rot(j, n, nb, s, w40)) begin
          failures++;
          if (failures < 10)
            $display("N %0d nb %0d iss %0d bw40 %0d J %0d: got %0d want %0d",
                     n, nb, s, w40, j, rot_addr, ref_rot(j, n, nb, s, w40));
        end
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int w = 0; w < 2; w++) begin
        sweep(ref_n(m), ref_nbpsc(m), w[0]);                      // 802.11a sizes
        sweep((w ? 108 : 52) * ref_nbpsc(m), ref_nbpsc(m), w[0]);  // 802.11n sizes
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

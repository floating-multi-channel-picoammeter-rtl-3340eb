// tb_pam_workloads: the receiver in the configurations beyond the default
// that the system is meant for, each as a complete system with node and
// FX2LP models (pam_system_harness), running side by side:
//   - 10 channels, one per GEM electrode plus the drift cathode, 1 kHz
//     sampling, 2 kHz packets;
//   - 16 channels, every input of the optical receiver board;
//   - 8 channels with the nodes at their 5 kHz maximum sampling rate and the
//     packet rate raised to 10 kHz, twice the sampling rate.
// Each harness checks packet framing, checksums and that no reading is lost.
module tb_pam_workloads;
  logic done_a, done_b, done_c;
  int   ch_a, ch_b, ch_c, f_a, f_b, f_c;

  pam_system_harness #(.N_CH(10), .SAMPLE_HZ(1_000), .PACKET_HZ(2_000), .RUN_MS(24), .STALL_MS(13))
    u_ten (.done(done_a), .checks(ch_a), .failures(f_a));
  pam_system_harness #(.N_CH(16), .SAMPLE_HZ(1_000), .PACKET_HZ(2_000), .RUN_MS(20), .STALL_MS(8))
    u_sixteen (.done(done_b), .checks(ch_b), .failures(f_b));
  pam_system_harness #(.N_CH(8), .SAMPLE_HZ(5_000), .PACKET_HZ(10_000), .RUN_MS(10), .STALL_MS(4))
    u_fast (.done(done_c), .checks(ch_c), .failures(f_c));

  initial begin
    #40ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch_a + ch_b + ch_c, f_a + f_b + f_c + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", ch_a + ch_b + ch_c, f_a + f_b + f_c);
    $finish;
  end
endmodule

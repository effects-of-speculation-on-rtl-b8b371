// tb_isq_config_sweep: the MIQ/RIQ size configurations of the study
// (32/32, 48/24, 48/32, 48/48, 64/64, issue-to-execute latency 9) each run
// the same synthetic program (isq_core_model). Each run must release every
// instruction with correct operands and keep each queue within its size.
// The cycle counts are printed with the IPC relative to the 48/32 default.
// The real benchmarks are not available, so the numbers show trends of this
// synthetic program only.
module tb_isq_config_sweep;
  localparam int NC = 5;
  localparam int N_INSTR = 2000;
  localparam int MIQS [NC] = '{32, 48, 48, 48, 64};
  localparam int RIQS [NC] = '{32, 24, 32, 48, 64};
  bit  done     [NC];
  int  cycles   [NC], checks_c [NC], fails_c [NC], occ_m [NC], occ_r [NC], rep [NC];
  int  checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    isq_core_model #(.MIQ(MIQS[c]), .RIQ(RIQS[c]), .N_INSTR(N_INSTR)) u_core (
      .done(done[c]), .cycles(cycles[c]), .checks(checks_c[c]), .failures(fails_c[c]),
      .occ_miq_sum(occ_m[c]), .occ_riq_sum(occ_r[c]), .replay_cycles(rep[c])
    );
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #100;
      all = 1;
      for (int c = 0; c < NC; c++) all &= done[c];
    end while (!all);
    for (int c = 0; c < NC; c++) begin
      $display("MIQ/RIQ %0d/%0d: %0d cycles, IPC %0.3f (relative to 48/32: %0.1f%%), mean MIQ %0.1f RIQ %0.1f, replay cycles %0d",
               MIQS[c], RIQS[c], cycles[c], real'(N_INSTR) / cycles[c],
               100.0 * (real'(cycles[2]) / cycles[c] - 1.0),
               real'(occ_m[c]) / cycles[c], real'(occ_r[c]) / cycles[c], rep[c]);
      checks   += checks_c[c] + 1;
      failures += fails_c[c];
      if (cycles[c] < N_INSTR / 8) failures++;   // cannot beat 8 per cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

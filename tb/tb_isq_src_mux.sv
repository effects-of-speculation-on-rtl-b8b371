// tb_isq_src_mux: the issue group of the queue chosen by replay_req must
// appear on rf_issue one clock edge later, and nothing after reset.
module tb_isq_src_mux;
  import isq_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, replay_req;
  issue_t [L-1:0] miq_issue, riq_issue, rf_issue, exp_q;
  int checks = 0, failures = 0;

  isq_src_mux #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic issue_t rnd_issue(logic v);
    issue_t x;
    x = issue_t'({$urandom, $urandom, $urandom, $urandom});
    x.valid = v;
    return x;
  endfunction

  initial begin
    replay_req = 0; miq_issue = '0; riq_issue = '0;
    @(posedge clk); #1;
    checks++;
    if (rf_issue !== '0) failures++;
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      replay_req = $urandom_range(0, 1);
      for (int l = 0; l < L; l++) begin
        miq_issue[l] = rnd_issue(!replay_req && ($urandom_range(0, 1) == 1));
        riq_issue[l] = rnd_issue(replay_req && ($urandom_range(0, 1) == 1));
      end
      // grants fill lanes from 0 upward
      if (!miq_issue[0].valid) for (int l = 0; l < L; l++) miq_issue[l].valid = 0;
      if (!riq_issue[0].valid) for (int l = 0; l < L; l++) riq_issue[l].valid = 0;
      exp_q = replay_req ? riq_issue : miq_issue;
      @(posedge clk); #1;
      checks++;
      if (rf_issue !== exp_q) begin
        failures++;
        if (failures < 5) $display("t=%0d mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

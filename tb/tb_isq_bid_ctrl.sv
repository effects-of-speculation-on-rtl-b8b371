// tb_isq_bid_ctrl: all input combinations against the rule: the replay queue
// bids when it has a ready entry and its cross-queue latch is free; the main
// queue bids only when the replay queue has nothing ready and its own latch
// is free; never both.
module tb_isq_bid_ctrl;
  logic riq_any_ready, miq_pending, riq_pending, replay_req, miq_bid_en, riq_bid_en;
  int checks = 0, failures = 0;

  isq_bid_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic er, em;
      {riq_any_ready, miq_pending, riq_pending} = 3'(v);
      #1;
      er = riq_any_ready && !riq_pending;
      em = !riq_any_ready && !miq_pending;
      checks += 3;
      if (riq_bid_en !== er) failures++;
      if (miq_bid_en !== em) failures++;
      if (replay_req !== er) failures++;
      checks++;
      if (riq_bid_en && miq_bid_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

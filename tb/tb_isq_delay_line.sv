// tb_isq_delay_line: a random stream must come out exactly DEPTH cycles later
// (the issue-to-execute latency and the feedback delay are both 9 cycles).
module tb_isq_delay_line;
  localparam int D = 9, W = 12;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  isq_delay_line #(.DEPTH(D), .W(W)) dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // after reset the output is zero for D cycles
    for (int t = 0; t < 500; t++) begin
      din = W'($urandom);
      hist.push_back(din);
      @(posedge clk); #1;
      checks++;
      if (t < D - 1) begin
        if (dout !== '0) failures++;
      end else begin
        if (dout !== hist[t - (D - 1)]) begin
          failures++;
          if (failures < 5) $display("t=%0d dout=%h expected %h", t, dout, hist[t-(D-1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

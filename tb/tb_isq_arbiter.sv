// tb_isq_arbiter: random requests and limits against a reference that grants
// the lowest-indexed requests first, at most min(limit, LANES) of them.
module tb_isq_arbiter;
  localparam int N = 48, L = 8;
  logic [N-1:0] req, gnt;
  logic [$clog2(L+1)-1:0] limit;
  logic [L-1:0] lv;
  logic [L-1:0][$clog2(N)-1:0] li;
  int checks = 0, failures = 0;

  isq_arbiter #(.N(N), .LANES(L)) dut (.req, .limit, .gnt, .lane_valid(lv), .lane_idx(li));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] exp_g;
      int n, lane;
      req = {$urandom, $urandom};
      if (t % 4 == 0) req &= {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 7 == 0) req = '0;
      limit = 4'($urandom_range(0, L));
      #1;
      exp_g = '0; n = 0; lane = 0;
      for (int i = 0; i < N; i++)
        if (req[i] && n < int'(limit)) begin
          exp_g[i] = 1'b1;
          checks++;
          if (!lv[lane] || int'(li[lane]) != i) begin
            failures++;
            if (failures < 5) $display("lane %0d: idx %0d, expected %0d", lane, li[lane], i);
          end
          n++; lane++;
        end
      for (int k = lane; k < L; k++) begin
        checks++;
        if (lv[k]) failures++;
      end
      checks++;
      if (gnt !== exp_g) begin
        failures++;
        if (failures < 5) $display("gnt %h expected %h", gnt, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_isq_class_arbiter: random bids of random functional-unit classes
// against a reference walk in index order that grants while issue lanes and
// units of the bidder's class remain.
module tb_isq_class_arbiter;
  import isq_pkg::*;
  localparam int N = 48, L = 8;
  logic [N-1:0] req, gnt;
  fu_t  [N-1:0] cls;
  logic [L-1:0] lv;
  logic [L-1:0][$clog2(N)-1:0] li;
  int checks = 0, failures = 0, n_cap = 0;

  isq_class_arbiter #(.N(N), .LANES(L)) dut (.req, .cls, .gnt, .lane_valid(lv), .lane_idx(li));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int units [5];
    units = '{8, 2, 4, 8, 2};
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] exp_g;
      int used [5];
      int lane;
      req = {$urandom, $urandom};
      if (t % 3 == 0) req &= {$urandom, $urandom};
      for (int i = 0; i < N; i++) cls[i] = fu_t'($urandom_range(0, 4));
      #1;
      exp_g = '0; lane = 0;
      foreach (used[c]) used[c] = 0;
      for (int i = 0; i < N; i++)
        if (req[i] && lane < L) begin
          if (used[cls[i]] < units[cls[i]]) begin
            exp_g[i] = 1; used[cls[i]]++;
            checks++;
            if (!lv[lane] || int'(li[lane]) != i) failures++;
            lane++;
          end else n_cap++;
        end
      for (int k = lane; k < L; k++) begin checks++; if (lv[k]) failures++; end
      checks++;
      if (gnt !== exp_g) begin
        failures++;
        if (failures < 5) $display("t=%0d gnt %h expected %h", t, gnt, exp_g);
      end
    end
    checks++;
    if (n_cap == 0) failures++;   // the unit limit must have been hit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

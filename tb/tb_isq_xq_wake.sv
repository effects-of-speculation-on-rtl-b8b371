// tb_isq_xq_wake: the other queue's tags must reach the output one cycle
// late (cross-queue delay), win the multiplexer over the own tags and raise
// `pending`; tags depending on a load that misses in the latching cycle must
// be dropped and hit bits cleared.
module tb_isq_xq_wake;
  import isq_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, pending;
  wake_t [L-1:0] own_wake, other_wake, wake_sel, prev_other;
  ldmask_t hit_mask, miss_mask, prev_hit, prev_miss;
  int checks = 0, failures = 0;

  isq_xq_wake #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wake_t rnd_wake();
    wake_t w;
    w.valid = $urandom_range(0, 1);
    w.tag   = tag_t'($urandom);
    w.lat   = lat_t'($urandom_range(1, 4));
    w.dep   = '0;
    w.dep[$urandom_range(0, 63)] = ($urandom_range(0, 2) == 0);
    w.dep[$urandom_range(0, 63)] = ($urandom_range(0, 2) == 0);
    return w;
  endfunction

  initial begin
    own_wake = '0; other_wake = '0; hit_mask = '0; miss_mask = '0;
    @(posedge clk); #1 rst_n = 1;
    prev_other = '0; prev_hit = '0; prev_miss = '0;
    for (int t = 0; t < 1000; t++) begin
      wake_t [L-1:0] exp_held;
      logic exp_p;
      for (int l = 0; l < L; l++) begin
        own_wake[l]   = rnd_wake();
        other_wake[l] = (t % 3 == 0) ? wake_t'('0) : rnd_wake();
      end
      hit_mask = '0; miss_mask = '0;
      hit_mask[$urandom_range(0, 63)]  = 1'b1;
      miss_mask[$urandom_range(0, 63)] = ($urandom_range(0, 1) == 1);
      #1;
      // expected output from the previous cycle's other-queue lanes
      exp_p = 1'b0;
      for (int l = 0; l < L; l++) begin
        exp_held[l] = prev_other[l];
        exp_held[l].dep = prev_other[l].dep & ~prev_hit;
        if ((prev_other[l].dep & prev_miss) != '0) exp_held[l].valid = 1'b0;
        exp_p |= exp_held[l].valid;
      end
      checks += 2;
      if (pending !== exp_p) failures++;
      if (wake_sel !== (exp_p ? exp_held : own_wake)) begin
        failures++;
        if (failures < 5) $display("t=%0d wake_sel mismatch (pending=%0d)", t, exp_p);
      end
      prev_other = other_wake; prev_hit = hit_mask; prev_miss = miss_mask;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_processing_unit: self-checking test of the pipelined comparator array.
//
// The testbench plays the control unit. For each block it draws random
// sample and target bases (with a bias towards equal bases so that full and
// empty match vectors occur), then issues six loads, two lanes each. Half the
// blocks use the fixed operation schedule and the seven-cycle cadence; the
// other half use a random lane permutation, random operand order and random
// idle cycles between loads, so the lane tags and valid bits of the pipeline
// are exercised. The expected match vector is computed lane by lane in the
// testbench. It checks the vector, that match_valid pulses once, exactly
// two cycles after the last load edge (seven after the first for the fixed
// schedule), and that match holds between pulses. Driving and sampling are
// on the falling edge.
module tb_processing_unit;
  import dna_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  ctrl_t            ctrl;
  base_t            sample [LANES];
  base_t            target [LANES];
  logic [LANES-1:0] match;
  logic             match_valid;
  always #5 clk = ~clk;

  processing_unit dut (.clk, .rst_n, .ctrl, .sample, .target, .match, .match_valid);

  int sched0 [6] = '{0, 4, 2, 7, 11, 3};
  int sched1 [6] = '{10, 5, 8, 1, 6, 9};

  int checks = 0, failures = 0;
  int cyc = 0;   // number of rising edges so far
  int pulses = 0, fixed_blocks = 0, random_blocks = 0, all_match = 0, gaps = 0;
  logic [LANES-1:0] exp_q [$];
  int               due_q [$];
  logic [LANES-1:0] held;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Output monitor, sampled on the falling edge.
  always @(posedge clk) cyc <= cyc + 1;   // rising edges so far

  always @(negedge clk) begin
    if (rst_n) begin
      if (match_valid) begin
        pulses++;
        check(exp_q.size() > 0, "match_valid without a block");
        if (exp_q.size() > 0) begin
          logic [LANES-1:0] e;
          int d;
          e = exp_q.pop_front();
          d = due_q.pop_front();
          check(match == e, $sformatf("match %03h expected %03h", match, e));
          check(cyc == d, $sformatf("match_valid after edge %0d expected %0d", cyc, d));
          if (e == '1) all_match++;
        end
        held = match;
      end else if (pulses > 0) begin
        check(match == held, "match changed between pulses");
      end
    end
  end

  initial begin
    ctrl = '0;
    foreach (sample[i]) begin sample[i] = BASE_A; target[i] = BASE_A; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int  l0 [6], l1 [6];
      bit  s0 [6], s1 [6];
      int  perm [LANES];
      bit  fixed;
      int  first_cyc;
      logic [LANES-1:0] e;
      fixed = (n % 2 == 0);
      // operands
      for (int i = 0; i < LANES; i++) begin
        sample[i] = base_t'($urandom_range(0, 3));
        case ($urandom_range(0, 3))
          0, 1:    target[i] = sample[i];
          default: target[i] = base_t'($urandom_range(0, 3));
        endcase
        if (n % 17 == 5) target[i] = sample[i];
        e[i] = (sample[i] == target[i]);
      end
      // schedule
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int k = 0; k < 6; k++) begin
        l0[k] = fixed ? sched0[k] : perm[2*k];
        l1[k] = fixed ? sched1[k] : perm[2*k+1];
        s0[k] = fixed ? 1'b0 : 1'($urandom);
        s1[k] = fixed ? 1'b0 : 1'($urandom);
      end
      // loads
      first_cyc = cyc;
      for (int k = 0; k < 6; k++) begin
        if (!fixed) while ($urandom_range(0, 2) == 0) begin
          ctrl = '0;
          gaps++;
          @(negedge clk);
        end
        ctrl.load  = 1'b1;
        ctrl.lane0 = lane_t'(l0[k]);
        ctrl.lane1 = lane_t'(l1[k]);
        ctrl.swap0 = s0[k];
        ctrl.swap1 = s1[k];
        ctrl.last  = (k == 5);
        if (k == 5) begin
          exp_q.push_back(e);
          // slot 5 loads at edge cyc + 1; result at cyc + 2, output at cyc + 3
          due_q.push_back(cyc + 3);
          // latency from the first load edge (edge first_cyc + 1)
          if (fixed) check(cyc + 3 - (first_cyc + 1) == 7, "latency of the schedule is not 7 cycles");
        end
        @(negedge clk);
      end
      if (fixed) fixed_blocks++; else random_blocks++;
      // idle after the block, except for some back-to-back blocks
      ctrl = '0;
      if (n % 3 == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    ctrl = '0;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "blocks without a result");
    check(gaps > 0, "no gaps between loads");
    check(all_match > 0, "no all-match block");
    $display("pulses=%0d fixed=%0d random=%0d gaps=%0d all_match=%0d",
             pulses, fixed_blocks, random_blocks, gaps, all_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

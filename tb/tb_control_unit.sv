// tb_control_unit: self-checking test of the scheduling FSM.
//
// A model of the input registers raises blk_valid after a random wait (or
// at once, to get back-to-back blocks) and drops it the cycle after
// blk_release. Each cycle the testbench checks the control word against its
// own copy of the operation schedule (lane order of both operators, operand
// register order, last flag), that every block loads each of the 12 lanes
// exactly once in 6 consecutive cycles, that blk_release comes with the
// last load, that the state walks S6, S0..S5, S6, and that back-to-back
// blocks start 7 cycles apart. It fails if back-to-back starts or idle
// waiting never happened. Driving and sampling are on the falling edge.
module tb_control_unit;
  import dna_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   blk_valid, blk_release;
  ctrl_t  ctrl;
  state_t state;
  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .blk_valid, .blk_release, .ctrl, .state);

  // Schedule as read from the operation chart: lanes of operator 0 and 1
  // per slot, and whether the first operand register holds the target.
  int exp_l0 [6] = '{0, 4, 2, 7, 11, 3};
  int exp_l1 [6] = '{10, 5, 8, 1, 6, 9};
  bit exp_s0 [6] = '{1, 0, 0, 1, 0, 0};
  bit exp_s1 [6] = '{0, 0, 0, 0, 1, 0};

  int checks = 0, failures = 0;
  int blocks = 0, b2b = 0, idle_waits = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int  slot;          // slot of the next expected load, -1 when idle
    int  cyc, last_start;
    int  gap;
    bit  seen [LANES];
    state_t prev;
    blk_valid = 1'b0;
    slot = -1; cyc = 0; last_start = -100; gap = 3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev = S6;
    check(state == S6, "reset state is not S6");
    while (blocks < 60) begin
      // input register model: a new block after a random wait
      if (!blk_valid) begin
        if (gap == 0) blk_valid = 1'b1;
        else          gap--;
      end
      #1;
      if (ctrl.load) begin
        if (slot < 0) begin
          check(state == S6 && blk_valid, "block started outside S6 or without a block");
          if (cyc - last_start == 7) b2b++;
          check(cyc - last_start >= 7, "blocks started less than 7 cycles apart");
          last_start = cyc;
          slot = 0;
          foreach (seen[i]) seen[i] = 1'b0;
        end
        check(int'(ctrl.lane0) == exp_l0[slot] && int'(ctrl.lane1) == exp_l1[slot],
              $sformatf("slot %0d lanes %0d/%0d", slot, ctrl.lane0, ctrl.lane1));
        check(ctrl.swap0 == exp_s0[slot] && ctrl.swap1 == exp_s1[slot],
              $sformatf("slot %0d operand order", slot));
        check(ctrl.last == (slot == 5), $sformatf("slot %0d last flag", slot));
        check(blk_release == (slot == 5), $sformatf("slot %0d release", slot));
        if (int'(ctrl.lane0) < LANES) seen[ctrl.lane0] = 1'b1;
        if (int'(ctrl.lane1) < LANES) seen[ctrl.lane1] = 1'b1;
        if (slot == 5) begin
          foreach (seen[i]) check(seen[i], $sformatf("lane %0d never compared", i));
          blocks++;
          slot = -1;
        end else begin
          slot++;
        end
      end else begin
        check(slot < 0, $sformatf("load missing in slot %0d", slot));
        check(!blk_release, "release without load");
        if (state == S6 && prev == S6) idle_waits++;
      end
      prev = state;
      @(negedge clk);
      cyc++;
      // state walk
      if (prev == S6) check(state == S0 || state == S6, "S6 left to a state other than S0");
      else            check(int'(state) == int'(prev) + 1, $sformatf("state %0d after %0d", state, prev));
      if (blk_release_q) begin
        blk_valid = 1'b0;
        gap = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 12);
      end
    end
    check(b2b > 0, "no back-to-back blocks");
    check(idle_waits > 0, "never waited idle in S6");
    $display("blocks=%0d back_to_back=%0d idle_waits=%0d", blocks, b2b, idle_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // release as seen by the input registers at the rising edge
  logic blk_release_q;
  always_ff @(posedge clk) blk_release_q <= blk_release;

endmodule

// tb_dna_comparator_top: end-to-end test of the comparator framework.
//
// Two instances of the top run side by side, each with its own
// top_harness: one with the default bit-serial input, and one with 8 bits
// per transfer, where blocks arrive faster than the comparators finish
// them, so that input stalls and back-to-back blocks at the 7-cycle cadence
// occur. Every mechanism (input stall, back-to-back blocks, idle waiting,
// all-match block) must have happened at least once, otherwise a failure is
// counted.
module tb_dna_comparator_top;
  import dna_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // bit-serial instance
  logic             sdi1, sdi_valid1, sdi_ready1, match_valid1, done1;
  logic [LANES-1:0] match1;
  state_t           state1;
  int c1, f1, st1, bb1, iw1, am1;

  dna_comparator_top dut1 (
    .clk, .rst_n, .sdi(sdi1), .sdi_valid(sdi_valid1), .sdi_ready(sdi_ready1),
    .match(match1), .match_valid(match_valid1), .state(state1)
  );
  top_harness #(.SER_W(1), .BLOCKS(30)) h1 (
    .clk, .rst_n, .sdi(sdi1), .sdi_valid(sdi_valid1), .sdi_ready(sdi_ready1),
    .match(match1), .match_valid(match_valid1), .state(state1), .done(done1),
    .checks(c1), .failures(f1), .stalls(st1), .back_to_back(bb1),
    .idle_waits(iw1), .all_match(am1)
  );

  // 8-bit instance
  logic [7:0]       sdi8;
  logic             sdi_valid8, sdi_ready8, match_valid8, done8;
  logic [LANES-1:0] match8;
  state_t           state8;
  int c8, f8, st8, bb8, iw8, am8;

  dna_comparator_top #(.SER_W(8)) dut8 (
    .clk, .rst_n, .sdi(sdi8), .sdi_valid(sdi_valid8), .sdi_ready(sdi_ready8),
    .match(match8), .match_valid(match_valid8), .state(state8)
  );
  top_harness #(.SER_W(8), .BLOCKS(200)) h8 (
    .clk, .rst_n, .sdi(sdi8), .sdi_valid(sdi_valid8), .sdi_ready(sdi_ready8),
    .match(match8), .match_valid(match_valid8), .state(state8), .done(done8),
    .checks(c8), .failures(f8), .stalls(st8), .back_to_back(bb8),
    .idle_waits(iw8), .all_match(am8)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c8, f1 + f8 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done8);
    checks = c1 + c8; failures = f1 + f8;
    $display("SER_W=1: stalls=%0d back_to_back=%0d idle_waits=%0d all_match=%0d", st1, bb1, iw1, am1);
    $display("SER_W=8: stalls=%0d back_to_back=%0d idle_waits=%0d all_match=%0d", st8, bb8, iw8, am8);
    checks += 4;
    if (st8 == 0)       begin failures++; $display("FAIL no input stall"); end
    if (bb8 == 0)       begin failures++; $display("FAIL no back-to-back blocks"); end
    if (iw1 + iw8 == 0) begin failures++; $display("FAIL no idle wait"); end
    if (am1 + am8 == 0) begin failures++; $display("FAIL no all-match block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dna_comparator_full: the comparator framework at its default
// parameters (bit-serial input), taken through whole blocks end to end.
//
// top_harness streams 24 random blocks, the first eight as one continuous
// bit stream, and checks each match vector and the 7-cycle latency. This
// testbench also checks the input-bound rate: in a continuous stream a
// block is 48 serial bits, so results must come exactly 48 cycles apart.
module tb_dna_comparator_full;
  import dna_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             sdi, sdi_valid, sdi_ready, match_valid, done;
  logic [LANES-1:0] match;
  state_t           state;
  int c, f, st, bb, iw, am;

  dna_comparator_top dut (
    .clk, .rst_n, .sdi, .sdi_valid, .sdi_ready,
    .match, .match_valid, .state
  );
  top_harness #(.SER_W(1), .BLOCKS(24)) h (
    .clk, .rst_n, .sdi, .sdi_valid, .sdi_ready,
    .match, .match_valid, .state, .done,
    .checks(c), .failures(f), .stalls(st), .back_to_back(bb),
    .idle_waits(iw), .all_match(am)
  );

  int edges = 0, last = -1, at_48 = 0, pulses = 0;
  always @(posedge clk) begin
    edges <= edges + 1;
    if (match_valid) begin
      if (last >= 0 && edges - last == 48) at_48++;
      last   <= edges;
      pulses <= pulses + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    checks = c + 1; failures = f;
    $display("results=%0d spaced_48=%0d idle_waits=%0d all_match=%0d", pulses, at_48, iw, am);
    // blocks 0..7 stream without a gap: results 1..7 follow at 48 cycles
    if (at_48 < 7) begin
      failures++;
      $display("FAIL only %0d results at the 48-cycle serial rate", at_48);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dna_million: a sample of one million base pairs through the comparator
// framework at its default parameters (bit-serial input, 10 ns clock).
//
// 1,000,000 base pairs fill 83,334 blocks of 12 (the last block padded).
// top_harness streams them without a gap and checks every match vector and
// the 7-cycle latency. The run time is then bound by the serial input: 48
// cycles per block, about 4.0 million cycles (40 ms at 10 ns). The
// testbench checks that the last result arrives within 48 cycles per block
// plus the pipeline latency and reports the time. A second instance with 8
// bits per transfer runs the same sample; its input keeps up, so the
// comparators' 7-cycle cadence sets the time: 583,338 cycles, 5.83 ms.
module tb_dna_million;
  import dna_pkg::*;

  localparam int unsigned BASES  = 1_000_000;
  localparam int unsigned BLOCKS = (BASES + LANES - 1) / LANES;

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
  top_harness #(.SER_W(1), .BLOCKS(BLOCKS), .STREAM(1'b1)) h (
    .clk, .rst_n, .sdi, .sdi_valid, .sdi_ready,
    .match, .match_valid, .state, .done,
    .checks(c), .failures(f), .stalls(st), .back_to_back(bb),
    .idle_waits(iw), .all_match(am)
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
  top_harness #(.SER_W(8), .BLOCKS(BLOCKS), .STREAM(1'b1)) h8 (
    .clk, .rst_n, .sdi(sdi8), .sdi_valid(sdi_valid8), .sdi_ready(sdi_ready8),
    .match(match8), .match_valid(match_valid8), .state(state8), .done(done8),
    .checks(c8), .failures(f8), .stalls(st8), .back_to_back(bb8),
    .idle_waits(iw8), .all_match(am8)
  );

  longint edges = 0, edges8 = 0;
  always @(posedge clk) if (rst_n) edges <= edges + 1;
  always @(posedge clk) if (rst_n && !done8) edges8 <= edges8 + 1;

  initial begin
    repeat (BLOCKS * 48 + 10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c + c8, f + f8 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done && done8);
    checks = c + c8 + 2; failures = f + f8;
    $display("%0d blocks in %0d cycles = %0.3f ms at 10 ns; %0d stalls",
             BLOCKS, edges, real'(edges) * 10.0e-6, st);
    if (edges > longint'(BLOCKS) * 48 + 16) begin
      failures++;
      $display("FAIL slower than the 48-cycle serial rate");
    end
    $display("SER_W=8: %0d blocks in %0d cycles = %0.3f ms at 10 ns; %0d back-to-back",
             BLOCKS, edges8, real'(edges8) * 10.0e-6, bb8);
    if (edges8 > longint'(BLOCKS) * 7 + 16) begin
      failures++;
      $display("FAIL SER_W=8 slower than the 7-cycle cadence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

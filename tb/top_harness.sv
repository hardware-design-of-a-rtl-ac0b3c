// top_harness: stimulus and checker for dna_comparator_top.
//
// Generates BLOCKS random blocks of 12 sample and 12 target bases (biased
// towards equal bases, every 13th block fully equal), streams them into the
// serial input SER_W bits per transfer in the documented bit order, and
// checks every match vector against the lane-by-lane comparison worked out
// here. Streaming alternates between bursts with no idle cycles and phases
// with random idle cycles and pauses between blocks; with STREAM set, all
// blocks form one continuous stream.
//
// Also checked and counted: the latency from the controller leaving S6 for
// S0 (the start edge) to match_valid, which must be 7 cycles; the spacing of
// results, never under 7 cycles; results exactly 7 cycles apart
// (back-to-back blocks); cycles where the input was stalled by sdi_ready;
// cycles the controller waited idle in S6; all-match blocks. Drives and
// samples on the falling clock edge. done rises when every block's result
// has been seen.
module top_harness
  import dna_pkg::*;
#(
  parameter int unsigned SER_W  = 1,
  parameter int unsigned BLOCKS = 10,
  parameter bit          STREAM = 1'b0   // 1: every block in one continuous stream
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [SER_W-1:0] sdi,
  output logic             sdi_valid,
  input  logic             sdi_ready,
  input  logic [LANES-1:0] match,
  input  logic             match_valid,
  input  state_t           state,
  output logic             done,
  output int               checks,
  output int               failures,
  output int               stalls,
  output int               back_to_back,
  output int               idle_waits,
  output int               all_match
);

  logic [LANES-1:0] exp_q [$];
  int               start_q [$];
  int               edges = 0;
  int               results = 0;
  int               last_result = -1000;
  state_t           prev_state = S6;

  always @(posedge clk) edges <= edges + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t SER_W=%0d %s", $time, SER_W, msg);
    end
  endtask

  // Producer.
  initial begin
    sdi = '0; sdi_valid = 1'b0; stalls = 0;
    @(negedge clk iff rst_n);
    for (int n = 0; n < BLOCKS; n++) begin
      logic [BLOCK_BITS-1:0] bits;
      logic [LANES-1:0]      e;
      bit                    burst;
      burst = STREAM || ((n / 8) % 2 == 0);
      for (int i = 0; i < LANES; i++) begin
        base_t s, t;
        s = base_t'($urandom_range(0, 3));
        t = ($urandom_range(0, 1) == 0 || n % 13 == 3) ? s : base_t'($urandom_range(0, 3));
        bits[BLOCK_BITS-1-2*i -: 2]   = s;
        bits[BLOCK_BITS/2-1-2*i -: 2] = t;
        e[i] = (s == t);
      end
      exp_q.push_back(e);
      if (!burst && $urandom_range(0, 1) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      for (int k = 0; k < BLOCK_BITS / SER_W; k++) begin
        if (!burst) while ($urandom_range(0, 4) == 0) begin
          sdi_valid = 1'b0;
          @(negedge clk);
        end
        sdi       = bits[BLOCK_BITS-1-k*SER_W -: SER_W];
        sdi_valid = 1'b1;
        #1;  // let the falling-edge drivers of this cycle settle first
        while (!sdi_ready) begin
          stalls++;
          @(negedge clk);
          #1;
        end
        @(negedge clk);
      end
      sdi_valid = 1'b0;
    end
  end

  // Monitor.
  initial begin
    checks = 0; failures = 0; done = 1'b0;
    back_to_back = 0; idle_waits = 0; all_match = 0;
    @(negedge clk iff rst_n);
    while (results < BLOCKS) begin
      if (state == S0 && prev_state == S6) start_q.push_back(edges);
      if (state == S6 && prev_state == S6) idle_waits++;
      prev_state = state;
      if (match_valid) begin
        check(exp_q.size() > 0 && start_q.size() > 0, "result without a block");
        if (exp_q.size() > 0 && start_q.size() > 0) begin
          logic [LANES-1:0] e;
          int s;
          e = exp_q.pop_front();
          s = start_q.pop_front();
          check(match == e, $sformatf("block %0d: match %03h expected %03h", results, match, e));
          check(edges - s == 7, $sformatf("block %0d: latency %0d cycles", results, edges - s));
          check(edges - last_result >= 7, "results less than 7 cycles apart");
          if (edges - last_result == 7) back_to_back++;
          if (e == '1) all_match++;
        end
        last_result = edges;
        results++;
      end
      @(negedge clk);
    end
    done = 1'b1;
  end

endmodule

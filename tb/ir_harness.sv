// ir_harness: drives one input_registers instance with random blocks.
//
// A block is 12 random sample bases and 12 random target bases. The
// harness serialises it in the documented order (sample lanes 0..11, then
// target lanes 0..11, most significant bit first, SER_W bits per transfer),
// with random idle cycles between transfers, and keeps a queue of the blocks
// sent. A consumer releases each presented block after a random 1..12 cycle
// delay and compares the presented bases with the head of the queue; it also
// checks that the bases stay stable while blk_valid is high. The harness
// drives and samples on the falling clock edge. Stalls (sdi_valid
// high while sdi_ready is low) are counted.
module ir_harness
  import dna_pkg::*;
#(
  parameter int unsigned SER_W  = 1,
  parameter int unsigned BLOCKS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);

  logic [SER_W-1:0] sdi;
  logic             sdi_valid, sdi_ready;
  logic             blk_valid, blk_release;
  base_t            sample [LANES];
  base_t            target [LANES];

  input_registers #(.SER_W(SER_W)) dut (
    .clk, .rst_n, .sdi, .sdi_valid, .sdi_ready,
    .blk_valid, .blk_release, .sample, .target
  );

  typedef struct {
    base_t s [LANES];
    base_t t [LANES];
  } blk_t;

  blk_t sent [$];
  int   received = 0;

  // Producer.
  initial begin
    sdi = '0; sdi_valid = 1'b0;
    stalls = 0;
    @(negedge clk iff rst_n);
    for (int n = 0; n < BLOCKS; n++) begin
      blk_t b;
      logic [BLOCK_BITS-1:0] bits;
      for (int i = 0; i < LANES; i++) begin
        b.s[i] = base_t'($urandom_range(0, 3));
        b.t[i] = base_t'($urandom_range(0, 3));
      end
      for (int i = 0; i < LANES; i++) begin
        bits[BLOCK_BITS-1-2*i -: 2]   = b.s[i];
        bits[BLOCK_BITS/2-1-2*i -: 2] = b.t[i];
      end
      sent.push_back(b);
      for (int k = 0; k < BLOCK_BITS / SER_W; k++) begin
        // random idle cycles
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        sdi       = bits[BLOCK_BITS-1-k*SER_W -: SER_W];
        sdi_valid = 1'b1;
        // sdi_ready follows blk_release, which the consumer drives on the
        // falling edge; its value after that is what the next rising edge sees.
        #1;  // let the falling-edge drivers of this cycle settle first
        while (!sdi_ready) begin
          stalls++;
          @(negedge clk);
          #1;
        end
        @(negedge clk);
        sdi_valid = 1'b0;
      end
    end
  end

  // Consumer.
  initial begin
    blk_release = 1'b0;
    checks = 0; failures = 0; done = 1'b0;
    @(negedge clk iff rst_n);
    while (received < BLOCKS) begin
      @(negedge clk);
      if (blk_valid) begin
        base_t s0 [LANES];
        int delay;
        blk_t exp;
        s0 = sample;
        delay = $urandom_range(0, 11);
        repeat (delay) begin
          @(negedge clk);
          checks++;
          if (!blk_valid || sample != s0) begin
            failures++;
            $display("FAIL SER_W=%0d: block %0d changed before release", SER_W, received);
          end
        end
        exp = sent.pop_front();
        for (int i = 0; i < LANES; i++) begin
          checks++;
          if (sample[i] != exp.s[i] || target[i] != exp.t[i]) begin
            failures++;
            $display("FAIL SER_W=%0d block %0d lane %0d: got %0d/%0d expected %0d/%0d",
                     SER_W, received, i, sample[i], target[i], exp.s[i], exp.t[i]);
          end
        end
        blk_release = 1'b1;
        @(negedge clk);
        blk_release = 1'b0;
        received++;
      end
    end
    done = 1'b1;
  end

endmodule

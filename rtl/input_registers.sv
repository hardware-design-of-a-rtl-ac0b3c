// input_registers: serial receiver and input register bank.
//
// The host sends each block of LANES sample bases and LANES target bases as
// one serial stream of BLOCK_BITS (48) bits, SER_W bits per transfer:
// sample lane 0 first, up to sample lane 11, then target lanes 0 to 11,
// each base most significant bit first (and for SER_W > 1 the earlier bit in
// the higher bit of sdi). The bits shift into a fill register; once a whole
// block is in, consecutive bit pairs form the 2-bit bases, so a base is never
// split across the comparison.
//
// A complete block moves from the fill register to a hold register as soon
// as the hold register is free. The hold register drives sample[] and
// target[] to the processing unit and stays stable, with blk_valid high,
// until the control unit pulses blk_release; meanwhile the next block can be
// received. The fill register is emptied at the same edge that takes the
// first transfer of the next block, so a continuous stream loses no cycle.
// sdi_ready is low while a complete block waits in the fill register for
// the hold register (an sdi/sdi_valid/sdi_ready handshake: a
// transfer happens on a clock edge where both are high).
//
// Serial reception and the grouping of bits in pairs follow the design
// being implemented. The bit order, the handshake, the transfer width
// parameter and the double buffering (fill plus hold register) are this
// implementation's own choices. Reset is active low and synchronous.
module input_registers
  import dna_pkg::*;
#(
  parameter int unsigned SER_W = 1   // bits per serial transfer; divides 48
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial input from the data bus
  input  logic [SER_W-1:0] sdi,
  input  logic             sdi_valid,
  output logic             sdi_ready,
  // block towards the processing unit
  output logic             blk_valid,
  input  logic             blk_release,
  output base_t            sample [LANES],
  output base_t            target [LANES]
);

  localparam int unsigned XFERS = BLOCK_BITS / SER_W;
  localparam int unsigned CNT_W = $clog2(XFERS + 1);

  logic [BLOCK_BITS-1:0] fill_q;
  logic [BLOCK_BITS-1:0] hold_q;
  logic [CNT_W-1:0]      cnt_q;
  logic                  full_q;
  logic                  hold_vld_q;
  logic                  hold_free;

  assign sdi_ready = !full_q || hold_free;
  assign blk_valid = hold_vld_q;
  assign hold_free = !hold_vld_q || blk_release;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_q     <= '0;
      hold_q     <= '0;
      cnt_q      <= '0;
      full_q     <= 1'b0;
      hold_vld_q <= 1'b0;
    end else begin
      if (blk_release) hold_vld_q <= 1'b0;
      if (full_q && hold_free) begin
        hold_q     <= fill_q;
        hold_vld_q <= 1'b1;
        full_q     <= 1'b0;
      end
      if (sdi_valid && sdi_ready) begin
        if (SER_W == BLOCK_BITS) fill_q <= BLOCK_BITS'(sdi);
        else                     fill_q <= {fill_q[BLOCK_BITS-1-SER_W:0], sdi};
        if (cnt_q == CNT_W'(XFERS - 1)) begin
          cnt_q  <= '0;
          full_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  // Bit pairs of the hold register, in arrival order, as bases.
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      sample[i] = base_t'(hold_q[BLOCK_BITS-1-2*i -: 2]);
      target[i] = base_t'(hold_q[BLOCK_BITS/2-1-2*i -: 2]);
    end
  end

  initial begin
    assert (BLOCK_BITS % SER_W == 0)
      else $error("SER_W must divide the block size of %0d bits", BLOCK_BITS);
  end

endmodule

// dna_comparator_top: pipelined comparator framework for DNA sequence matching.
//
// The host encodes a sample (pattern) sequence and a target (text) sequence
// two bits per base and streams them in blocks of 12 sample and 12 target
// bases. The input registers collect a block; the control unit's FSM walks
// the processing unit's two comparators through the 12 lane pairs in six
// cycles; the processing unit returns a 12-bit vector with a 1 for every
// lane where sample and target base are equal.
//
// Interface (data-bus side, brought out as plain ports):
//   sdi[SER_W], sdi_valid, sdi_ready  serial block input, handshake as in
//                                     input_registers (48 bits per block)
//   match[12], match_valid            result vector, valid for one cycle per
//                                     block and held until the next one
//   state                             controller state, for observation
// Timing: a block starts at most one cycle after its last bit arrives when
// the comparators are free; its match vector follows 7 clock cycles after
// the start; with blocks waiting, one block is finished every 7 cycles.
// With SER_W = 1 the serial input (48 cycles per block) sets the rate.
//
// Clock, reset, control unit, processing unit and data bus follow the
// general architecture of the design; the serial format, the handshakes
// and the SER_W parameter are this implementation's own. Reset is active
// low and synchronous.
module dna_comparator_top
  import dna_pkg::*;
#(
  parameter int unsigned SER_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SER_W-1:0] sdi,
  input  logic             sdi_valid,
  output logic             sdi_ready,
  output logic [LANES-1:0] match,
  output logic             match_valid,
  output state_t           state
);

  logic  blk_valid, blk_release;
  base_t sample [LANES];
  base_t target [LANES];
  ctrl_t ctrl;

  input_registers #(.SER_W(SER_W)) u_in (
    .clk, .rst_n,
    .sdi, .sdi_valid, .sdi_ready,
    .blk_valid, .blk_release,
    .sample, .target
  );

  control_unit u_ctrl (
    .clk, .rst_n,
    .blk_valid, .blk_release,
    .ctrl, .state
  );

  processing_unit u_pu (
    .clk, .rst_n,
    .ctrl, .sample, .target,
    .match, .match_valid
  );

endmodule

// control_unit: FSM that schedules the comparator array.
//
// Seven states, S0 to S6. A block is compared in six slots, S0 to S5; in
// each slot the two operators of the processing unit compare one lane pair
// each, in the lane order of the schedule in dna_pkg (operator 0: lanes 0,
// 4, 2, 7, 11, 3; operator 1: lanes 10, 5, 8, 1, 6, 9). S6 lets the last
// results reach the output register and waits for the next block.
//
// The control word ctrl is combinational from the state. With ctrl.load
// high, the processing unit loads the operands of lanes ctrl.lane0 and
// ctrl.lane1 at the coming clock edge, so the word issued in state Sk
// carries the lanes of slot k+1, and the one issued in S6 when blk_valid is
// high carries the lanes of slot 0 and starts the block. blk_release is
// high in S4, whose closing edge loads the last operands, so the input
// register may take the next block by the end of S5. With blocks waiting,
// a new block starts every 7 cycles (the 70 ns cadence at a 10 ns clock);
// the match vector of a block is ready 7 cycles after its start edge.
//
// The seven states and the schedule follow the design being implemented;
// the encoding of the control word, the start and release handshake and the
// reset into S6 are this implementation's own choices. Reset is active low
// and synchronous.
module control_unit
  import dna_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_valid,    // a block waits in the input registers
  output logic   blk_release,  // its operands have all been loaded
  output ctrl_t  ctrl,
  output state_t state
);

  state_t state_q, state_d;
  logic   start;

  assign state = state_q;
  assign start = (state_q == S6) && blk_valid;

  always_comb begin
    unique case (state_q)
      S0: state_d = S1;
      S1: state_d = S2;
      S2: state_d = S3;
      S3: state_d = S4;
      S4: state_d = S5;
      S5: state_d = S6;
      default: state_d = start ? S0 : S6;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= S6;
    else        state_q <= state_d;
  end

  // Slot whose operands are loaded at the coming edge.
  always_comb begin
    int unsigned slot;
    ctrl = '0;
    slot = 0;
    if (state_q == S6) begin
      ctrl.load = start;
      slot      = 0;
    end else if (state_q != S5) begin
      ctrl.load = 1'b1;
      slot      = int'(state_q) + 1;
    end
    if (ctrl.load) begin
      ctrl.lane0 = OP0_LANE[slot];
      ctrl.lane1 = OP1_LANE[slot];
      ctrl.swap0 = OP0_SWAP[slot];
      ctrl.swap1 = OP1_SWAP[slot];
      ctrl.last  = (slot == N_SLOTS - 1);
    end
  end

  assign blk_release = (state_q == S4);

  // The FSM only ever holds one of its seven states.
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
    state_q inside {S0, S1, S2, S3, S4, S5, S6});

endmodule

// dna_pkg: types and constants shared by the DNA comparator framework.
//
// The four nucleobases travel as 2-bit codes (A=00, T=01, C=10, G=11). A
// comparison block holds LANES sample bases and LANES target bases; two
// comparator operators work through it in N_SLOTS clock cycles following a
// fixed schedule, and the control unit walks that schedule with a
// seven-state FSM (S0..S6).
//
// The encoding, the block of twelve lane pairs, the two operators, the seven
// states and the lane order of the schedule below follow the design being
// implemented. Their representation as a package and a control struct is
// this implementation's own.
package dna_pkg;

  // Nucleobase encoding. The hardware never encodes: the host sends codes.
  typedef enum logic [1:0] {
    BASE_A = 2'b00,
    BASE_T = 2'b01,
    BASE_C = 2'b10,
    BASE_G = 2'b11
  } base_t;

  localparam int unsigned BASE_W  = 2;            // bits per base
  localparam int unsigned LANES   = 12;           // base pairs per block
  localparam int unsigned N_OPS   = 2;            // comparator operators
  localparam int unsigned N_SLOTS = LANES / N_OPS; // compare cycles per block
  localparam int unsigned BLOCK_BITS = 2 * LANES * BASE_W; // sample + target

  typedef logic [3:0] lane_t;

  // Controller states. S0..S5 are the compare slots; S6 drains the last
  // results and waits for the next block.
  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3,
    S4 = 3'd4, S5 = 3'd5, S6 = 3'd6
  } state_t;

  // Lane handled by each operator in each slot.
  localparam lane_t OP0_LANE [N_SLOTS] = '{4'd0,  4'd4, 4'd2, 4'd7, 4'd11, 4'd3};
  localparam lane_t OP1_LANE [N_SLOTS] = '{4'd10, 4'd5, 4'd8, 4'd1, 4'd6,  4'd9};
  // Which operand register of each operator receives the target base
  // (1) rather than the sample base (0) in each slot. Equality does not
  // care; the assignment keeps the register contents of the schedule.
  localparam logic OP0_SWAP [N_SLOTS] = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0};
  localparam logic OP1_SWAP [N_SLOTS] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0};

  // Control word from the control unit to the processing unit. When load
  // is set, the operand registers take the bases of the two lanes at the
  // coming clock edge; last marks the final slot of a block.
  typedef struct packed {
    logic  load;
    lane_t lane0;
    lane_t lane1;
    logic  swap0;
    logic  swap1;
    logic  last;
  } ctrl_t;

endpackage

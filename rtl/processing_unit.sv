// processing_unit: two-stage pipelined comparator array with output register.
//
// Two eqmux_op operators compare one lane pair each per cycle. Each operator
// has two operand registers in front (stage 1: registers 5 and 2 for
// operator 0, registers 3 and 4 for operator 1) and one result register
// behind it (stage 2: register 6 for operator 0, register 7 for operator 1):
// six data registers in all. The match and mismatch values come from two
// constant registers holding 1 and 0. From the result registers each flag is
// written into its lane of the 12-bit output register.
//
// Timing: operands loaded at edge t are compared during the next cycle, the
// flag is in the result register after edge t+1 and in the output register
// after edge t+2. When the flags of the last slot of a block (ctrl.last) are
// written, the complete match vector is copied into match at the same edge
// and match_valid is high for one cycle; match then holds until the next
// block completes. With the control unit's schedule this gives a latency of
// 7 cycles from the edge that loads the first operands.
//
// Registers, constants, operators and the two pipeline stages follow the
// design being implemented. The operand registers are BASE_W (2) bits wide
// here, the match vector register and the lane tags that travel with each
// stage are this implementation's own. Reset is active low and synchronous.
module processing_unit
  import dna_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,
  input  base_t             sample [LANES],
  input  base_t             target [LANES],
  output logic [LANES-1:0]  match,        // 1: sample and target base equal
  output logic              match_valid   // one-cycle pulse per block
);

  // Constant registers (hardwired).
  localparam logic CONST_0 = 1'b0;
  localparam logic CONST_1 = 1'b1;

  // Stage 1: operand registers and the lanes they belong to.
  base_t reg2_q, reg3_q, reg4_q, reg5_q;
  lane_t tag0_s1_q, tag1_s1_q;
  logic  vld_s1_q, last_s1_q;

  // Stage 2: result registers.
  logic  reg6_q, reg7_q;
  lane_t tag0_s2_q, tag1_s2_q;
  logic  vld_s2_q, last_s2_q;

  logic  res0, res1;
  logic [LANES-1:0] outreg_q, outreg_d;
  logic [LANES-1:0] match_q;
  logic             match_vld_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg2_q <= BASE_A; reg3_q <= BASE_A; reg4_q <= BASE_A; reg5_q <= BASE_A;
      tag0_s1_q <= '0; tag1_s1_q <= '0;
      vld_s1_q  <= 1'b0; last_s1_q <= 1'b0;
    end else begin
      vld_s1_q  <= ctrl.load;
      last_s1_q <= ctrl.load && ctrl.last;
      if (ctrl.load) begin
        reg5_q    <= ctrl.swap0 ? target[ctrl.lane0] : sample[ctrl.lane0];
        reg2_q    <= ctrl.swap0 ? sample[ctrl.lane0] : target[ctrl.lane0];
        reg3_q    <= ctrl.swap1 ? target[ctrl.lane1] : sample[ctrl.lane1];
        reg4_q    <= ctrl.swap1 ? sample[ctrl.lane1] : target[ctrl.lane1];
        tag0_s1_q <= ctrl.lane0;
        tag1_s1_q <= ctrl.lane1;
      end
    end
  end

  eqmux_op #(.W(BASE_W), .OW(1)) u_eqmux0 (
    .a(reg5_q), .b(reg2_q), .c(CONST_1), .d(CONST_0), .o(res0)
  );
  eqmux_op #(.W(BASE_W), .OW(1)) u_eqmux1 (
    .a(reg3_q), .b(reg4_q), .c(CONST_1), .d(CONST_0), .o(res1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg6_q <= 1'b0; reg7_q <= 1'b0;
      tag0_s2_q <= '0; tag1_s2_q <= '0;
      vld_s2_q  <= 1'b0; last_s2_q <= 1'b0;
    end else begin
      vld_s2_q  <= vld_s1_q;
      last_s2_q <= last_s1_q;
      if (vld_s1_q) begin
        reg6_q    <= res0;
        reg7_q    <= res1;
        tag0_s2_q <= tag0_s1_q;
        tag1_s2_q <= tag1_s1_q;
      end
    end
  end

  // Output register: the two flags of a slot go into their lanes.
  always_comb begin
    outreg_d = outreg_q;
    if (vld_s2_q) begin
      outreg_d[tag0_s2_q] = reg6_q;
      outreg_d[tag1_s2_q] = reg7_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      outreg_q    <= '0;
      match_q     <= '0;
      match_vld_q <= 1'b0;
    end else begin
      outreg_q    <= outreg_d;
      match_vld_q <= vld_s2_q && last_s2_q;
      if (vld_s2_q && last_s2_q) match_q <= outreg_d;
    end
  end

  assign match       = match_q;
  assign match_valid = match_vld_q;

  // The two operators of one slot never work on the same lane.
  a_distinct_lanes: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.load |-> ctrl.lane0 != ctrl.lane1);
  a_lane_range: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.load |-> (int'(ctrl.lane0) < LANES) && (int'(ctrl.lane1) < LANES));

endmodule

// tb_eqmux_op: exhaustive check of the comparator operator.
//
// Every pair of 2-bit operands is applied with each of the four choices of
// the 1-bit select operands c and d; the expected output is worked out in
// the testbench from the operator rule (c on equality, d otherwise). A
// second instance with 4-bit selected operands checks that the width
// parameter is honoured.
module tb_eqmux_op;

  logic [1:0] a, b;
  logic       c, d, o;
  logic [3:0] cw, dw, ow;
  int checks = 0, failures = 0;

  eqmux_op dut (.a, .b, .c, .d, .o);
  eqmux_op #(.W(2), .OW(4)) dut_w (.a, .b, .c(cw), .d(dw), .o(ow));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 4; ia++)
      for (int ib = 0; ib < 4; ib++)
        for (int sel = 0; sel < 4; sel++) begin
          logic exp;
          logic [3:0] expw;
          a = 2'(ia); b = 2'(ib);
          c = sel[0]; d = sel[1];
          cw = 4'($urandom); dw = 4'($urandom);
          #1;
          exp  = (ia == ib) ? sel[0] : sel[1];
          expw = (ia == ib) ? cw : dw;
          checks++;
          if (o !== exp) begin
            failures++;
            $display("FAIL a=%0d b=%0d c=%0b d=%0b: o=%0b expected %0b", ia, ib, c, d, o, exp);
          end
          checks++;
          if (ow !== expw) begin
            failures++;
            $display("FAIL wide a=%0d b=%0d: o=%h expected %h", ia, ib, ow, expw);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

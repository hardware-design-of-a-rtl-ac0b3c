// tb_input_registers: self-checking test of the serial input registers.
//
// Two harnesses run side by side: one with the default bit-serial input
// (SER_W = 1) and one with 8 bits per transfer, where a block arrives in 6
// transfers and the fill register must wait for the hold register, so the
// sdi_ready stall path is exercised. The test fails if no stall happened in
// the wide instance.
module tb_input_registers;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done1, done8;
  int   checks1, failures1, stalls1, checks8, failures8, stalls8;
  int   checks, failures;

  ir_harness #(.SER_W(1), .BLOCKS(12)) h1 (
    .clk, .rst_n, .done(done1), .checks(checks1), .failures(failures1), .stalls(stalls1)
  );
  ir_harness #(.SER_W(8), .BLOCKS(40)) h8 (
    .clk, .rst_n, .done(done8), .checks(checks8), .failures(failures8), .stalls(stalls8)
  );

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks8, failures1 + failures8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done1 && done8);
    checks   = checks1 + checks8 + 1;
    failures = failures1 + failures8;
    $display("stalls: SER_W=1 %0d, SER_W=8 %0d", stalls1, stalls8);
    if (stalls8 == 0) begin
      failures++;
      $display("FAIL no input stall happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

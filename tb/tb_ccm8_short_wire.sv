// tb_ccm8_short_wire: exhaustive self-checking testbench for ccm8_short_wire.
//
// Applies all 65,536 operand pairs, one per clock cycle, and compares the
// product with a reference computed by the simulator's own integer multiply
// (operands unsigned). The multiplier is combinational, so each
// product is checked in the same cycle its operands are applied, half a
// cycle after they change. Counts the vectors that set P15, the top product
// bit, and fails a run that never does.
// A watchdog ends the run as failed after a fixed number of cycles.
module tb_ccm8_short_wire;
  import ccm_pkg::*;

  localparam int unsigned VECTORS  = 1 << (2 * N);
  localparam int unsigned WATCHDOG = VECTORS + 100;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  operand_t a, b;
  product_t p, expected;
  int checks = 0, failures = 0, p15_set = 0;

  ccm8_short_wire dut (.a(a), .b(b), .p(p));

  function automatic product_t reference(operand_t x, operand_t y);
    int sx, sy;
    if (0) begin
      sx = int'($signed(x));
      sy = int'($signed(y));
    end else begin
      sx = int'(x);
      sy = int'(y);
    end
    return product_t'(sx * sy);
  endfunction

  initial begin
    a = '0;
    b = '0;
    for (int unsigned v = 0; v < VECTORS; v++) begin
      @(negedge clk);
      a = operand_t'(v);
      b = operand_t'(v >> N);
      @(posedge clk);
      expected = reference(a, b);
      checks++;
      if (p[2*N-1]) p15_set++;
      if (p !== expected) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH a=%0d b=%0d p=%h expected=%h", a, b, p, expected);
      end
    end
    checks++;
    if (p15_set == 0) begin
      failures++;
      $display("P15 was never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: run did not finish in %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

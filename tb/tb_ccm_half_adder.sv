// tb_ccm_half_adder: exhaustive check of the half-adder cell.
//
// Drives all four input combinations, one per clock cycle, and checks that
// 2*c + s equals the number of ones at the inputs. A watchdog ends the run
// as failed after a fixed number of cycles.
module tb_ccm_half_adder;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic x, y, s, c;
  int checks = 0, failures = 0;

  ccm_half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {x, y} = 2'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y)) begin
        failures++;
        $display("MISMATCH x=%b y=%b -> c=%b s=%b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ccm_full_adder: exhaustive check of the full-adder cell.
//
// Drives all eight input combinations, one per clock cycle, and checks that
// 2*c + s equals the number of ones at the inputs. A watchdog ends the run
// as failed after a fixed number of cycles.
module tb_ccm_full_adder;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  ccm_full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {x, y, z} = 3'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("MISMATCH x=%b y=%b z=%b -> c=%b s=%b", x, y, z, c, s);
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

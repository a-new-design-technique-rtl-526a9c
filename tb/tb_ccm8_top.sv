// tb_ccm8_top: end-to-end testbench of the five multiplier layouts.
//
// Applies all 65,536 operand pairs to the top, one per clock cycle, with the
// top at its default configuration. The three unsigned outputs are compared
// with the unsigned product and the two two's complement outputs with the
// signed product, both computed by the simulator's integer multiply. It also
// counts how often each mechanism of the arrays is exercised and fails the
// run if one never is:
//   - the unsigned fast adder's carry-out forming P15,
//   - the sign correction term a_7 | b_7 being active (a signed operand < 0),
//   - a negative signed product, and a product of two negative operands,
//   - the most negative operand pair, -128 x -128 = +16384,
//   - the low product bits the Approach II arrays finish without the fast
//     adder (P1..P4 unsigned, P1..P3 signed) being 1.
// A watchdog ends the run as failed after a fixed number of cycles.
module tb_ccm8_top;
  import ccm_pkg::*;

  localparam int unsigned VECTORS  = 1 << (2 * N);
  localparam int unsigned WATCHDOG = VECTORS + 100;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  operand_t a, b;
  product_t p_area, p_short_wire, p_approach2, p_tc1, p_tc2;
  product_t exp_u, exp_s;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_sign_or = 0, n_neg_product = 0, n_both_neg = 0;
  int n_min_min = 0, n_low_bits_u = 0, n_low_bits_s = 0;

  ccm8_top dut (
    .a(a), .b(b),
    .p_area(p_area), .p_short_wire(p_short_wire), .p_approach2(p_approach2),
    .p_tc1(p_tc1), .p_tc2(p_tc2)
  );

  task automatic check(string name, product_t got, product_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH %s a=%h b=%h got=%h expected=%h", name, a, b, got, want);
    end
  endtask

  task automatic require(string name, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end else begin
      $display("  %-28s %0d", name, count);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    for (int unsigned v = 0; v < VECTORS; v++) begin
      @(negedge clk);
      a = operand_t'(v);
      b = operand_t'(v >> N);
      @(posedge clk);
      exp_u = product_t'(int'(a) * int'(b));
      exp_s = product_t'(int'($signed(a)) * int'($signed(b)));
      check("area", p_area, exp_u);
      check("short_wire", p_short_wire, exp_u);
      check("approach2", p_approach2, exp_u);
      check("tc_approach1", p_tc1, exp_s);
      check("tc_approach2", p_tc2, exp_s);
      if (exp_u[2*N-1]) n_carry_out++;
      if (a[N-1] || b[N-1]) n_sign_or++;
      if (exp_s[2*N-1]) n_neg_product++;
      if (a[N-1] && b[N-1]) n_both_neg++;
      if (a == 8'h80 && b == 8'h80) n_min_min++;
      if (exp_u[4:1] != '0) n_low_bits_u++;
      if (exp_s[3:1] != '0) n_low_bits_s++;
    end
    $display("mechanism counts:");
    require("unsigned carry-out into P15", n_carry_out);
    require("sign correction active", n_sign_or);
    require("negative signed product", n_neg_product);
    require("both operands negative", n_both_neg);
    require("-128 x -128", n_min_min);
    require("low bits from array (uns)", n_low_bits_u);
    require("low bits from array (sig)", n_low_bits_s);
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

// tb_ccm_fast_adder: self-checking testbench for the parallel-prefix fast adder.
//
// Instantiates the adder at its default length (14 bits) and at 10 bits, the
// shortened length of the Approach II multiplier. Each cycle it applies one
// vector to both and compares {cout, sum} with x + y + cin computed in a
// wider integer. The vectors are the corner cases (all zeros, all ones,
// alternating bits, a single carry rippling the full length) followed by
// random ones. It counts the vectors that produce a carry-out and the ones
// whose carry travels through every bit, and fails the run if either never
// happens. A watchdog ends the run as failed after a fixed number of cycles.
module tb_ccm_fast_adder;
  localparam int unsigned W1 = 14;
  localparam int unsigned W2 = 10;
  localparam int unsigned RANDOM_VECTORS = 20000;
  localparam int unsigned WATCHDOG = RANDOM_VECTORS + 200;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [W1-1:0] x1, y1, s1;
  logic [W2-1:0] x2, y2, s2;
  logic          cin, co1, co2;
  int checks = 0, failures = 0, carry_outs = 0, full_ripples = 0;

  ccm_fast_adder dut1 (.x(x1), .y(y1), .cin(cin), .sum(s1), .cout(co1));
  ccm_fast_adder #(.WIDTH(W2)) dut2 (.x(x2), .y(y2), .cin(cin), .sum(s2), .cout(co2));

  task automatic apply(logic [W1-1:0] xv, logic [W1-1:0] yv, logic cv);
    logic [W1:0] e1;
    logic [W2:0] e2;
    @(negedge clk);
    x1 = xv;
    y1 = yv;
    x2 = xv[W2-1:0];
    y2 = yv[W2-1:0];
    cin = cv;
    @(posedge clk);
    e1 = (W1+1)'(x1) + (W1+1)'(y1) + (W1+1)'(cin);
    e2 = (W2+1)'(x2) + (W2+1)'(y2) + (W2+1)'(cin);
    checks += 2;
    if (co1) carry_outs++;
    if ((x1 ^ y1) == '1 && cin) full_ripples++;
    if ({co1, s1} != e1) begin
      failures++;
      if (failures <= 10) $display("MISMATCH W=%0d x=%h y=%h cin=%b -> %h expected %h", W1, x1, y1, cin, {co1, s1}, e1);
    end
    if ({co2, s2} != e2) begin
      failures++;
      if (failures <= 10) $display("MISMATCH W=%0d x=%h y=%h cin=%b -> %h expected %h", W2, x2, y2, cin, {co2, s2}, e2);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);              // carry-in ripples through every bit
    apply({W1/2{2'b10}}, {W1/2{2'b01}}, 1'b1);
    apply({W1/2{2'b10}}, {W1/2{2'b10}}, 1'b0);
    for (int unsigned i = 0; i < W1; i++)
      apply(W1'(1) << i, '1, 1'b0);
    for (int unsigned i = 0; i < RANDOM_VECTORS; i++)
      apply(W1'($urandom), W1'($urandom), 1'($urandom));
    checks++;
    if (carry_outs == 0 || full_ripples == 0) begin
      failures++;
      $display("coverage: carry_outs=%0d full_ripples=%0d", carry_outs, full_ripples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

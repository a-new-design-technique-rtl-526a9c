// tb_ccm_pp_gen: exhaustive check of the partial-product generator.
//
// Instantiates the unsigned (TWOS = 0) and the two's complement (TWOS = 1)
// generator and applies all 65,536 operand pairs, one per clock cycle.
// Checks every matrix entry against its definition and then the property the
// multipliers rely on: the weighted sum of the entries equals a * b for
// unsigned operands, and, for signed operands, the weighted sum without the
// a_7 b_7 entry, plus (a_7 + b_7) 2^7 and (a_7 | b_7)(2^15 + 2^14), equals
// a * b modulo 2^16. A watchdog ends the run as failed after a fixed number
// of cycles.
module tb_ccm_pp_gen;
  localparam int unsigned N = 8;
  localparam int unsigned VECTORS = 1 << (2 * N);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] ppu, pps;
  int checks = 0, failures = 0;

  ccm_pp_gen dut_u (.a(a), .b(b), .pp(ppu));
  ccm_pp_gen #(.N(N), .TWOS(1'b1)) dut_s (.a(a), .b(b), .pp(pps));

  initial begin
    int su, ss, bad;
    logic eu, es;
    for (int unsigned v = 0; v < VECTORS; v++) begin
      @(negedge clk);
      a = N'(v);
      b = N'(v >> N);
      @(posedge clk);
      bad = 0;
      su = 0;
      ss = 0;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          eu = a[i] & b[j];
          es = ((i == N-1) != (j == N-1)) ? (a[i] ^ b[j]) & ((i == N-1) ? a[i] : b[j]) : eu;
          if (ppu[i][j] != eu || pps[i][j] != es) bad++;
          su += int'(ppu[i][j]) << (i + j);
          if (!(i == N-1 && j == N-1)) ss += int'(pps[i][j]) << (i + j);
        end
      end
      ss += (int'(a[N-1]) + int'(b[N-1])) << (N-1);
      ss += ((a[N-1] || b[N-1]) ? 1 : 0) * ((1 << (2*N-1)) + (1 << (2*N-2)));
      checks += 3;
      if (bad != 0) begin
        failures++;
        if (failures <= 10) $display("entry mismatch a=%h b=%h (%0d entries)", a, b, bad);
      end
      if (su != int'(a) * int'(b)) begin
        failures++;
        if (failures <= 10) $display("unsigned sum mismatch a=%h b=%h", a, b);
      end
      if (16'(ss) != 16'(int'($signed(a)) * int'($signed(b)))) begin
        failures++;
        if (failures <= 10) $display("signed sum mismatch a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (VECTORS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

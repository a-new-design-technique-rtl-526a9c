// ccm_fast_adder: the final fast adder of a column-compression multiplier.
//
// The compression stages leave at most two bits in every column; this adder
// turns those two rows (x, y) into one, cin + x + y = {cout, sum}. Only its
// function, a fast carry-propagate adder of a given length, is fixed by the
// multiplier; the structure here is a Kogge-Stone parallel-prefix network,
// chosen for its logarithmic depth: ceil(log2(WIDTH+1)) prefix levels.
// The carry-in is treated as the generate signal of an extra position below
// bit 0, so the carry into bit i is the group generate of positions 0..i.
// Purely combinational.
module ccm_fast_adder #(
  parameter int unsigned WIDTH = 14    // adder length; 2n-2 = 14 for n = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH + 1);

  // g[l][i], t[l][i]: group generate / propagate of the span ending at
  // position i after prefix level l; position 0 is the carry-in.
  logic [WIDTH:0] g [LEVELS+1];
  logic [WIDTH:0] t [LEVELS+1];

  always_comb begin
    g[0][0] = cin;
    t[0][0] = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      g[0][i+1] = x[i] & y[i];
      t[0][i+1] = x[i] ^ y[i];
    end
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i <= WIDTH; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (t[l][i] & g[l][i - (1 << l)]);
          t[l+1][i] = t[l][i] & t[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          t[l+1][i] = t[l][i];
        end
      end
    end
    for (int unsigned i = 0; i < WIDTH; i++)
      sum[i] = t[0][i+1] ^ g[LEVELS][i];
    cout = g[LEVELS][WIDTH];
  end

endmodule

// prefix_adder: N-bit parallel-prefix (Kogge-Stone) carry-propagate adder.
//
// Bitwise generate g = a&b and propagate p = a^b are combined in
// ceil(log2 N) prefix levels; at level l each position i >= 2^l merges the
// group ending at i - 2^l with (G,P) o (G',P') = (G | P&G', P&P'). The sum bit
// is p_i ^ G_{i-1}. No carry-in; the result is a + b modulo 2^N.
// Combinational. The Kogge-Stone topology is this design's choice.
module prefix_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;

  always_comb begin
    logic [N-1:0] p0, g, p, gn, pn;
    p0 = a ^ b;
    g  = a & b;
    p  = p0;
    for (int l = 0; l < LEVELS; l++) begin
      gn = g;
      pn = p;
      for (int i = 0; i < N; i++) begin
        if (i >= (1 << l)) begin
          gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
          pn[i] = p[i] & p[i - (1 << l)];
        end
      end
      g = gn;
      p = pn;
    end
    s = p0 ^ {g[N-2:0], 1'b0};
  end
endmodule

// dct_1d_kernel: 8-point 1-D DCT kernel built on four fixed-width ACPE Booth
// multipliers.
//
// It computes y_k = sum_n a(k,n) x_n with the orthonormal DCT-II matrix.
// The even/odd symmetry of that matrix halves the work: an input butterfly
// forms s_n = x_n + x_{7-n} and d_n = x_n - x_{7-n} (n = 0..3); an even
// coefficient is then sum_n a(k,n) s_n and an odd one sum_n a(k,n) d_n, a
// dot product of length four, one per cycle on the four multipliers.
// Coefficients are a(k,n)*2^14 (acpe_pkg::dct_coef) and each multiplier
// keeps the upper DW bits of its 2*DW-bit product, so y_k is in the units of
// the input. The four products are added and the sum saturated to DW bits.
//
// Timing: load (one cycle) registers the butterfly of vec; from the next
// cycle on, each cycle with issue computes coefficient k, and y/y_valid
// follow one cycle later. load and issue may not be high together.
// The four 14-bit multipliers follow the published 2-D DCT; the butterfly,
// the one-coefficient-per-cycle schedule and the saturation are this
// design's own choices.
module dct_1d_kernel
  import acpe_pkg::*;
#(
  parameter int DW = 14,  // data and multiplier width
  parameter int W  = 1    // column information of the multipliers
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [DW-1:0] vec [DCT_N],
  input  logic                 issue,
  input  logic [2:0]           k,
  output logic                 y_valid,
  output logic signed [DW-1:0] y
);
  localparam int NH = DCT_N / 2;

  logic signed [DW-1:0] s_q [NH];
  logic signed [DW-1:0] d_q [NH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NH; n++) begin
        s_q[n] <= '0;
        d_q[n] <= '0;
      end
    end else if (load) begin
      for (int n = 0; n < NH; n++) begin
        s_q[n] <= vec[n] + vec[DCT_N-1-n];
        d_q[n] <= vec[n] - vec[DCT_N-1-n];
      end
    end
  end

  logic [DW-1:0] opx  [NH];
  logic [DW-1:0] coef [NH];
  logic [DW-1:0] prod [NH];

  for (genvar n = 0; n < NH; n++) begin : g_mul
    assign opx[n]  = k[0] ? d_q[n] : s_q[n];
    assign coef[n] = DW'(dct_coef(k, 3'(n)));
    acpe_booth_mult #(.L(DW), .W(W)) u_mul (.x(opx[n]), .y(coef[n]), .p(prod[n]));
  end

  localparam logic signed [DW+1:0] MAXV = (DW+2)'((1 << (DW - 1)) - 1);
  localparam logic signed [DW+1:0] MINV = -(DW+2)'(1 << (DW - 1));

  logic signed [DW+1:0] acc;
  always_comb begin
    acc = '0;
    for (int n = 0; n < NH; n++) acc += (DW+2)'($signed(prod[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= issue;
      if (issue) begin
        if (acc > MAXV)      y <= MAXV[DW-1:0];
        else if (acc < MINV) y <= MINV[DW-1:0];
        else                 y <= acc[DW-1:0];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(load && issue))
    else $error("dct_1d_kernel: load and issue in the same cycle");
endmodule

// dct2d_core: 8x8 two-dimensional DCT of 8-bit pixels on one 1-D DCT
// kernel of four fixed-width ACPE Booth multipliers and a shift-register
// array.
//
// A block is processed in three phases. LOAD: 64 pixels enter in row-major
// order (pix_valid/pix_ready handshake), are level-shifted by -128, scaled by
// 2^FRAC and shifted into the array. ROW pass: for each of the 8 rows the
// head row is loaded into the kernel, its 8 coefficients are issued one per
// cycle and shifted back into the array's tail, so after 8 rows the array
// holds the row-transformed block, still row-major. COLUMN pass: column 0 is
// loaded into the kernel while every row rotates left; the 8 coefficients of
// that column leave on coef/coef_valid, rounded back to integer units
// (divided by 2^FRAC). Output order: column v = 0..7 outer, vertical
// frequency u = 0..7 inner; coef(u,v) is the orthonormal 2-D DCT-II of the
// level-shifted block. pix_ready is low outside LOAD (input stall); the
// output has no backpressure.
//
// Timing: 64 cycles to load with pix_valid held high, then 10 cycles per
// vector in each pass (load, 8 issues, drain): 224 cycles per block. The
// first coefficient appears 146 cycles (64 + 80 + 2) after the first pixel
// is taken.
// The kernel with four 14-bit multipliers and the shift-register array
// follow the published 2-D DCT; the phase schedule, the level shift, FRAC
// and the ports are this design's own choices.
module dct2d_core
  import acpe_pkg::*;
#(
  parameter int DW   = 14,  // data and multiplier width
  parameter int W    = 1,   // column information of the multipliers
  parameter int FRAC = 2    // fraction bits kept between the passes
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  input  logic [7:0]           pix,
  output logic                 pix_ready,
  output logic                 coef_valid,
  output logic signed [DW-1:0] coef,
  output logic [2:0]           coef_u,     // vertical frequency
  output logic [2:0]           coef_v,     // horizontal frequency
  output logic                 block_done  // pulse with the 64th coefficient
);
  typedef enum logic [2:0] {LOAD, ROW_LD, ROW_IS, ROW_WAIT, COL_LD, COL_IS, COL_WAIT} state_t;

  state_t      state;
  logic [5:0]  pix_cnt;
  logic [2:0]  vcnt, kcnt, k_out;

  logic                 sra_shift_in, sra_shift_col;
  logic signed [DW-1:0] sra_din;
  logic signed [DW-1:0] head_row [DCT_N];
  logic signed [DW-1:0] head_col [DCT_N];
  logic                 k_load, k_issue, y_valid;
  logic signed [DW-1:0] y;
  logic signed [DW-1:0] pix_scaled;

  assign pix_ready  = (state == LOAD);
  assign pix_scaled = (DW'(pix) - DW'(128)) <<< FRAC;

  transpose_sra #(.DW(DW)) u_sra (
    .clk(clk), .rst_n(rst_n),
    .shift_in(sra_shift_in), .din(sra_din), .shift_col(sra_shift_col),
    .head_row(head_row), .head_col(head_col)
  );

  // kernel input: head row in the row pass, head column in the column pass
  logic signed [DW-1:0] kvec [DCT_N];
  always_comb begin
    for (int i = 0; i < DCT_N; i++) kvec[i] = (state == COL_LD) ? head_col[i] : head_row[i];
  end

  dct_1d_kernel #(.DW(DW), .W(W)) u_kernel (
    .clk(clk), .rst_n(rst_n),
    .load(k_load), .vec(kvec),
    .issue(k_issue), .k(kcnt),
    .y_valid(y_valid), .y(y)
  );

  logic row_pass;
  assign row_pass = (state == ROW_IS) || (state == ROW_WAIT);

  always_comb begin
    k_load        = (state == ROW_LD) || (state == COL_LD);
    k_issue       = (state == ROW_IS) || (state == COL_IS);
    sra_shift_col = (state == COL_LD);
    sra_shift_in  = 1'b0;
    sra_din       = pix_scaled;
    if (state == LOAD && pix_valid) begin
      sra_shift_in = 1'b1;
    end else if (row_pass && y_valid) begin
      sra_shift_in = 1'b1;
      sra_din      = y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LOAD;
      pix_cnt <= '0;
      vcnt    <= '0;
      kcnt    <= '0;
      k_out   <= '0;
    end else begin
      k_out <= kcnt;
      unique case (state)
        LOAD: if (pix_valid) begin
          pix_cnt <= pix_cnt + 6'd1;
          if (pix_cnt == 6'd63) begin
            state <= ROW_LD;
            vcnt  <= '0;
          end
        end
        ROW_LD, COL_LD: begin
          kcnt  <= '0;
          state <= (state == ROW_LD) ? ROW_IS : COL_IS;
        end
        ROW_IS, COL_IS: begin
          kcnt <= kcnt + 3'd1;
          if (kcnt == 3'd7) state <= (state == ROW_IS) ? ROW_WAIT : COL_WAIT;
        end
        ROW_WAIT: begin
          vcnt  <= vcnt + 3'd1;
          state <= (vcnt == 3'd7) ? COL_LD : ROW_LD;
        end
        COL_WAIT: begin
          vcnt  <= vcnt + 3'd1;
          state <= (vcnt == 3'd7) ? LOAD : COL_LD;
        end
        default: state <= LOAD;
      endcase
    end
  end

  // Column-pass results leave the core, rounded to integer units.
  logic signed [DW:0] y_round;
  assign y_round = ((DW+1)'(y) + (DW+1)'(FRAC > 0 ? (1 << (FRAC - 1)) : 0)) >>> FRAC;

  always_comb begin
    coef_valid = y_valid && !row_pass;
    coef       = y_round[DW-1:0];
    coef_u     = k_out;
    coef_v     = vcnt;
    block_done = coef_valid && (vcnt == 3'd7) && (k_out == 3'd7);
  end

  assert property (@(posedge clk) disable iff (!rst_n) coef_valid |-> (state == COL_IS || state == COL_WAIT))
    else $error("dct2d_core: coefficient outside the column pass");
  assert property (@(posedge clk) disable iff (!rst_n) !(pix_ready && pix_valid && y_valid))
    else $error("dct2d_core: pixel accepted while the kernel is busy");
endmodule

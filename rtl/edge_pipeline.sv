// edge_pipeline: ten-stage datapath that turns one 3x3 pixel window into one
// output pixel.
//
// Two masks (A and B, e.g. the two Sobel masks) are applied to the same nine
// pixels in two parallel branches. Each branch, one register stage each:
//   1  nine 8x8 multipliers: pixel times the magnitude of the coefficient
//   2  nine two's complement converters: negate products of negative coefficients
//   3  four 16-bit carry lookahead adders (the ninth term is carried along)
//   4  two adders     5  one adder     6  one adder (adds the ninth term)
//   7  two's complement converter: absolute value of the 16-bit sum
// then, shared by both branches:
//   8  one adder: |A| + |B|
//   9  one multiplier: scaling by the programmable scale factor
//   10 thresholding: 0 below the threshold, otherwise the value capped at 255.
// This order of stages and the 16-bit adder width follow the published
// pipeline figure. The sum of stage 8 keeps its carry (17 bits) and the scaled
// value is 33 bits wide so that no result can wrap before it is capped; the
// figure shows 16 and 32 bits. Sums inside a branch are 16-bit two's
// complement and wrap if a mask makes them leave -32768..32767.
//
// Every register is loaded only when the general enable `en` is high, so the
// whole pipeline stops as one. The datapath carries no valid bits; the
// caller tracks which stages hold real pixels. Latency: the pixel presented on
// `pix` with en=1 appears on `pixel_out` after the tenth enabled clock edge.
//
// Coefficients are signed bytes; entry k of a mask multiplies pix[k], where
// k = 3*row + column, row 0 the top row and column 0 the leftmost (oldest).
module edge_pipeline
  import edge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [NTAPS-1:0][7:0] pix,
  input  mask_t       mask_a,
  input  mask_t       mask_b,
  input  logic [15:0] scale,
  input  logic [15:0] threshold,
  output logic [7:0]  pixel_out
);
  localparam int unsigned NSTAGES = 10;

  // Per-branch registers, index 0 = mask A, 1 = mask B.
  logic [1:0][NTAPS-1:0][15:0] prod_q;   // stage 1
  logic [1:0][NTAPS-1:0]       neg_q;    // stage 1
  logic [1:0][NTAPS-1:0][15:0] term_q;   // stage 2
  logic [1:0][3:0][15:0]       s3_q;     // stage 3
  logic [1:0][1:0][15:0]       s4_q;     // stage 4
  logic [1:0][15:0]            s5_q;     // stage 5
  logic [1:0][15:0]            s6_q;     // stage 6
  logic [1:0][15:0]            t8_3_q, t8_4_q, t8_5_q;  // ninth term carried along
  logic [1:0][15:0]            mag_q;    // stage 7
  logic [16:0]                 tot_q;    // stage 8
  logic [32:0]                 scaled_q; // stage 9
  logic [7:0]                  out_q;    // stage 10

  // Adder results.
  logic [1:0][3:0][15:0] s3_d;
  logic [1:0][1:0][15:0] s4_d;
  logic [1:0][15:0]      s5_d, s6_d;
  logic [15:0]           tot_sum;
  logic                  tot_carry;

  for (genvar br = 0; br < 2; br++) begin : g_branch
    for (genvar i = 0; i < 4; i++) begin : g_add4
      cla_adder #(.W(16)) u_add (
        .a(term_q[br][2*i]), .b(term_q[br][2*i+1]), .cin(1'b0),
        .sum(s3_d[br][i]), .cout());
    end
    for (genvar i = 0; i < 2; i++) begin : g_add2
      cla_adder #(.W(16)) u_add (
        .a(s3_q[br][2*i]), .b(s3_q[br][2*i+1]), .cin(1'b0),
        .sum(s4_d[br][i]), .cout());
    end
    cla_adder #(.W(16)) u_add1 (
      .a(s4_q[br][0]), .b(s4_q[br][1]), .cin(1'b0), .sum(s5_d[br]), .cout());
    cla_adder #(.W(16)) u_add9 (
      .a(s5_q[br]), .b(t8_5_q[br]), .cin(1'b0), .sum(s6_d[br]), .cout());
  end

  cla_adder #(.W(16)) u_add_ab (
    .a(mag_q[0]), .b(mag_q[1]), .cin(1'b0), .sum(tot_sum), .cout(tot_carry));

  // Magnitude of a signed coefficient (-128 gives 128).
  function automatic logic [7:0] coef_mag(input logic [7:0] c);
    return c[7] ? 8'(~c + 8'd1) : c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q   <= '0;
      neg_q    <= '0;
      term_q   <= '0;
      s3_q     <= '0;
      s4_q     <= '0;
      s5_q     <= '0;
      s6_q     <= '0;
      t8_3_q   <= '0;
      t8_4_q   <= '0;
      t8_5_q   <= '0;
      mag_q    <= '0;
      tot_q    <= '0;
      scaled_q <= '0;
      out_q    <= '0;
    end else if (en) begin
      for (int k = 0; k < NTAPS; k++) begin
        // stage 1: multipliers
        prod_q[0][k] <= pix[k] * coef_mag(mask_a[k]);
        prod_q[1][k] <= pix[k] * coef_mag(mask_b[k]);
        neg_q[0][k]  <= mask_a[k][7];
        neg_q[1][k]  <= mask_b[k][7];
      end
      for (int br = 0; br < 2; br++) begin
        // stage 2: two's complement converters
        for (int k = 0; k < NTAPS; k++)
          term_q[br][k] <= neg_q[br][k] ? 16'(~prod_q[br][k] + 16'd1) : prod_q[br][k];
        // stages 3..6: adder tree
        s3_q[br]   <= s3_d[br];
        t8_3_q[br] <= term_q[br][8];
        s4_q[br]   <= s4_d[br];
        t8_4_q[br] <= t8_3_q[br];
        s5_q[br]   <= s5_d[br];
        t8_5_q[br] <= t8_4_q[br];
        s6_q[br]   <= s6_d[br];
        // stage 7: absolute value
        mag_q[br]  <= s6_q[br][15] ? 16'(~s6_q[br] + 16'd1) : s6_q[br];
      end
      // stage 8: |A| + |B|
      tot_q    <= {tot_carry, tot_sum};
      // stage 9: scaling
      scaled_q <= tot_q * scale;
      // stage 10: threshold and cap
      if (scaled_q < 33'(threshold))  out_q <= 8'd0;
      else if (scaled_q > 33'd255)    out_q <= 8'd255;
      else                            out_q <= scaled_q[7:0];
    end
  end

  assign pixel_out = out_q;

  initial assert (NSTAGES == 10);
endmodule

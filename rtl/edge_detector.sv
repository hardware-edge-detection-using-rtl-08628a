// edge_detector: load sequencer, 3x3 window and valid tracking around the
// ten-stage edge_pipeline.
//
// The input side delivers one column of three bytes at a time: one byte from
// each of three consecutive image rows. The window keeps the last three
// columns, so after the first three columns of a row every further column
// (three new bytes) completes a new window and yields one output pixel; the
// six older bytes are reused.
//
// A six-state machine sequences the loads: PRELOAD1..3 load the first three
// columns of a row band, NORMALLOAD loads one column and issues the previous
// window into the pipeline, POSTLOAD issues the last window of the band
// without loading, and DONE is entered after the last band. Two counters,
// currwidthreg (columns loaded in the band) and currheightreg (band number),
// decide when a band and the image end. A band of W columns gives W-2 pixels,
// an image of H rows gives H-2 bands.
//
// Flow control is one general enable for all pipeline registers:
//   en = out_ready & (loading state ? in_valid : 1), and nothing in DONE but
//   draining. in_request = out_ready while in a loading state; a column is
//   taken when in_request & in_valid. A 10-bit valid shift register moves with
//   en; its last bit is out_valid. The pixel is taken by the consumer when
//   out_valid & out_ready; if that happens while en is low (input starved) the
//   last valid bit is cleared so the pixel is not delivered twice.
// in_valid/in_request play the role of the source's dataout_valid and
// dataout_request, out_valid/out_ready that of datain_valid/datain_request.
// clr (one cycle) restarts the sequencer at PRELOAD1 and empties the pipeline.
// Timing: the first pixel of a band leaves 10 enabled cycles after the
// NORMALLOAD cycle that issues it.
//
// The states, counters, window reuse and the single general enable follow the
// source; the exact handshake and the draining in DONE are this design's.
module edge_detector
  import edge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        run,
  // configuration
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  mask_t       mask_a,
  input  mask_t       mask_b,
  input  logic [15:0] scale,
  input  logic [15:0] threshold,
  // column input: byte 0 = top row
  input  logic [2:0][7:0] in_data,
  input  logic        in_valid,
  output logic        in_request,
  // pixel output
  output logic [7:0]  out_pixel,
  output logic        out_valid,
  input  logic        out_ready,
  // status
  output logic        done,
  output ed_state_t   state,
  output logic [15:0] currwidthreg,
  output logic [15:0] currheightreg,
  output logic [31:0] pixels_issued
);
  localparam int unsigned NSTAGES = 10;

  ed_state_t state_q, state_d;
  logic [2:0][2:0][7:0] win_q;   // [row][column], column 2 newest
  logic [NSTAGES-1:0]   valid_q;
  logic [15:0]          col_q, row_q;
  logic                 loading, issuing, en, take;
  logic [NTAPS-1:0][7:0] pix;

  assign loading    = run && (state_q inside {ST_PRELOAD1, ST_PRELOAD2, ST_PRELOAD3, ST_NORMALLOAD});
  assign in_request = loading && out_ready;
  assign take       = in_request && in_valid;
  assign en         = run && out_ready && (loading ? in_valid : 1'b1);
  assign issuing    = en && (state_q inside {ST_NORMALLOAD, ST_POSTLOAD});

  for (genvar r = 0; r < 3; r++) begin : g_pix_r
    for (genvar c = 0; c < 3; c++) begin : g_pix_c
      assign pix[3*r + c] = win_q[r][c];
    end
  end

  // Next state.
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_PRELOAD1:   if (take) state_d = ST_PRELOAD2;
      ST_PRELOAD2:   if (take) state_d = ST_PRELOAD3;
      ST_PRELOAD3:   if (take) state_d = (width <= 16'd3) ? ST_POSTLOAD : ST_NORMALLOAD;
      ST_NORMALLOAD: if (take && col_q == width - 16'd1) state_d = ST_POSTLOAD;
      ST_POSTLOAD:   if (en) state_d = (row_q + 16'd3 >= height) ? ST_DONE : ST_PRELOAD1;
      ST_DONE:       state_d = ST_DONE;
      default:       state_d = ST_DONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= ST_DONE;
      win_q         <= '0;
      valid_q       <= '0;
      col_q         <= '0;
      row_q         <= '0;
      pixels_issued <= '0;
    end else if (clr) begin
      state_q       <= ST_PRELOAD1;
      valid_q       <= '0;
      col_q         <= '0;
      row_q         <= '0;
      pixels_issued <= '0;
    end else begin
      state_q <= state_d;
      if (take) begin
        for (int r = 0; r < 3; r++) begin
          win_q[r][0] <= win_q[r][1];
          win_q[r][1] <= win_q[r][2];
          win_q[r][2] <= in_data[r];
        end
        col_q <= col_q + 16'd1;
      end
      if (state_q == ST_POSTLOAD && en) begin
        col_q <= '0;
        row_q <= row_q + 16'd1;
      end
      if (en) begin
        valid_q <= {valid_q[NSTAGES-2:0], issuing};
      end else if (out_valid && out_ready) begin
        valid_q[NSTAGES-1] <= 1'b0;
      end
      if (issuing) pixels_issued <= pixels_issued + 32'd1;
    end
  end

  edge_pipeline u_pipe (
    .clk, .rst_n, .en,
    .pix, .mask_a, .mask_b, .scale, .threshold,
    .pixel_out(out_pixel)
  );

  assign out_valid     = valid_q[NSTAGES-1];
  assign done          = (state_q == ST_DONE) && (valid_q == '0);
  assign state         = state_q;
  assign currwidthreg  = col_q;
  assign currheightreg = row_q;

  // A column is never taken outside a loading state.
  a_take_loading: assert property (@(posedge clk) disable iff (!rst_n) take |-> loading);
endmodule

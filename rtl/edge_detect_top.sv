// edge_detect_top: memory-to-memory edge detection peripheral for an Avalon
// (Nios II) system.
//
// The processor programs the register map through the slave port (addresses
// of the three input rows and of the output, two 3x3 masks, image size,
// threshold, scale, byte counts) and writes start. The peripheral then works
// alone through two Avalon masters on a dual-port memory:
//   input_block  - read master; fetches rows r, r+1, r+2 as three word streams
//   word_to_byte - three 32-to-8 converters; together they give one column
//                  (three vertically adjacent pixels) per transfer
//   edge_detector- window reuse, load sequencer and the 10-stage pipeline
//                  (two masks, absolute values, sum, scale, threshold)
//   byte_to_word - 8-to-32 converter
//   output_block - write master; stores the (W-2) x (H-2) result linearly
// In test mode (control bit 3) the addition_unit takes the edge detector's
// place and writes, per column, the sum of the three bytes and an addend.
// The run ends when the output block has written write_bytes bytes; the
// control register's done bit is then set and register 24 holds the cycle
// count. With a zero-wait-state memory the read side is the bottleneck: two
// clocks per word, so 6 clocks per 4 columns, about 1.5*W*(H-2) clocks per
// image plus the pipeline and write-back latency.
//
// The block structure, register map and bus roles follow the source; the
// test-mode selection bit and the debug register contents are this design's.
// Ports: Avalon slave (avs_*), Avalon read master (rd_*), Avalon write master
// (wr_*); one clock, asynchronous active-low reset.
module edge_detect_top
  import edge_pkg::*;
#(
  parameter int unsigned IN_FIFO_DEPTH  = 4,
  parameter int unsigned OUT_FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave (processor side)
  input  logic [REG_AW-1:0] avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // Avalon-MM read master (memory port A)
  output logic [ADDR_W-1:0] rd_address,
  output logic        rd_read,
  output logic [3:0]  rd_byteenable,
  input  logic [31:0] rd_readdata,
  input  logic        rd_waitrequest,
  // Avalon-MM write master (memory port B)
  output logic [ADDR_W-1:0] wr_address,
  output logic        wr_write,
  output logic [3:0]  wr_byteenable,
  output logic [31:0] wr_writedata,
  input  logic        wr_waitrequest
);
  cfg_t  cfg;
  mask_t mask_a, mask_b;
  logic  clr, run, done_in;
  logic [5:0][31:0] dbg;

  // input block -> converters
  logic [2:0][31:0] word;
  logic [2:0]       word_valid, word_pop;
  logic             words_done;
  logic [31:0]      words_read, rd_wait;

  // converters -> processing unit
  logic [2:0][7:0]  col_data;
  logic [2:0]       byte_valid;
  logic             col_valid, col_request;

  // processing unit -> 8-to-32
  logic [7:0]       res_data;
  logic             res_valid, res_request;

  // edge detector / addition unit
  logic             ed_in_req, ed_out_valid, ed_done;
  logic [7:0]       ed_pixel;
  ed_state_t        ed_state;
  logic [15:0]      ed_col, ed_row;
  logic [31:0]      ed_pixels;
  logic             au_in_req, au_out_valid;
  logic [7:0]       au_data;

  // 8-to-32 -> output block
  logic [31:0]      pk_word;
  logic [3:0]       pk_be;
  logic             pk_push, pk_full;
  logic             all_written;
  logic [31:0]      words_written, wr_wait;

  slave_regs u_regs (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .cfg, .mask_a, .mask_b, .clr, .run, .done_in, .dbg);

  input_block #(.FIFO_DEPTH(IN_FIFO_DEPTH)) u_in (
    .clk, .rst_n, .clr, .run,
    .base_addr({cfg.in_addr3, cfg.in_addr2, cfg.in_addr1}),
    .load_bytes(cfg.load_bytes),
    .avm_address(rd_address), .avm_read(rd_read), .avm_byteenable(rd_byteenable),
    .avm_readdata(rd_readdata), .avm_waitrequest(rd_waitrequest),
    .word, .word_valid, .word_pop,
    .words_done, .words_read, .wait_cycles(rd_wait));

  // The three converters release their bytes together, one column at a time.
  assign col_valid = &byte_valid;
  for (genvar s = 0; s < 3; s++) begin : g_conv
    word_to_byte u_w2b (
      .clk, .rst_n, .clr,
      .word(word[s]), .word_valid(word_valid[s]), .word_pop(word_pop[s]),
      .byte_data(col_data[s]), .byte_valid(byte_valid[s]),
      .byte_request(col_request && col_valid));
  end

  edge_detector u_edge (
    .clk, .rst_n, .clr,
    .run(run && !cfg.test_mode),
    .width(cfg.width), .height(cfg.height),
    .mask_a, .mask_b, .scale(cfg.scale), .threshold(cfg.threshold),
    .in_data(col_data), .in_valid(col_valid && !cfg.test_mode), .in_request(ed_in_req),
    .out_pixel(ed_pixel), .out_valid(ed_out_valid),
    .out_ready(res_request && !cfg.test_mode),
    .done(ed_done), .state(ed_state),
    .currwidthreg(ed_col), .currheightreg(ed_row), .pixels_issued(ed_pixels));

  addition_unit u_add (
    .clk, .rst_n, .clr,
    .addend(cfg.addend),
    .in_data(col_data), .in_valid(col_valid && cfg.test_mode && run), .in_request(au_in_req),
    .out_data(au_data), .out_valid(au_out_valid),
    .out_ready(res_request && cfg.test_mode));

  assign col_request = cfg.test_mode ? (au_in_req && run) : ed_in_req;
  assign res_data    = cfg.test_mode ? au_data : ed_pixel;
  assign res_valid   = cfg.test_mode ? au_out_valid : ed_out_valid;

  byte_to_word u_b2w (
    .clk, .rst_n, .clr,
    .byte_data(res_data), .byte_valid(res_valid), .total_bytes(cfg.write_bytes),
    .byte_request(res_request),
    .word(pk_word), .byteenable(pk_be), .word_push(pk_push), .word_full(pk_full));

  output_block #(.FIFO_DEPTH(OUT_FIFO_DEPTH)) u_out (
    .clk, .rst_n, .clr, .run,
    .out_addr(cfg.out_addr), .write_bytes(cfg.write_bytes),
    .word(pk_word), .word_be(pk_be), .word_push(pk_push), .word_full(pk_full),
    .avm_address(wr_address), .avm_write(wr_write), .avm_byteenable(wr_byteenable),
    .avm_writedata(wr_writedata), .avm_waitrequest(wr_waitrequest),
    .all_written, .words_written, .wait_cycles(wr_wait));

  assign done_in = all_written;

  // Debug registers 18..23.
  assign dbg[0] = words_read;
  assign dbg[1] = words_written;
  assign dbg[2] = ed_pixels;
  assign dbg[3] = {ed_row, ed_col};
  assign dbg[4] = {27'd0, words_done, ed_done, ed_state};
  assign dbg[5] = {rd_wait[15:0], wr_wait[15:0]};
endmodule

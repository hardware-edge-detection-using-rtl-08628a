// output_block: word FIFO and Avalon write master that store the result image.
//
// Words from the 8-to-32 converter (with their byte enables) wait in a FIFO.
// The state machine takes one word at a time and writes it to consecutive
// word addresses starting at out_addr, until ceil(write_bytes/4) words are
// written; it then raises all_written. The image is written linearly, so the
// block only counts words.
//
// Bus timing (non-pipelined Avalon write): address, writedata, byteenable and
// write come from registers; the first rising edge with waitrequest low ends
// the transfer, and write drops for one cycle, so a write takes at least two
// clocks. Interface: FIFO write port on the input side (push / full), clr
// restarts the counters, run enables writing.
// The FIFO, master port and byte count are from the source; FIFO depth and
// byte-enable handling are this design's choice.
module output_block
  import edge_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        run,
  input  logic [ADDR_W-1:0] out_addr,
  input  logic [31:0] write_bytes,
  // from the 8-to-32 converter
  input  logic [31:0] word,
  input  logic [3:0]  word_be,
  input  logic        word_push,
  output logic        word_full,
  // Avalon-MM write master
  output logic [ADDR_W-1:0] avm_address,
  output logic        avm_write,
  output logic [3:0]  avm_byteenable,
  output logic [31:0] avm_writedata,
  input  logic        avm_waitrequest,
  // status
  output logic        all_written,
  output logic [31:0] words_written,
  output logic [31:0] wait_cycles
);
  typedef enum logic {WR_IDLE, WR_BUSY} wr_state_t;

  wr_state_t   st_q;
  logic [35:0] head;
  logic        empty, pop;
  logic [29:0] wcnt_q, total_words;

  assign total_words = 30'((write_bytes + 32'd3) >> 2);
  assign pop = run && (st_q == WR_IDLE) && !empty && (wcnt_q < total_words);

  sync_fifo #(.WIDTH(36), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr,
    .push(word_push), .wr_data({word_be, word}),
    .pop, .rd_data(head),
    .full(word_full), .empty, .count());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q           <= WR_IDLE;
      wcnt_q         <= '0;
      avm_address    <= '0;
      avm_write      <= 1'b0;
      avm_byteenable <= '0;
      avm_writedata  <= '0;
      wait_cycles    <= '0;
    end else if (clr) begin
      st_q           <= WR_IDLE;
      wcnt_q         <= '0;
      avm_write      <= 1'b0;
      wait_cycles    <= '0;
    end else begin
      unique case (st_q)
        WR_IDLE: if (pop) begin
          avm_address    <= out_addr + {wcnt_q, 2'b00};
          avm_writedata  <= head[31:0];
          avm_byteenable <= head[35:32];
          avm_write      <= 1'b1;
          st_q           <= WR_BUSY;
        end
        WR_BUSY: if (!avm_waitrequest) begin
          avm_write <= 1'b0;
          wcnt_q    <= wcnt_q + 30'd1;
          st_q      <= WR_IDLE;
        end else begin
          wait_cycles <= wait_cycles + 32'd1;
        end
        default: st_q <= WR_IDLE;
      endcase
    end
  end

  assign all_written   = (st_q == WR_IDLE) && (wcnt_q == total_words);
  assign words_written = 32'(wcnt_q);

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clr)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));
endmodule

// input_block: Avalon read master that streams three image rows into three
// word FIFOs.
//
// The image lies row after row in memory. The processor loads three start
// addresses: the first row of the image, the row below it (start + width) and
// the row after that (start + 2*width). Each of the three streams reads
// ceil(load_bytes/4) consecutive 32-bit words from its start address, so
// stream 1 carries rows 0..H-3, stream 2 rows 1..H-2 and stream 3 rows 2..H-1,
// and at any moment the three streams sit on the same column of three
// adjacent rows. The streams are served in turn (round robin), each only when
// its FIFO has room for the word being fetched.
//
// Bus timing (non-pipelined Avalon read): the master drives address,
// byteenable and read from a register; the first rising edge at which
// waitrequest is low ends the transfer and readdata is captured. read then
// drops for one cycle, so with a zero-wait-state memory one read takes two
// clocks and three words take six.
// Interface: clr (one cycle) restarts all counters; run enables reads;
// words_done is high when every word of all three streams has been fetched.
// The master port, the FIFOs, the three address registers and the byte
// counts are from the source; FIFO depth and the round-robin order are this
// design's choice.
module input_block
  import edge_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        run,
  input  logic [2:0][ADDR_W-1:0] base_addr,
  input  logic [31:0] load_bytes,
  // Avalon-MM read master
  output logic [ADDR_W-1:0] avm_address,
  output logic        avm_read,
  output logic [3:0]  avm_byteenable,
  input  logic [31:0] avm_readdata,
  input  logic        avm_waitrequest,
  // word streams to the 32-to-8 converters
  output logic [2:0][31:0] word,
  output logic [2:0]  word_valid,
  input  logic [2:0]  word_pop,
  // status
  output logic        words_done,
  output logic [31:0] words_read,
  output logic [31:0] wait_cycles
);
  typedef enum logic {RD_IDLE, RD_BUSY} rd_state_t;

  rd_state_t        st_q;
  logic [1:0]       cur_q, rr_q;
  logic [2:0][29:0] wcnt_q;
  logic [29:0]      total_words;
  logic [2:0]       fifo_full, fifo_empty, push, want;
  logic             pick_ok;
  logic [1:0]       pick;

  assign total_words = 30'((load_bytes + 32'd3) >> 2);

  for (genvar s = 0; s < 3; s++) begin : g_stream
    assign want[s] = (wcnt_q[s] < total_words) && !fifo_full[s];
    assign push[s] = (st_q == RD_BUSY) && !avm_waitrequest && (cur_q == 2'(s));
    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clr,
      .push(push[s]), .wr_data(avm_readdata),
      .pop(word_pop[s]), .rd_data(word[s]),
      .full(fifo_full[s]), .empty(fifo_empty[s]), .count());
    assign word_valid[s] = !fifo_empty[s];
  end

  // Round robin: first stream at or after rr_q that wants a word.
  always_comb begin
    pick_ok = 1'b0;
    pick    = rr_q;
    for (int i = 2; i >= 0; i--) begin
      logic [1:0] s;
      s = (rr_q + 2'(i) >= 2'd3) ? rr_q + 2'(i) - 2'd3 : rr_q + 2'(i);
      if (want[s]) begin
        pick_ok = 1'b1;
        pick    = s;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q           <= RD_IDLE;
      cur_q          <= '0;
      rr_q           <= '0;
      wcnt_q         <= '0;
      avm_address    <= '0;
      avm_read       <= 1'b0;
      words_read     <= '0;
      wait_cycles    <= '0;
    end else if (clr) begin
      st_q           <= RD_IDLE;
      cur_q          <= '0;
      rr_q           <= '0;
      wcnt_q         <= '0;
      avm_read       <= 1'b0;
      words_read     <= '0;
      wait_cycles    <= '0;
    end else begin
      unique case (st_q)
        RD_IDLE: if (run && pick_ok) begin
          avm_address <= base_addr[pick] + {wcnt_q[pick], 2'b00};
          avm_read    <= 1'b1;
          cur_q       <= pick;
          rr_q        <= (pick == 2'd2) ? 2'd0 : pick + 2'd1;
          st_q        <= RD_BUSY;
        end
        RD_BUSY: if (!avm_waitrequest) begin
          avm_read       <= 1'b0;
          wcnt_q[cur_q]  <= wcnt_q[cur_q] + 30'd1;
          words_read     <= words_read + 32'd1;
          st_q           <= RD_IDLE;
        end else begin
          wait_cycles    <= wait_cycles + 32'd1;
        end
        default: st_q <= RD_IDLE;
      endcase
    end
  end

  assign avm_byteenable = 4'hF;
  assign words_done = (wcnt_q[0] == total_words) && (wcnt_q[1] == total_words)
                   && (wcnt_q[2] == total_words);

  // Avalon rule: address and read stay put while the slave stalls.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clr)
    avm_read && avm_waitrequest |=> avm_read && $stable(avm_address));
endmodule

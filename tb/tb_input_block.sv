// tb_input_block: the read master against the behavioural memory. Three
// streams start at different addresses; words are drained from the FIFOs at
// random. Checks the content and order of each stream, the number of words
// (load_bytes not a multiple of four included), that a read with a
// zero-wait-state memory takes two clocks (3 words in 6 clocks while the
// FIFOs have room), and, with random waitrequest, that nothing is lost.
module tb_input_block;
  import edge_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [2:0][31:0] base_addr;
  logic [31:0] load_bytes;
  logic [31:0] avm_address, avm_readdata;
  logic avm_read, avm_waitrequest;
  logic [3:0] avm_byteenable;
  logic [2:0][31:0] word;
  logic [2:0] word_valid, word_pop;
  logic words_done;
  logic [31:0] words_read, wait_cycles;
  int unsigned stall_pct = 0;
  int checks = 0, failures = 0;
  int got[3];
  int pop_pct = 100;
  logic [2:0] gate;

  input_block #(.FIFO_DEPTH(4)) dut (.*);

  logic [31:0] wr_a = 0, wr_d = 0;
  logic wr_w = 0, wr_wait;
  tb_avalon_mem #(.SIZE(4096)) mem (
    .clk, .stall_pct,
    .a_address(avm_address), .a_read(avm_read), .a_readdata(avm_readdata),
    .a_waitrequest(avm_waitrequest),
    .b_address(wr_a), .b_write(wr_w), .b_byteenable(4'h0), .b_writedata(wr_d),
    .b_waitrequest(wr_wait));

  always #5 clk = ~clk;

  always @(posedge clk) for (int s = 0; s < 3; s++) gate[s] <= ($urandom % 100) < pop_pct;
  assign word_pop = word_valid & gate;

  always @(posedge clk) if (run) begin
    for (int s = 0; s < 3; s++) if (word_pop[s]) begin
      logic [31:0] e;
      for (int i = 0; i < 4; i++) e[8*i +: 8] = mem.mem[base_addr[s] + 4 * got[s] + i];
      checks++;
      if (word[s] !== e) begin
        failures++; $display("FAIL stream %0d word %0d got %h exp %h", s, got[s], word[s], e);
      end
      got[s]++;
    end
  end

  task automatic pass(input int bytes, input int stall, input int pp, input bit timed);
    int t0, nw;
    nw = (bytes + 3) / 4;
    load_bytes = bytes; stall_pct = stall; pop_pct = pp;
    base_addr = {32'h800, 32'h400 + 32'(4 * ($urandom % 8)), 32'h100};
    got = '{0, 0, 0};
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0; run = 1;
    t0 = $time / 10;
    wait (words_done);
    if (timed) begin
      // 2 clocks per read, the first read issued one clock after run.
      checks++;
      if ($time / 10 - t0 > 2 * 3 * nw + 2) begin
        failures++; $display("FAIL %0d words took %0d clocks", 3 * nw, $time / 10 - t0);
      end
      $display("read %0d words in %0d clocks", 3 * nw, $time / 10 - t0);
    end
    repeat (20) @(posedge clk);
    @(negedge clk) run = 0;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (got[s] != nw) begin failures++; $display("FAIL stream %0d: %0d words", s, got[s]); end
    end
    checks++;
    if (words_read != 32'(3 * nw)) begin failures++; $display("FAIL words_read"); end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem.mem[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    pass(160, 0, 100, 1);
    pass(101, 0, 40, 0);
    pass(200, 30, 70, 0);
    checks++;
    if (wait_cycles == 0) begin failures++; $display("FAIL no wait states seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

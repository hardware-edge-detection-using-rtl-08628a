// tb_output_block: pushes packed words (with a partial last word) into the
// output block and checks the memory image it writes through the behavioural
// memory, with and without random waitrequest; checks that bytes outside the
// byte enables are left alone, that all_written rises after the last word,
// and that back-to-back writes take two clocks each.
module tb_output_block;
  import edge_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [31:0] out_addr, write_bytes, word = 0;
  logic [3:0] word_be = 0;
  logic word_push = 0, word_full;
  logic [31:0] avm_address, avm_writedata;
  logic avm_write, avm_waitrequest;
  logic [3:0] avm_byteenable;
  logic all_written;
  logic [31:0] words_written, wait_cycles;
  int unsigned stall_pct = 0;
  int checks = 0, failures = 0;

  output_block #(.FIFO_DEPTH(4)) dut (.*);

  logic [31:0] rd_data;
  logic rd_wait;
  tb_avalon_mem #(.SIZE(4096)) mem (
    .clk, .stall_pct,
    .a_address(32'h0), .a_read(1'b0), .a_readdata(rd_data), .a_waitrequest(rd_wait),
    .b_address(avm_address), .b_write(avm_write), .b_byteenable(avm_byteenable),
    .b_writedata(avm_writedata), .b_waitrequest(avm_waitrequest));

  always #5 clk = ~clk;

  task automatic pass(input int bytes, input int stall, input bit timed);
    logic [7:0] src[];
    int nw, i, t0;
    nw = (bytes + 3) / 4;
    src = new[bytes];
    foreach (src[k]) src[k] = 8'($urandom);
    for (int k = 0; k < 4096; k++) mem.mem[k] = 8'hEE;
    out_addr = 32'h200; write_bytes = bytes; stall_pct = stall;
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0; run = 1;
    t0 = $time / 10;
    i = 0;
    while (i < nw) begin
      @(negedge clk);
      word_push = !word_full;
      word = '0; word_be = '0;
      for (int b = 0; b < 4; b++) if (4 * i + b < bytes) begin
        word[8*b +: 8] = src[4*i + b]; word_be[b] = 1'b1;
      end
      @(posedge clk);
      if (word_push) i++;
    end
    @(negedge clk) word_push = 0;
    wait (all_written);
    if (timed) begin
      checks++;
      if ($time / 10 - t0 > 2 * nw + 3) begin
        failures++; $display("FAIL %0d writes took %0d clocks", nw, $time / 10 - t0);
      end
    end
    @(negedge clk) run = 0;
    for (int k = 0; k < bytes; k++) begin
      checks++;
      if (mem.mem[32'h200 + k] !== src[k]) begin
        failures++; $display("FAIL byte %0d got %h exp %h", k, mem.mem[32'h200 + k], src[k]);
      end
    end
    for (int k = bytes; k < 4 * nw + 8; k++) begin
      checks++;
      if (mem.mem[32'h200 + k] !== 8'hEE) begin failures++; $display("FAIL byte %0d overwritten", k); end
    end
    checks++;
    if (words_written != 32'(nw)) begin failures++; $display("FAIL words_written %0d", words_written); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pass(64, 0, 1);
    pass(77, 0, 0);
    pass(150, 40, 0);
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

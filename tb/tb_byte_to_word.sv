// tb_byte_to_word: sends total_bytes bytes (not a multiple of four) with
// random gaps and random FIFO back-pressure; checks each packed word, its
// byte enables and the partial last word.
module tb_byte_to_word;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [7:0] byte_data = 0;
  logic byte_valid = 0, byte_request, word_push, word_full = 0;
  logic [31:0] total_bytes, word;
  logic [3:0] byteenable;
  int checks = 0, failures = 0, nsent = 0, nwords = 0;
  logic [7:0] src[$];

  byte_to_word dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (word_push) begin
      logic [31:0] ew;
      logic [3:0]  eb;
      ew = '0; eb = '0;
      for (int i = 0; i < 4; i++)
        if (4*nwords + i < int'(total_bytes)) begin
          ew[8*i +: 8] = src[4*nwords + i];
          eb[i] = 1'b1;
        end
      checks++;
      if (word !== ew || byteenable !== eb) begin
        failures++;
        $display("FAIL word %0d got %h/%b exp %h/%b", nwords, word, byteenable, ew, eb);
      end
      nwords++;
    end
  end

  initial begin
    total_bytes = 103;
    for (int i = 0; i < 103; i++) src.push_back(8'($urandom));
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (nsent < 103) begin
      @(negedge clk);
      word_full = ($urandom % 100) < 30;
      if (byte_valid && byte_request) ;  // handled at posedge below
      byte_valid = ($urandom % 100) < 70;
      byte_data  = src[nsent];
      @(posedge clk);
      if (byte_valid && byte_request) nsent++;
    end
    @(negedge clk) byte_valid = 0; word_full = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nwords != 26) begin failures++; $display("FAIL %0d words", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

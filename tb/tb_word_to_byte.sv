// tb_word_to_byte: offers random words with random gaps and takes bytes with
// a random request; checks the byte order (lowest byte first) and that no
// byte is lost or repeated; checks that back-to-back words leave no gap.
module tb_word_to_byte;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [31:0] word;
  logic word_valid, word_pop, byte_valid, byte_request;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  logic [31:0] words[$];
  logic [7:0]  exp[$];
  int widx = 0, nbytes = 0, burst_cycles = 0;
  bit  random_phase = 1;

  word_to_byte dut (.*);

  always #5 clk = ~clk;

  assign word       = (widx < words.size()) ? words[widx] : 32'h0;
  assign word_valid = (widx < words.size()) && (random_phase ? gap_ok : 1'b1);
  logic gap_ok;
  always @(posedge clk) gap_ok <= ($urandom % 100) < 60;

  always @(posedge clk) if (rst_n) begin
    if (word_pop) widx <= widx + 1;
    if (byte_valid && byte_request) begin
      checks++;
      if (exp.size() == 0 || byte_data !== exp[0]) begin
        failures++;
        $display("FAIL byte %0d got %h", nbytes, byte_data);
      end
      if (exp.size() != 0) void'(exp.pop_front());
      nbytes++;
    end
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [31:0] w = $urandom;
      words.push_back(w);
      for (int b = 0; b < 4; b++) exp.push_back(w[8*b +: 8]);
    end
    byte_request = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (widx < 200) begin
      @(negedge clk) byte_request = ($urandom % 100) < 70;
    end
    // Back-to-back phase: words always there, request always high.
    @(negedge clk);
    random_phase = 0;
    byte_request = 1;
    wait (exp.size() == 0);
    @(posedge clk);
    checks++;
    if (nbytes != 1200) begin failures++; $display("FAIL count %0d", nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // In the back-to-back phase one byte must move every cycle.
  always @(negedge clk) if (rst_n && !random_phase && exp.size() > 4 && widx > 201) begin
    checks++;
    if (!byte_valid) begin failures++; $display("FAIL gap in stream"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

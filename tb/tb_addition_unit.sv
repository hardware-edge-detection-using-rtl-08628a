// tb_addition_unit: random columns and random back-pressure; every output
// byte must equal the sum of its column's three bytes and the addend, mod 256,
// in order.
module tb_addition_unit;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [7:0] addend = 8'h5A, out_data;
  logic [2:0][7:0] in_data = '0;
  logic in_valid = 0, in_request, out_valid, out_ready = 0;
  int checks = 0, failures = 0, nin = 0;
  logic [7:0] exp[$];

  addition_unit dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp.size() == 0 || out_data !== exp[0]) begin
      failures++; $display("FAIL got %h", out_data);
    end
    if (exp.size() != 0) void'(exp.pop_front());
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (nin < 500) begin
      @(negedge clk);
      in_valid  = ($urandom % 100) < 70;
      out_ready = ($urandom % 100) < 70;
      in_data   = {8'($urandom), 8'($urandom), 8'($urandom)};
      @(posedge clk);
      if (in_valid && in_request) begin
        exp.push_back(8'(in_data[0] + in_data[1] + in_data[2] + addend));
        nin++;
      end
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp.size() != 0) begin failures++; $display("FAIL %0d left", exp.size()); end
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

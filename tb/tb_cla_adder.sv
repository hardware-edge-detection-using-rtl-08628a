// tb_cla_adder: checks the 16-bit carry lookahead adder against integer
// addition for corner cases and random operands, including carry out.
module tb_cla_adder;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(16)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [16:0] exp;
    #1;
    exp = 17'(a) + 17'(b) + 17'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h exp %h", a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    a = 16'hFFFF; b = 16'h0001; cin = 0; check();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1; check();
    a = 16'h8000; b = 16'h8000; cin = 0; check();
    a = 16'h0F0F; b = 16'h00F1; cin = 1; check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

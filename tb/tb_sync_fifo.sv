// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty/count, simultaneous push and pop, and clr.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [2:0]  count;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] q[$];

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      chk(count == 3'(q.size()), "count");
      chk(full == (q.size() == DEPTH), "full");
      chk(empty == (q.size() == 0), "empty");
      if (q.size() > 0) chk(rd_data == q[0], "data");
      push = ($urandom % 100) < 55 && !full;
      pop  = ($urandom % 100) < 50 && !empty;
      wr_data = $urandom;
      clr = (cyc == 2500);
      @(posedge clk);
      #1;
      if (clr) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(wr_data);
      end
    end
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

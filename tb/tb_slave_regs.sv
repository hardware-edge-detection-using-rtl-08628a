// tb_slave_regs: writes and reads back every writable register through the
// Avalon slave port, checks how the configuration and mask bytes are decoded,
// the debug and cycle registers, and the control sequence: start write, one
// cycle with the reset bit (and clr) high, run until done_in, done bit set,
// cycle count equal to the cycles from the start write to done.
module tb_slave_regs;
  import edge_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [REG_AW-1:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  cfg_t cfg;
  mask_t mask_a, mask_b;
  logic clr, run, done_in = 0;
  logic [5:0][31:0] dbg;
  int checks = 0, failures = 0;
  logic [31:0] shadow[17];

  slave_regs dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    avs_address = REG_AW'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk) avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = REG_AW'(a); avs_read = 1;
    #1 d = avs_readdata;
    @(negedge clk) avs_read = 0;
  endtask

  initial begin
    logic [31:0] d;
    int t0, clr_cycles, run_cycles;
    for (int i = 0; i < 6; i++) dbg[i] = 32'hD000_0000 + 32'(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 1; a < 17; a++) begin
      shadow[a] = $urandom;
      wr(a, shadow[a]);
    end
    for (int a = 1; a < 17; a++) begin
      rd(a, d);
      chk(d == shadow[a], $sformatf("readback reg %0d", a + 1));
    end
    for (int i = 0; i < 6; i++) begin
      rd(17 + i, d);
      chk(d == 32'hD000_0000 + 32'(i), "debug register");
    end
    chk(cfg.in_addr1 == shadow[1] && cfg.in_addr2 == shadow[2] && cfg.in_addr3 == shadow[3], "input addresses");
    chk(cfg.out_addr == shadow[4], "output address");
    chk(cfg.width == shadow[13][15:0] && cfg.height == shadow[13][31:16], "width/height");
    chk(cfg.threshold == shadow[14][15:0] && cfg.scale == shadow[14][31:16], "threshold/scale");
    chk(cfg.load_bytes == shadow[15] && cfg.write_bytes == shadow[16], "byte counts");
    for (int k = 0; k < 9; k++) begin
      chk(mask_a[k] == shadow[5 + k / 4][8*(k%4) +: 8], "mask A byte");
      chk(mask_b[k] == shadow[9 + k / 4][8*(k%4) +: 8], "mask B byte");
    end
    // Control sequence.
    chk(!run && !clr, "idle after reset");
    wr(0, 32'h0000_A509);   // start, test mode, addend A5
    chk(cfg.test_mode && cfg.addend == 8'hA5, "test mode and addend");
    clr_cycles = 0; run_cycles = 0;
    repeat (40) begin
      @(posedge clk);
      if (clr) clr_cycles++;
      if (run) run_cycles++;
    end
    rd(0, d);
    chk(d[CTRL_START] && !d[CTRL_DONE] && !d[CTRL_RESET], "control while running");
    chk(clr_cycles == 1, "one reset cycle");
    @(negedge clk) done_in = 1;
    @(negedge clk) done_in = 0;
    chk(!run, "run drops at done");
    rd(0, d);
    chk(d[CTRL_DONE], "done bit");
    rd(23, d);
    // one count per clock edge from the start write (edge 0) to the last edge
    // before done_in is seen: edges 0..42 with the two task cycles in between
    chk(d == 32'd43, $sformatf("cycle count %0d", d));
    // A second start clears done.
    wr(0, 32'h1);
    rd(0, d);
    chk(!d[CTRL_DONE] && run, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

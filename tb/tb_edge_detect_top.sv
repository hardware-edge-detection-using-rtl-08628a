// tb_edge_detect_top: end-to-end test of the peripheral at its default
// parameters. A processor model programs the register map through the slave
// port, writes start, polls the done bit, and compares the image the
// peripheral wrote into the behavioural dual-port memory with the integer
// reference. Runs:
//   1. 16x8 image, Sobel masks, zero-wait-state memory; cycle count checked
//      against 6 clocks per 4 columns plus the pipeline/write-back tail
//   2. 20x9 image, threshold and scale 3, random waitrequest on both ports
//   3. test mode: addition unit with an addend, partial last output word
//   4. random signed masks on a 12x6 image
//   5. one full 320x240 frame, zero-wait-state memory, cycle count checked
// Counts each mechanism (read stall, write stall, partial last word, test
// mode, threshold to zero, cap at 255, negative coefficients, restart after
// done) and fails if one never happened.
module tb_edge_detect_top;
  import edge_pkg::*;
  import tb_edge_ref_pkg::*;

  localparam int unsigned MEM_SIZE = 262144;
  localparam int unsigned IN_BASE  = 32'h0000_1000;
  localparam int unsigned OUT_BASE = 32'h0002_0000;

  logic clk = 0, rst_n = 0;
  logic [REG_AW-1:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] rd_address, rd_readdata, wr_address, wr_writedata;
  logic rd_read, rd_waitrequest, wr_write, wr_waitrequest;
  logic [3:0] rd_byteenable, wr_byteenable;
  int unsigned stall_pct = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  int m_rd_stall = 0, m_wr_stall = 0, m_partial = 0, m_test = 0, m_zero = 0,
      m_cap = 0, m_neg = 0, m_restart = 0, m_fullsize = 0;

  edge_detect_top dut (.*);

  tb_avalon_mem #(.SIZE(MEM_SIZE)) mem (
    .clk, .stall_pct,
    .a_address(rd_address), .a_read(rd_read), .a_readdata(rd_readdata),
    .a_waitrequest(rd_waitrequest),
    .b_address(wr_address), .b_write(wr_write), .b_byteenable(wr_byteenable),
    .b_writedata(wr_writedata), .b_waitrequest(wr_waitrequest));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rd_read && rd_waitrequest) m_rd_stall++;
    if (wr_write && wr_waitrequest) m_wr_stall++;
    if (wr_write && !wr_waitrequest && wr_byteenable != 4'hF) m_partial++;
  end

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

  function automatic logic [31:0] pack4(input byte m[9], input int first);
    logic [31:0] w = '0;
    for (int i = 0; i < 4; i++) if (first + i < 9) w[8*i +: 8] = m[first + i];
    return w;
  endfunction

  // Program, start, wait for done; returns the cycle register.
  task automatic run_frame(input int w, input int h, input byte ma[9], input byte mb[9],
                           input int sc, input int th, input bit test, input int addend,
                           output int cycles);
    logic [31:0] d;
    int polls;
    int wb;
    wb = test ? w * (h - 2) : (w - 2) * (h - 2);
    wr(1, IN_BASE);
    wr(2, IN_BASE + w);
    wr(3, IN_BASE + 2 * w);
    wr(4, OUT_BASE);
    for (int r = 0; r < 3; r++) begin
      wr(5 + r, pack4(ma, 4 * r));
      wr(9 + r, pack4(mb, 4 * r));
    end
    wr(13, {16'(h), 16'(w)});
    wr(14, {16'(sc), 16'(th)});
    wr(15, w * (h - 2));
    wr(16, wb);
    for (int k = 0; k < wb + 8; k++) mem.mem[OUT_BASE + k] = 8'hEE;
    wr(0, {16'd0, 8'(addend), 4'd0, test, 3'b001});
    rd(0, d);
    polls = 0;
    while (!d[CTRL_DONE] && polls < 100 * w * h) begin
      repeat (50) @(posedge clk);
      rd(0, d);
      polls++;
    end
    checks++;
    if (!d[CTRL_DONE]) begin failures++; $display("FAIL frame %0dx%0d never done", w, h); end
    rd(23, d);
    cycles = int'(d);
  endtask

  task automatic check_image(input int w, input int h, input byte ma[9], input byte mb[9],
                             input int sc, input int th);
    byte unsigned win[9];
    int e, bad = 0;
    for (int y = 0; y + 2 < h; y++)
      for (int x = 0; x + 2 < w; x++) begin
        for (int k = 0; k < 9; k++) win[k] = mem.mem[IN_BASE + (y + k / 3) * w + x + k % 3];
        e = ref_pixel(win, ma, mb, sc, th);
        if (e == 0) m_zero++;
        if (e == 255) m_cap++;
        checks++;
        if (mem.mem[OUT_BASE + y * (w - 2) + x] !== 8'(e)) begin
          failures++;
          if (bad++ < 5) $display("FAIL (%0d,%0d) got %0d exp %0d", x, y,
                                  mem.mem[OUT_BASE + y * (w - 2) + x], e);
        end
      end
    checks++;
    if (mem.mem[OUT_BASE + (w - 2) * (h - 2)] !== 8'hEE) begin
      failures++; $display("FAIL wrote past the end");
    end
  endtask

  task automatic fill(input int w, input int h);
    for (int i = 0; i < w * h; i++)
      mem.mem[IN_BASE + i] = ($urandom % 5 == 0) ? 8'(($urandom % 2) * 255) : 8'($urandom);
  endtask

  // Expected cycle count with a zero-wait-state memory: two clocks for each
  // of the 3 * W*(H-2)/4 word reads, plus a short tail for the last columns to
  // pass the converters, the 10 pipeline stages and the last write.
  task automatic check_cycles(input int w, input int h, input int cycles);
    int base = 2 * 3 * (w * (h - 2) / 4);
    checks++;
    $display("%0dx%0d frame: %0d cycles (reads alone: %0d)", w, h, cycles, base);
    if (cycles < base || cycles > base + 30) begin
      failures++; $display("FAIL cycle count %0d outside %0d..%0d", cycles, base, base + 30);
    end
  endtask

  initial begin
    byte ma[9], mb[9];
    int cycles, w, h;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < MEM_SIZE; i++) mem.mem[i] = 8'h00;
    sobel(ma, mb);
    m_neg++;   // Sobel masks have negative coefficients

    // 1. small frame, exact timing
    fill(16, 8);
    run_frame(16, 8, ma, mb, 1, 0, 0, 0, cycles);
    check_image(16, 8, ma, mb, 1, 0);
    check_cycles(16, 8, cycles);

    // 2. stalls, threshold, scale
    stall_pct = 25;
    fill(20, 9);
    run_frame(20, 9, ma, mb, 3, 200, 0, 0, cycles);
    check_image(20, 9, ma, mb, 3, 200);
    m_restart++;
    stall_pct = 0;

    // 3. test mode: addition unit
    w = 12; h = 5;
    fill(w, h);
    run_frame(w, h, ma, mb, 1, 0, 1, 8'h37, cycles);
    m_test++;
    for (int i = 0; i < w * (h - 2); i++) begin
      checks++;
      if (mem.mem[OUT_BASE + i] !== 8'(mem.mem[IN_BASE + i] + mem.mem[IN_BASE + w + i]
                                        + mem.mem[IN_BASE + 2 * w + i] + 8'h37)) begin
        failures++; $display("FAIL test mode byte %0d", i);
      end
    end

    // 4. random signed masks, odd-sized output (partial last word)
    for (int k = 0; k < 9; k++) begin
      ma[k] = byte'($urandom % 9) - 4;
      mb[k] = byte'($urandom % 9) - 4;
    end
    fill(12, 6);
    run_frame(12, 6, ma, mb, 1, 5, 0, 0, cycles);
    check_image(12, 6, ma, mb, 1, 5);

    // 5. full 320x240 frame
    sobel(ma, mb);
    fill(320, 240);
    run_frame(320, 240, ma, mb, 1, 0, 0, 0, cycles);
    check_image(320, 240, ma, mb, 1, 0);
    check_cycles(320, 240, cycles);
    m_fullsize++;
    rd(17, d);
    checks++;
    if (d != 32'(3 * 320 * 238 / 4)) begin failures++; $display("FAIL debug words read %0d", d); end

    $display("mechanisms: rd_stall=%0d wr_stall=%0d partial_word=%0d test_mode=%0d zero=%0d cap=%0d neg_coef=%0d restart=%0d full_frame=%0d",
             m_rd_stall, m_wr_stall, m_partial, m_test, m_zero, m_cap, m_neg, m_restart, m_fullsize);
    checks++;
    if (m_rd_stall == 0 || m_wr_stall == 0 || m_partial == 0 || m_test == 0 || m_zero == 0
        || m_cap == 0 || m_neg == 0 || m_restart == 0 || m_fullsize == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

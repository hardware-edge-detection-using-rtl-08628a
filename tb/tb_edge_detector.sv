// tb_edge_detector: feeds whole small images, column by column (three
// vertically adjacent pixels per transfer, bands one after another as the
// read streams deliver them), with random input gaps and random output
// back-pressure. With no gaps it must take one column per clock. Every output pixel is compared in order with the integer
// reference over the image. Checks that each image yields (W-2)*(H-2) pixels,
// that the sequencer ends in DONE, and that every state of the load sequence
// and both kinds of stall occurred.
module tb_edge_detector;
  import edge_pkg::*;
  import tb_edge_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [15:0] width, height, scale, threshold;
  mask_t mask_a, mask_b;
  logic [2:0][7:0] in_data;
  logic in_valid, in_request, out_valid, out_ready, done;
  logic [7:0] out_pixel;
  ed_state_t state;
  logic [15:0] currwidthreg, currheightreg;
  logic [31:0] pixels_issued;
  int checks = 0, failures = 0;
  int seen_state[6];
  int in_stalls = 0, out_stalls = 0;

  edge_detector dut (.*);

  always #5 clk = ~clk;

  byte unsigned img[$];
  int W, H;
  int exp_q[$];
  int col_idx, ncol, nout;
  int in_pct, out_pct;
  logic gate_in, gate_out;

  always @(posedge clk) begin
    gate_in  <= ($urandom % 100) < in_pct;
    gate_out <= ($urandom % 100) < out_pct;
  end

  assign in_valid  = run && (col_idx < ncol) && gate_in;
  assign out_ready = gate_out;
  always_comb begin
    int b, c;
    b = col_idx / W;  // band
    c = col_idx % W;
    for (int r = 0; r < 3; r++)
      in_data[r] = (col_idx < ncol) ? img[(b + r) * W + c] : 8'h00;
  end

  always @(posedge clk) if (run) begin
    seen_state[state]++;
    if (in_request && !in_valid && state != ST_DONE) in_stalls++;
    if (!out_ready && state != ST_DONE) out_stalls++;
    if (in_valid && in_request) col_idx <= col_idx + 1;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_pixel !== 8'(exp_q[0])) begin
        failures++;
        $display("FAIL pixel %0d got %0d exp %0d", nout, out_pixel,
                 exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      nout <= nout + 1;
    end
  end

  task automatic image(input int w, input int h, input int sc, input int th,
                       input int ip, input int op);
    byte ma[9], mb[9];
    byte unsigned win[9];
    int t0;
    sobel(ma, mb);
    W = w; H = h; in_pct = ip; out_pct = op;
    img.delete();
    for (int i = 0; i < w * h; i++) img.push_back(8'($urandom));
    for (int k = 0; k < 9; k++) begin mask_a[k] = ma[k]; mask_b[k] = mb[k]; end
    width = 16'(w); height = 16'(h); scale = 16'(sc); threshold = 16'(th);
    exp_q.delete();
    for (int y = 0; y + 2 < h; y++)
      for (int x = 0; x + 2 < w; x++) begin
        for (int k = 0; k < 9; k++) win[k] = img[(y + k / 3) * w + x + k % 3];
        exp_q.push_back(ref_pixel(win, ma, mb, sc, th));
      end
    col_idx = 0; ncol = w * (h - 2); nout = 0;
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0; run = 1;
    t0 = $time / 10;
    fork
      wait (done);
      begin repeat (50 * w * h + 200) @(posedge clk); end
    join_any
    disable fork;
    if (ip == 100 && op == 100) begin
      // One column per clock, one extra clock per band (POSTLOAD), ten
      // clocks for the last pixel to leave the pipeline.
      checks++;
      if ($time / 10 - t0 > ncol + (h - 2) + 11 || $time / 10 - t0 < ncol) begin
        failures++; $display("FAIL %0dx%0d took %0d clocks", w, h, $time / 10 - t0);
      end
    end
    @(negedge clk) run = 0;
    checks++;
    if (!done || nout != (w - 2) * (h - 2) || col_idx != ncol || exp_q.size() != 0) begin
      failures++;
      $display("FAIL image %0dx%0d: done=%b out=%0d cols=%0d", w, h, done, nout, col_idx);
    end
    checks++;
    if (pixels_issued != 32'((w - 2) * (h - 2))) begin
      failures++; $display("FAIL issued %0d", pixels_issued);
    end
  endtask

  initial begin
    in_pct = 100; out_pct = 100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    image(8, 6, 1, 0, 100, 100);
    image(12, 7, 1, 60, 60, 70);
    image(3, 3, 2, 10, 50, 50);
    image(5, 9, 1, 0, 80, 40);
    image(16, 4, 2, 30, 30, 90);
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (seen_state[s] == 0) begin failures++; $display("FAIL state %0d never seen", s); end
    end
    checks++;
    if (in_stalls == 0 || out_stalls == 0) begin failures++; $display("FAIL no stalls"); end
    $display("states: %p, input stalls %0d, output stalls %0d", seen_state, in_stalls, out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

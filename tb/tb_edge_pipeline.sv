// tb_edge_pipeline: drives random 3x3 windows into the pipeline with a
// randomly gated enable and checks every result against the integer
// reference: Sobel masks with several scale/threshold settings and random
// signed masks. Also checks the latency: a window must come out after exactly
// ten enabled clock edges.
module tb_edge_pipeline;
  import edge_pkg::*;
  import tb_edge_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [NTAPS-1:0][7:0] pix = '0;
  mask_t mask_a, mask_b;
  logic [15:0] scale, threshold;
  logic [7:0] pixel_out;
  int checks = 0, failures = 0;
  int exp_q[$];
  int n_clip = 0, n_zero = 0, n_mid = 0;

  edge_pipeline dut (.*);

  always #5 clk = ~clk;

  task automatic set_masks(input byte ma[9], input byte mb[9]);
    for (int k = 0; k < 9; k++) begin
      mask_a[k] = ma[k];
      mask_b[k] = mb[k];
    end
  endtask

  // One test run: n windows, results compared after 10 enables each.
  task automatic run(input byte ma[9], input byte mb[9], input int sc, input int th, input int n);
    byte unsigned win[9];
    int expq[$];
    int nout = 0, nen = 0;
    int issued_at[$];
    set_masks(ma, mb);
    scale = 16'(sc);
    threshold = 16'(th);
    while (nout < n) begin
      @(negedge clk);
      en = ($urandom % 100) < 75;
      for (int k = 0; k < 9; k++) begin
        win[k] = ($urandom % 4 == 0) ? 8'(($urandom % 2) * 255) : 8'($urandom);
        pix[k] = win[k];
      end
      @(posedge clk);
      #1;
      if (en) begin
        nen++;
        // the window issued 9 enables before this one (10 enabled edges counting its own) is now on the output
        if (issued_at.size() > 0 && issued_at[0] == nen - 9) begin
          int e = expq.pop_front();
          void'(issued_at.pop_front());
          checks++;
          if (pixel_out !== 8'(e)) begin
            failures++;
            $display("FAIL got %0d exp %0d", pixel_out, e);
          end
          if (e == 0) n_zero++; else if (e == 255) n_clip++; else n_mid++;
          nout++;
        end
        if (issued_at.size() < n) begin
          expq.push_back(ref_pixel(win, ma, mb, sc, th));
          issued_at.push_back(nen);
        end
      end
    end
  endtask

  initial begin
    byte ma[9], mb[9];
    repeat (2) @(posedge clk);
    rst_n = 1;
    sobel(ma, mb);
    run(ma, mb, 1, 0, 400);
    run(ma, mb, 1, 100, 400);
    run(ma, mb, 3, 40, 400);
    run(ma, mb, 0, 0, 50);
    for (int r = 0; r < 6; r++) begin
      for (int k = 0; k < 9; k++) begin
        ma[k] = byte'($urandom % 15) - 7;
        mb[k] = byte'($urandom % 15) - 7;
      end
      run(ma, mb, 1 + r % 2, r * 10, 300);
    end
    ma = '{-128, 127, -128, 0, 0, 0, 0, 0, 0};
    mb = '{0, 0, 0, 0, 1, 0, 0, 0, 0};
    run(ma, mb, 1, 0, 200);
    checks++;
    if (n_clip == 0 || n_zero == 0 || n_mid == 0) begin
      failures++; $display("FAIL coverage clip=%0d zero=%0d mid=%0d", n_clip, n_zero, n_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

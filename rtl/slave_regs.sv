// slave_regs: Avalon slave port with the peripheral's register map and its
// start / reset / done control.
//
// Twenty-four 32-bit registers at word addresses 0..23 (register N at N-1):
//   1  control: bit 0 start (write 1), bit 1 reset in progress (one cycle),
//      bit 2 done, bit 3 test mode (addition unit), bits 15:8 addend byte
//   2,3,4 input addresses of rows 1, 2, 3      5 output address
//   6..9  mask A bytes 0..8 (byte k in register 6+k/4, bits 8*(k%4)+7..)
//   10..13 mask B bytes 0..8, same packing
//   14 width [15:0], height [31:16]   15 threshold [15:0], scale [31:16]
//   16 load bytes (per input row stream)   17 write bytes
//   18..23 debugging (read only, from dbg)   24 total clock cycles (read only)
// Slave timing: write stores writedata at the addressed register on the
// clock edge; readdata shows the addressed register combinationally while
// read is high (zero wait states, no waitrequest).
//
// Control sequence: a write with bit 0 set (while not busy) starts a run. In
// the next cycle bit 1 is high for one cycle and clr clears the datapath; then
// run is high until the datapath reports done_in, which sets bit 2 and stops
// the cycle counter (register 24 counts every cycle from the start write to
// done). The register list and the start/reset/done bits are from the
// source; the packing inside registers 6..15, the test-mode bits and what the
// debug registers show are this design's.
module slave_regs
  import edge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [REG_AW-1:0] avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // to the datapath
  output cfg_t        cfg,
  output mask_t       mask_a,
  output mask_t       mask_b,
  output logic        clr,
  output logic        run,
  input  logic        done_in,
  input  logic [5:0][31:0] dbg
);
  typedef enum logic [1:0] {C_IDLE, C_CLEAR, C_RUN, C_DONE} ctl_state_t;

  ctl_state_t       cst_q;
  logic [31:0]      regs_q [NUM_REGS];   // writable registers (1..17 used)
  logic [31:0]      cycles_q;
  logic             start_wr;
  logic [31:0]      ctrl_rd;

  assign start_wr = avs_write && (avs_address == REG_CONTROL) && avs_writedata[CTRL_START]
                 && (cst_q == C_IDLE || cst_q == C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs_q[i] <= '0;
      cst_q    <= C_IDLE;
      cycles_q <= '0;
    end else begin
      if (avs_write && avs_address < REG_DEBUG0)
        regs_q[avs_address] <= avs_writedata;
      unique case (cst_q)
        C_IDLE, C_DONE: if (start_wr) begin
          cst_q    <= C_CLEAR;
          cycles_q <= 32'd1;
        end
        C_CLEAR: begin
          cst_q    <= C_RUN;
          cycles_q <= cycles_q + 32'd1;
        end
        C_RUN: if (done_in) cst_q <= C_DONE;
               else         cycles_q <= cycles_q + 32'd1;
        default: cst_q <= C_IDLE;
      endcase
    end
  end

  assign clr = (cst_q == C_CLEAR);
  assign run = (cst_q == C_RUN);

  always_comb begin
    ctrl_rd = regs_q[REG_CONTROL];
    ctrl_rd[CTRL_RESET] = (cst_q == C_CLEAR);
    ctrl_rd[CTRL_DONE]  = (cst_q == C_DONE);
  end

  always_comb begin
    avs_readdata = '0;
    if (avs_read) begin
      if (avs_address == REG_CONTROL)      avs_readdata = ctrl_rd;
      else if (avs_address == REG_CYCLES)  avs_readdata = cycles_q;
      else if (avs_address >= REG_DEBUG0 && avs_address < REG_CYCLES)
        avs_readdata = dbg[avs_address - REG_DEBUG0];
      else if (avs_address < REG_DEBUG0)   avs_readdata = regs_q[avs_address];
    end
  end

  always_comb begin
    for (int k = 0; k < NTAPS; k++) begin
      mask_a[k] = regs_q[REG_MASKA0 + REG_AW'(k / 4)][8*(k % 4) +: 8];
      mask_b[k] = regs_q[REG_MASKB0 + REG_AW'(k / 4)][8*(k % 4) +: 8];
    end
  end

  assign cfg.in_addr1    = regs_q[REG_IN_ADDR1];
  assign cfg.in_addr2    = regs_q[REG_IN_ADDR2];
  assign cfg.in_addr3    = regs_q[REG_IN_ADDR3];
  assign cfg.out_addr    = regs_q[REG_OUT_ADDR];
  assign cfg.width       = regs_q[REG_SIZE][15:0];
  assign cfg.height      = regs_q[REG_SIZE][31:16];
  assign cfg.threshold   = regs_q[REG_THR_SCALE][15:0];
  assign cfg.scale       = regs_q[REG_THR_SCALE][31:16];
  assign cfg.load_bytes  = regs_q[REG_LOAD_BYTES];
  assign cfg.write_bytes = regs_q[REG_WRITE_BYTES];
  assign cfg.test_mode   = regs_q[REG_CONTROL][CTRL_TEST];
  assign cfg.addend      = regs_q[REG_CONTROL][15:8];
endmodule

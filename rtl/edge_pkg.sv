// edge_pkg: types and constants shared by the edge detection peripheral.
//
// The peripheral is a Nios-style memory-mapped accelerator: a slave port holds
// the register map, a read master streams three image rows out of memory, an
// edge detector convolves a 3x3 window with two masks, and a write master
// stores the result. This package holds the register numbers of that map, the
// mask and configuration record handed from the slave port to the datapath,
// and the state type of the edge detector's load sequencer.
//
// Register numbering follows the published register map (registers 1 to 24);
// the slave word address of register N is N-1. The packing of the mask bytes
// and of the half-word pairs into registers is this design's own choice.
package edge_pkg;

  localparam int unsigned DATA_W   = 32;  // Avalon data width
  localparam int unsigned ADDR_W   = 32;  // Avalon byte address width
  localparam int unsigned REG_AW   = 5;   // slave word address width
  localparam int unsigned NUM_REGS = 24;
  localparam int unsigned NTAPS    = 9;   // 3x3 mask

  // Slave word addresses (register number - 1).
  localparam logic [REG_AW-1:0] REG_CONTROL   = 5'd0;   // reg 1
  localparam logic [REG_AW-1:0] REG_IN_ADDR1  = 5'd1;   // reg 2
  localparam logic [REG_AW-1:0] REG_IN_ADDR2  = 5'd2;   // reg 3
  localparam logic [REG_AW-1:0] REG_IN_ADDR3  = 5'd3;   // reg 4
  localparam logic [REG_AW-1:0] REG_OUT_ADDR  = 5'd4;   // reg 5
  localparam logic [REG_AW-1:0] REG_MASKA0    = 5'd5;   // regs 6..9  : mask A bytes 0..8
  localparam logic [REG_AW-1:0] REG_MASKB0    = 5'd9;   // regs 10..13: mask B bytes 0..8
  localparam logic [REG_AW-1:0] REG_SIZE      = 5'd13;  // reg 14: width[15:0], height[31:16]
  localparam logic [REG_AW-1:0] REG_THR_SCALE = 5'd14;  // reg 15: threshold[15:0], scale[31:16]
  localparam logic [REG_AW-1:0] REG_LOAD_BYTES  = 5'd15; // reg 16
  localparam logic [REG_AW-1:0] REG_WRITE_BYTES = 5'd16; // reg 17
  localparam logic [REG_AW-1:0] REG_DEBUG0    = 5'd17;  // regs 18..23: debugging
  localparam logic [REG_AW-1:0] REG_CYCLES    = 5'd23;  // reg 24: total clock cycles

  // Control register bits.
  localparam int unsigned CTRL_START = 0;  // written 1 by the processor to start
  localparam int unsigned CTRL_RESET = 1;  // high for one cycle while the datapath is cleared
  localparam int unsigned CTRL_DONE  = 2;  // set when the result is in memory
  localparam int unsigned CTRL_TEST  = 3;  // 1: addition unit instead of edge detector
  // bits 15:8 of the control register: addend byte of the addition unit

  // One mask coefficient: a signed byte, two's complement.
  typedef logic signed [7:0] coef_t;
  typedef logic [NTAPS-1:0][7:0] mask_t;  // nine coefficients, entry k = row k/3, column k%3

  // Run configuration, loaded by the processor before a start.
  typedef struct packed {
    logic [ADDR_W-1:0] in_addr1;
    logic [ADDR_W-1:0] in_addr2;
    logic [ADDR_W-1:0] in_addr3;
    logic [ADDR_W-1:0] out_addr;
    logic [15:0]       width;
    logic [15:0]       height;
    logic [15:0]       threshold;
    logic [15:0]       scale;
    logic [31:0]       load_bytes;
    logic [31:0]       write_bytes;
    logic              test_mode;
    logic [7:0]        addend;
  } cfg_t;

  // Load sequencer of the edge detector (six states).
  typedef enum logic [2:0] {
    ST_PRELOAD1   = 3'd0,
    ST_PRELOAD2   = 3'd1,
    ST_PRELOAD3   = 3'd2,
    ST_NORMALLOAD = 3'd3,
    ST_POSTLOAD   = 3'd4,
    ST_DONE       = 3'd5
  } ed_state_t;

endpackage

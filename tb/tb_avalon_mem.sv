// tb_avalon_mem: behavioural dual-port memory for the testbenches (not
// synthesizable intent; models the board's on-board RAM).
//
// Port A is an Avalon read slave, port B an Avalon write slave, both with
// 32-bit data and byte addresses. With stall_pct = 0 both answer with zero
// wait states: readdata is valid in the same cycle as read, and a write is
// stored on the clock edge it is presented. With stall_pct > 0 waitrequest is
// raised at random in that percentage of cycles. Storage is a byte array of
// SIZE bytes that the testbench reads and writes directly (mem[]).
module tb_avalon_mem #(
  parameter int unsigned SIZE = 65536
) (
  input  logic        clk,
  input  int unsigned stall_pct,
  input  logic [31:0] a_address,
  input  logic        a_read,
  output logic [31:0] a_readdata,
  output logic        a_waitrequest,
  input  logic [31:0] b_address,
  input  logic        b_write,
  input  logic [3:0]  b_byteenable,
  input  logic [31:0] b_writedata,
  output logic        b_waitrequest
);
  logic [7:0] mem [SIZE];
  int unsigned reads = 0, writes = 0, a_stalls = 0, b_stalls = 0;

  initial begin
    a_waitrequest = 1'b0;
    b_waitrequest = 1'b0;
  end

  always @(posedge clk) begin
    if (a_read && !a_waitrequest) reads++;
    if (a_read && a_waitrequest) a_stalls++;
    if (b_write && b_waitrequest) b_stalls++;
    if (b_write && !b_waitrequest) begin
      writes++;
      for (int i = 0; i < 4; i++)
        if (b_byteenable[i]) mem[(b_address + i) % SIZE] <= b_writedata[8*i +: 8];
    end
    a_waitrequest <= (stall_pct != 0) && (($urandom % 100) < stall_pct);
    b_waitrequest <= (stall_pct != 0) && (($urandom % 100) < stall_pct);
  end

  always_comb begin
    for (int i = 0; i < 4; i++) a_readdata[8*i +: 8] = mem[(a_address + i) % SIZE];
  end
endmodule

// addition_unit: test processing unit for the memory framework.
//
// Sits where the edge detector normally sits, between the three 32-to-8
// converters and the 8-to-32 converter, and proves that data flows through
// the framework: for every column of three bytes it outputs one byte, the
// sum of the three bytes and a programmable addend byte, modulo 256.
// One output register; a column is taken (in_request & in_valid) whenever
// that register is empty or is being emptied in the same cycle, so the unit
// passes one byte per clock with one cycle of latency.
// The inputs (three bytes and an addend byte) and the 8-bit output are from
// the source; adding modulo 256 and the handshake are this design's choice.
module addition_unit (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [7:0]      addend,
  input  logic [2:0][7:0] in_data,
  input  logic            in_valid,
  output logic            in_request,
  output logic [7:0]      out_data,
  output logic            out_valid,
  input  logic            out_ready
);
  assign in_request = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clr) begin
      out_valid <= 1'b0;
    end else if (in_request) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data[0] + in_data[1] + in_data[2] + addend;
    end
  end
endmodule

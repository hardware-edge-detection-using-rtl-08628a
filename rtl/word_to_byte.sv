// word_to_byte: 32 to 8 bit converter.
//
// The Avalon bus moves 32-bit words, the edge detector eats one byte per row
// and column, so each input row has a converter that takes a word from its
// FIFO and shifts it out one byte at a time, lowest byte (lowest address)
// first, matching the little-endian byte order of the Nios processor.
//
// Interface: word side is a FIFO read port (word_valid = FIFO not empty,
// word_pop pulses when the word is taken). Byte side is the framework's
// request/valid pair: a byte moves when byte_valid & byte_request.
// Timing: a word is loaded in the cycle after it is seen, so a new word costs
// one cycle unless the last byte of the previous one is being taken in the
// same cycle (then the next word is loaded without a gap).
// The 32-to-8 function is from the source; the ordering and handshake are
// this design's.
module word_to_byte (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [31:0] word,
  input  logic        word_valid,
  output logic        word_pop,
  output logic [7:0]  byte_data,
  output logic        byte_valid,
  input  logic        byte_request
);
  logic [31:0] sh_q;
  logic [2:0]  left_q;   // bytes still held, 0..4
  logic        take, last;

  assign byte_valid = (left_q != 3'd0);
  assign byte_data  = sh_q[7:0];
  assign take       = byte_valid && byte_request;
  assign last       = take && (left_q == 3'd1);
  assign word_pop   = word_valid && (left_q == 3'd0 || last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      left_q <= '0;
    end else if (clr) begin
      left_q <= '0;
    end else if (word_pop) begin
      sh_q   <= word;
      left_q <= 3'd4;
    end else if (take) begin
      sh_q   <= {8'd0, sh_q[31:8]};
      left_q <= left_q - 3'd1;
    end
  end
endmodule

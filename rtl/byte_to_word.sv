// byte_to_word: 8 to 32 bit converter.
//
// Collects result bytes into 32-bit words for the write master, the first
// byte in bits 7:0 (lowest address). A word is offered when four bytes are in,
// or earlier when the last of total_bytes bytes arrives; byteenable then marks the
// bytes actually filled so a partial final word writes only those.
//
// Interface: byte side request/valid (a byte moves when byte_valid &
// byte_request); word side is a FIFO write port (word_push when a word is
// complete and the FIFO is not full). Timing: a completed word is pushed the
// cycle after its last byte; byte_request is low only while a completed word
// waits for FIFO space.
// The 8-to-32 function is from the source; byte order, byteenable and the
// flush of a partial last word are this design's.
module byte_to_word (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [7:0]  byte_data,
  input  logic        byte_valid,
  input  logic [31:0] total_bytes,
  output logic        byte_request,
  output logic [31:0] word,
  output logic [3:0]  byteenable,
  output logic        word_push,
  input  logic        word_full
);
  logic [31:0] acc_q;
  logic [3:0]  be_q;
  logic [1:0]  idx_q;
  logic        ready_q;   // a complete word is waiting
  logic        take, byte_last;
  logic [31:0] nbytes_q;   // bytes taken since clr

  assign byte_request = !ready_q;
  assign take         = byte_valid && byte_request;
  assign word_push    = ready_q && !word_full;
  assign word         = acc_q;
  assign byteenable   = be_q;
  assign byte_last    = (nbytes_q + 32'd1 == total_bytes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      be_q    <= '0;
      idx_q   <= '0;
      ready_q <= 1'b0;
      nbytes_q <= '0;
    end else if (clr) begin
      nbytes_q <= '0;
      be_q    <= '0;
      idx_q   <= '0;
      ready_q <= 1'b0;
    end else if (word_push) begin
      ready_q <= 1'b0;
      be_q    <= '0;
      acc_q   <= '0;
    end else if (take) begin
      acc_q[8*idx_q +: 8] <= byte_data;
      be_q[idx_q]         <= 1'b1;
      idx_q               <= idx_q + 2'd1;
      nbytes_q            <= nbytes_q + 32'd1;
      if (idx_q == 2'd3 || byte_last) begin
        ready_q <= 1'b1;
        idx_q   <= '0;
      end
    end
  end
endmodule

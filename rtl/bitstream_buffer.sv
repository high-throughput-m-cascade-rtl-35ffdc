// bitstream_buffer: bit-stream buffer feeding the arithmetic decoder.
//
// Accepts 32-bit words (first bit of the stream in bit 31) with a valid/ready
// handshake and keeps up to 64 bits in a left-aligned shift register. window
// shows the next WIN_W bits, MSB first; avail says how many buffered bits are
// valid. Each cycle the decoder consumes `consume` bits (at most WIN_W, never
// more than avail); a word is taken in the same cycle whenever no more than 32
// bits are held before consumption. flush empties the buffer.
//
// From the design document: the decoder reads the bit-stream as the arithmetic
// decoder needs it. This design's own choices: the 64-bit register, the 32-bit
// word handshake, the 9-bit window and the rule that the decoder waits while
// fewer than 9 bits are held.
module bitstream_buffer
  import cabad_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             in_valid,
  input  logic [31:0]      in_data,
  output logic             in_ready,
  input  logic [3:0]       consume,
  output logic [WIN_W-1:0] window,
  output logic [6:0]       avail
);

  logic [63:0] sr;
  logic [6:0]  cnt;
  logic [63:0] sr_shift;
  logic [6:0]  cnt_left;

  assign in_ready = (cnt <= 7'd32) && !flush;
  assign window   = sr[63 -: WIN_W];
  assign avail    = cnt;

  always_comb begin
    sr_shift = sr << consume;
    cnt_left = cnt - 7'(consume);
    if (in_valid && in_ready)
      sr_shift = sr_shift | ({in_data, 32'd0} >> cnt_left);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else if (flush) begin
      sr  <= '0;
      cnt <= '0;
    end else begin
      sr  <= sr_shift;
      cnt <= cnt_left + ((in_valid && in_ready) ? 7'd32 : 7'd0);
    end
  end

  // the decoder never takes bits that are not there
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   7'(consume) <= cnt);

endmodule

// tb_bitstream_buffer: self-checking testbench of the bit-stream buffer.
//
// A random 32-bit word source (random valid gaps) feeds the buffer while the
// consumer takes a random 0..9 bits per cycle whenever at least 9 bits are
// buffered, the way the decoder uses it. A bit queue is the reference: each
// cycle the 9-bit window must equal the next 9 queued bits and avail must equal
// the queue length. Also checks that in_ready drops when the buffer cannot take
// a whole word, and that flush empties it. Timing: a word accepted in a cycle
// and the consumption of that cycle take effect at the next clock edge.
//
// The expected behaviour is this design's own buffer contract (the design
// document does not specify the buffer); the stimulus is random.
module tb_bitstream_buffer;
  import cabad_pkg::*;

  logic             clk = 0, rst_n = 0, flush = 0, in_valid = 0, in_ready;
  logic [31:0]      in_data = 0;
  logic [3:0]       consume = 0;
  logic [WIN_W-1:0] window;
  logic [6:0]       avail;

  int checks = 0, failures = 0;
  bit q[$];
  int full_seen = 0;

  bitstream_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [WIN_W-1:0] exp_win;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check the state
      check(int'(avail) == q.size(), "avail");
      exp_win = '0;
      for (int j = 0; j < WIN_W; j++) if (j < q.size()) exp_win[WIN_W - 1 - j] = q[j];
      if (q.size() >= WIN_W) check(window == exp_win, "window");
      check(in_ready == (q.size() <= 32 && !flush), "in_ready");
      if (!in_ready) full_seen++;
      // drive this cycle
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = $urandom;
      consume  = (q.size() >= WIN_W && $urandom_range(0, 2) != 0) ? 4'($urandom_range(0, 9)) : 4'd0;
      if (cyc == 15000) flush = 1;
      else flush = 0;
      @(posedge clk);
      #1;
      if (flush) q.delete();
      else begin
        for (int j = 0; j < int'(consume); j++) void'(q.pop_front());
        if (in_valid && (q.size() + int'(consume)) <= 32)
          for (int j = 31; j >= 0; j--) q.push_back(in_data[j]);
      end
    end
    check(full_seen > 0, "buffer full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

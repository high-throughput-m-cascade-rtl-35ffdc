// tb_ctx_memory: self-checking testbench of the context memory.
//
// Uses the default size (55 rows of 70 bits, i.e. 550 seven-bit contexts).
// First writes every row with a known pattern and reads them all back, then
// runs random reads and writes against a model array. A write takes effect at
// the clock edge; a read returns the addressed row in the same cycle.
// Addresses past the last row must read as zero and must not be written.
//
// The model is a plain array of the design document's 550 x 7-bit size in
// 70-bit rows.
module tb_ctx_memory;
  localparam int ROWS = 55, WIDTH = 70, AW = $clog2(ROWS);

  logic             clk = 0, we = 0;
  logic [AW-1:0]    addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[ROWS];

  ctx_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [WIDTH-1:0] rnd_row();
    return {6'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      we = 1; addr = AW'(r); wdata = rnd_row(); model[r] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < ROWS; r++) begin
      addr = AW'(r);
      #1 check(rdata == model[r], $sformatf("row %0d", r));
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(0, (1 << AW) - 1));
      we    = 1'($urandom);
      wdata = rnd_row();
      #1;
      if (int'(addr) < ROWS) check(rdata == model[addr], "read before write");
      else check(rdata == '0, "out of range read");
      @(posedge clk);
      if (we && int'(addr) < ROWS) model[addr] = wdata;
      #1 if (int'(addr) < ROWS) check(rdata == model[addr], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_csr_regfile: self-checking testbench of the context state register.
//
// Random cycles of row loads and up to three context updates, with random
// (also colliding and out-of-range) slots, against a model array: a load
// replaces all ten contexts, updates write their slots with the later stage
// winning a collision, slots >= 10 are ignored. Checks every context output
// and the packed write-back row each cycle, and the reset value.
//
// The model follows this design's own update rules for the ten-entry register
// set described in the design document.
module tb_csr_regfile;
  import cabad_pkg::*;

  logic             clk = 0, rst_n = 0, load = 0;
  logic [ROW_W-1:0] load_row = '0;
  logic             upd_en  [3];
  logic [3:0]       upd_slot[3];
  ctx_t             upd_ctx [3];
  ctx_t             ctx     [CSR_N];
  logic [ROW_W-1:0] row_out;

  int checks = 0, failures = 0;
  ctx_t model[CSR_N];
  int collisions = 0;

  csr_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    for (int i = 0; i < CSR_N; i++) begin
      check(ctx[i] == model[i], $sformatf("ctx %0d", i));
      check(row_out[i*CTX_W +: CTX_W] == model[i], $sformatf("row_out %0d", i));
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin upd_en[k] = 0; upd_slot[k] = 0; upd_ctx[k] = '0; end
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      load = ($urandom_range(0, 7) == 0);
      for (int w = 0; w < 3; w++) load_row[w*32 +: 32] = $urandom;
      for (int k = 0; k < 3; k++) begin
        upd_en[k]   = 1'($urandom);
        upd_slot[k] = 4'($urandom_range(0, 11));
        upd_ctx[k]  = ctx_t'($urandom);
      end
      if (upd_en[0] && upd_en[2] && upd_slot[0] == upd_slot[2] && !load) collisions++;
      @(posedge clk);
      if (load) begin
        for (int i = 0; i < CSR_N; i++) model[i] = load_row[i*CTX_W +: CTX_W];
      end else begin
        for (int k = 0; k < 3; k++)
          if (upd_en[k] && upd_slot[k] < CSR_N) model[upd_slot[k]] = upd_ctx[k];
      end
      #1 compare();
    end
    check(collisions > 0, "slot collision exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

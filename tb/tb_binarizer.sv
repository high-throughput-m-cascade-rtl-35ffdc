// tb_binarizer: self-checking testbench of the binarization engine.
//
// Each random syntax element is binarized by the reference model. After a
// start cycle, every cycle offers the next one to three real bins (a random
// number of valid stages, as the cascade would deliver them) and advances.
// The expected number of bins taken follows the design's rules: bins are
// taken in order until the element is complete, or the next bin needs a
// different arithmetic mode or (significance map, coded_block_pattern) another context-memory row
// than the first bin of the cycle. Checked every cycle: n_used, done, and on a
// row change the relative row of the next bin; at the end the decoded value
// and that done was given exactly once, on the last bin.
module tb_binarizer;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  logic               clk = 0, rst_n = 0, start = 0, advance = 0;
  se_req_t            req = '0;
  logic               bin[3], bin_valid[3], stage_ok[3];
  se_state_t          state;
  logic [1:0]         n_used;
  logic               done;
  logic signed [31:0] result;
  logic               row_change;
  logic [1:0]         next_row;

  int checks = 0, failures = 0;
  int ctx_row[460];
  int n_row_change = 0, n_mode_stop = 0;

  binarizer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit bq[$];
    int modes[$], ctxs[$];
    int v, n, pos, offer, take, taken, row0, first_row, dones, expv;
    for (int k = 0; k < 3; k++) begin bin[k] = 0; bin_valid[k] = 0; stage_ok[k] = 0; end
    foreach (ctx_row[c]) ctx_row[c] = -1;
    for (int row = 0; row < MEM_ROWS; row++)
      for (int s = 0; s < CSR_N; s++)
        if (row_slot_ctx(row, s) >= 0) ctx_row[row_slot_ctx(row, s)] = row;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      req = '0;
      req.kind  = se_kind_t'($urandom_range(0, 15));
      req.slice = ((req.kind == SE_MB_SKIP || req.kind == SE_MB_TYPE_PB || req.kind == SE_SUB_MB_PB) &&
                   $urandom_range(0, 1) != 0) ? SLICE_B : SLICE_P;
      if (req.kind == SE_MB_TYPE_I) req.slice = slice_t'($urandom_range(0, 2));
      req.field = 1'($urandom);
      req.cat   = 3'($urandom_range(0, 4));
      req.inc0  = 3'($urandom_range(0, (req.kind == SE_COEFF_ABS) ? 4 : 2));
      req.incn  = 4'($urandom_range(5, (req.cat == 3) ? 8 : 9));
      if (req.kind == SE_CBP) req.incn = 4'($urandom);
      req.incc  = 4'($urandom);
      case (req.kind)
        SE_SIGMAP: v = int'($urandom_range(1, (1 << max_coeff(int'(req.cat))) - 1));
        SE_COEFF_ABS: v = int'($urandom_range(1, ($urandom_range(0, 3) == 0) ? 500 : 16)) * (($urandom_range(0, 1) != 0) ? -1 : 1);
        SE_MVD_X, SE_MVD_Y: v = int'($urandom_range(0, ($urandom_range(0, 3) == 0) ? 2000 : 12)) * (($urandom_range(0, 1) != 0) ? -1 : 1);
        SE_MB_TYPE_I: v = int'($urandom_range(0, 24));
        SE_MB_TYPE_PB: v = (req.slice == SLICE_B) ? int'($urandom_range(0, 23)) : int'($urandom_range(0, 3));
        SE_INTRA_MODE: v = int'($urandom_range(0, 8));
        SE_SUB_MB_PB: v = (req.slice == SLICE_B) ? int'($urandom_range(0, 12)) : int'($urandom_range(0, 3));
        SE_CHROMA_PRED: v = int'($urandom_range(0, 3));
        SE_REF_IDX: v = int'($urandom_range(0, 40));
        SE_QP_DELTA: v = int'($urandom_range(0, 52)) - 26;
        SE_END_SLICE: v = 0;
        SE_CBP: v = int'($urandom_range(0, 15)) + 16 * int'($urandom_range(0, 2));
        default: v = int'($urandom_range(0, 1));
      endcase
      bq.delete(); modes.delete(); ctxs.delete();
      binarize(req, v, bq, modes, ctxs);
      n = bq.size();
      first_row = ctx_row[ctxs[0] < 0 ? 0 : ctxs[0]];
      start = 1;
      @(negedge clk) start = 0;
      pos = 0; dones = 0;
      while (pos < n) begin
        offer = int'($urandom_range(1, 3));
        for (int k = 0; k < 3; k++) begin
          bin_valid[k] = (k < offer);
          stage_ok[k]  = (k < offer);
          bin[k]       = (pos + k < n) ? bq[pos + k] : 1'($urandom);
        end
        // expected bins taken
        row0 = (modes[pos] == M_DEC) ? ctx_row[ctxs[pos]] : -1;
        take = 0;
        for (int k = 0; k < offer && pos + k < n; k++) begin
          take++;
          if (pos + k + 1 >= n) break;
          if (modes[pos + k + 1] != modes[pos]) begin n_mode_stop++; break; end
          if ((req.kind == SE_SIGMAP || req.kind == SE_CBP) && ctx_row[ctxs[pos + k + 1]] != row0) break;
        end
        advance = 1;
        #1;
        check(int'(n_used) == take, $sformatf("n_used kind %0d pos %0d: %0d exp %0d", req.kind, pos, n_used, take));
        check(done == (pos + take == n), $sformatf("done kind %0d pos %0d", req.kind, pos));
        if (pos + take < n) begin
          check(row_change == ((req.kind == SE_SIGMAP || req.kind == SE_CBP) && ctx_row[ctxs[pos + take]] != row0), "row change");
          if (row_change) begin
            n_row_change++;
            check(int'(next_row) == ctx_row[ctxs[pos + take]] - first_row, "next row");
          end
        end
        if (done) begin
          dones++;
          expv = (req.kind == SE_SIGMAP) ? ($countones(v) << 16 | v) : v;
          check(result == expv, $sformatf("value kind %0d: %0d exp %0d", req.kind, result, expv));
        end
        taken = int'(n_used);
        @(negedge clk);
        advance = 0;
        pos += taken;
        if (taken == 0) break;
      end
      check(dones == 1, "one done per element");
    end
    check(n_row_change > 0 && n_mode_stop > 0, "row change and mode stop seen");
    $display("row changes %0d, mode stops %0d", n_row_change, n_mode_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ctx_select: self-checking testbench of the three-stage context selection.
//
// For random syntax elements the reference binarization gives the bins, their
// arithmetic modes and standard context indices. The parse state after the
// first j bins is built by stepping the package's parse function with those
// bins, the CSR holds random contexts, and the combinational outputs are
// checked 1 ns later:
//   - mode is the mode of bin j; stage 1 is allowed exactly when bins remain;
//   - the slot of stage 1 is the slot of bin j's context in its memory row;
//   - when the CSR's valMPS for stage 1 equals the real bin j (so the assumed
//     MPS path is the real one; bypass assumes 0), stage 2 must be allowed
//     exactly when bin j+1 exists, has the same mode, is not terminal and
//     lies in the same memory row, and its slot must be bin j+1's slot;
//     likewise for stage 3 when both assumptions hold;
//   - a stage reusing an earlier stage's slot must receive that context
//     advanced by one MPS (pState forwarding), otherwise the CSR entry.
// Counts how often forwarding and a blocked stage happen and fails if never.
module tb_ctx_select;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  se_state_t  state;
  ctx_t       csr [CSR_N];
  bad_mode_t  mode;
  ctx_t       ctx [3];
  logic [3:0] slot[3];
  logic       stage_ok[3];

  int checks = 0, failures = 0;
  int ctx_row[460];
  int n_fwd = 0, n_block = 0, n_three = 0;

  ctx_select dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int slot_of(int c);
    for (int s = 0; s < CSR_N; s++) if (row_slot_ctx(ctx_row[c], s) == c) return s;
    return -1;
  endfunction

  function automatic ctx_t mps_next(ctx_t c);
    ctx_t n;
    n = c;
    if (c.pstate < 62) n.pstate = c.pstate + 1;
    return n;
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit bq[$];
    int modes[$], ctxs[$];
    se_req_t r;
    int v, j, n, m0;
    bit agree;
    foreach (ctx_row[c]) ctx_row[c] = -1;
    for (int row = 0; row < MEM_ROWS; row++)
      for (int s = 0; s < CSR_N; s++)
        if (row_slot_ctx(row, s) >= 0) ctx_row[row_slot_ctx(row, s)] = row;
    for (int i = 0; i < 20000; i++) begin
      r = '0;
      r.kind  = se_kind_t'($urandom_range(0, 15));
      r.slice = ((r.kind == SE_MB_SKIP || r.kind == SE_MB_TYPE_PB || r.kind == SE_SUB_MB_PB) &&
                   $urandom_range(0, 1) != 0) ? SLICE_B : SLICE_P;
      if (r.kind == SE_MB_TYPE_I) r.slice = slice_t'($urandom_range(0, 2));
      r.field = 1'($urandom);
      r.cat   = 3'($urandom_range(0, 4));
      r.inc0  = 3'($urandom_range(0, (r.kind == SE_COEFF_ABS) ? 4 : 2));
      r.incn  = 4'($urandom_range(5, (r.cat == 3) ? 8 : 9));
      if (r.kind == SE_CBP) r.incn = 4'($urandom);
      r.incc  = 4'($urandom);
      case (r.kind)
        SE_SIGMAP: v = int'($urandom_range(1, (1 << max_coeff(int'(r.cat))) - 1));
        SE_COEFF_ABS: v = int'($urandom_range(1, 20)) * (($urandom_range(0, 1) != 0) ? -1 : 1);
        SE_MVD_X, SE_MVD_Y: v = int'($urandom_range(0, 20)) * (($urandom_range(0, 1) != 0) ? -1 : 1);
        SE_MB_TYPE_I: v = int'($urandom_range(0, 24));
        SE_MB_TYPE_PB: v = (r.slice == SLICE_B) ? int'($urandom_range(0, 23)) : int'($urandom_range(0, 3));
        SE_INTRA_MODE: v = int'($urandom_range(0, 8));
        SE_SUB_MB_PB: v = (r.slice == SLICE_B) ? int'($urandom_range(0, 12)) : int'($urandom_range(0, 3));
        SE_CHROMA_PRED: v = int'($urandom_range(0, 3));
        SE_REF_IDX: v = int'($urandom_range(0, 6));
        SE_QP_DELTA: v = int'($urandom_range(0, 8)) - 4;
        SE_CBP: v = int'($urandom_range(0, 15)) + 16 * int'($urandom_range(0, 2));
        default: v = int'($urandom_range(0, 1));
      endcase
      bq.delete(); modes.delete(); ctxs.delete();
      binarize(r, v, bq, modes, ctxs);
      n = bq.size();
      j = int'($urandom_range(0, n));
      state = se_init(r);
      for (int b = 0; b < j; b++) state = se_step(state, bq[b]);
      for (int s = 0; s < CSR_N; s++) begin
        csr[s].pstate  = 6'($urandom_range(0, 62));
        csr[s].val_mps = 1'($urandom);
      end
      // make the assumed MPS path follow the real bins half of the time
      if ($urandom_range(0, 1) != 0)
        for (int b = j; b < j + 3 && b < n; b++)
          if (modes[b] == M_DEC && slot_of(ctxs[b]) >= 0) csr[slot_of(ctxs[b])].val_mps = bq[b];
      #1;
      check(stage_ok[0] == (j < n), $sformatf("stage 1 allowed, kind %0d j %0d n %0d", r.kind, j, n));
      if (j >= n) continue;
      m0 = modes[j];
      check(int'(mode) == ((m0 == M_DEC) ? int'(MODE_DECISION) : ((m0 == M_BYP) ? int'(MODE_BYPASS) : int'(MODE_TERMINAL))),
            $sformatf("mode kind %0d bin %0d", r.kind, j));
      if (m0 == M_DEC) begin
        check(int'(slot[0]) == slot_of(ctxs[j]), $sformatf("slot 1 kind %0d bin %0d", r.kind, j));
        check(ctx[0] == csr[slot[0]], "ctx 1");
      end
      agree = (m0 == M_DEC) ? (ctx[0].val_mps == bq[j]) : (bq[j] == 1'b0);
      if (!agree) continue;
      for (int k = 1; k < 3; k++) begin
        bit exp_ok;
        int b;
        b = j + k;
        exp_ok = (b < n) && modes[b] == m0 && m0 != M_TERM &&
                 (m0 != M_DEC || ctx_row[ctxs[b]] == ctx_row[ctxs[j]]);
        check(stage_ok[k] == exp_ok, $sformatf("stage %0d allowed, kind %0d bin %0d", k + 1, r.kind, j));
        if (!exp_ok) begin n_block++; break; end
        if (m0 == M_DEC) begin
          check(int'(slot[k]) == slot_of(ctxs[b]), $sformatf("slot %0d kind %0d", k + 1, r.kind));
          if (slot[k] == slot[k-1]) begin
            check(ctx[k] == mps_next(ctx[k-1]), "forwarded from previous stage");
            n_fwd++;
          end else if (k == 2 && slot[2] == slot[0]) begin
            check(ctx[2] == mps_next(ctx[0]), "forwarded from stage 1");
            n_fwd++;
          end else check(ctx[k] == csr[slot[k]], "ctx from CSR");
          if (ctx[k].val_mps != bq[b]) break;
        end else if (bq[b] != 1'b0) break;
        if (k == 2) n_three++;
      end
    end
    check(n_fwd > 0 && n_block > 0 && n_three > 0, "forwarding, blocking and three-stage cases seen");
    $display("forwarded %0d, blocked %0d, three stages %0d", n_fwd, n_block, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

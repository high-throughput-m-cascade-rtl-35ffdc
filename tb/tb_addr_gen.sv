// tb_addr_gen: self-checking testbench of the address generator.
//
// Two kinds of checks, both on the combinational outputs 1 ns after each
// request:
//   - directed: the context base of every supported SE kind and block
//     category equals the ctxIdxOffset (plus category offset) of the
//     standard's tables, frame and field significance maps included, and
//     end_of_slice_flag needs no context;
//   - random: each request is binarized by the reference model; its first
//     context bin must lie in the row the generator names, every context bin
//     must lie in that row or, for the significance map only, in the rows
//     after it, and no context index may be below the base.
module tb_addr_gen;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  se_req_t    req;
  logic [5:0] row_base;
  logic [8:0] ctx_base;
  logic       need_ctx;

  int checks = 0, failures = 0;
  int ctx_row[460];

  addr_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic directed(se_kind_t k, slice_t sl, bit fld, int cat, int exp_base);
    req = '0; req.kind = k; req.slice = sl; req.field = fld; req.cat = 3'(cat);
    #1 check(int'(ctx_base) == exp_base && need_ctx == (k != SE_END_SLICE),
             $sformatf("base of kind %0d cat %0d field %0d: %0d exp %0d", k, cat, fld, ctx_base, exp_base));
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit bq[$];
    int modes[$], ctxs[$];
    int first, v;
    int cat_sig[5] = '{0, 15, 29, 44, 47};
    int cat_abs[5] = '{0, 10, 20, 30, 39};
    foreach (ctx_row[c]) ctx_row[c] = -1;
    for (int row = 0; row < MEM_ROWS; row++)
      for (int s = 0; s < CSR_N; s++)
        if (row_slot_ctx(row, s) >= 0) ctx_row[row_slot_ctx(row, s)] = row;
    // directed: standard ctxIdxOffset values
    directed(SE_MB_TYPE_I, SLICE_I, 0, 0, 3);
    directed(SE_MB_SKIP, SLICE_P, 0, 0, 11);
    directed(SE_MB_SKIP, SLICE_B, 0, 0, 24);
    directed(SE_MB_TYPE_PB, SLICE_P, 0, 0, 14);
    directed(SE_SUB_MB_PB, SLICE_P, 0, 0, 21);
    directed(SE_MB_TYPE_PB, SLICE_B, 0, 0, 27);
    directed(SE_MB_TYPE_I, SLICE_P, 0, 0, 14);
    directed(SE_MB_TYPE_I, SLICE_B, 0, 0, 27);
    directed(SE_SUB_MB_PB, SLICE_B, 0, 0, 36);
    directed(SE_CBP, SLICE_P, 0, 0, 73);
    directed(SE_MVD_X, SLICE_P, 0, 0, 40);
    directed(SE_MVD_Y, SLICE_P, 0, 0, 47);
    directed(SE_REF_IDX, SLICE_P, 0, 0, 54);
    directed(SE_QP_DELTA, SLICE_P, 0, 0, 60);
    directed(SE_CHROMA_PRED, SLICE_I, 0, 0, 64);
    directed(SE_MB_FIELD, SLICE_I, 0, 0, 70);
    directed(SE_END_SLICE, SLICE_I, 0, 0, 276);
    for (int c = 0; c < 5; c++) begin
      directed(SE_CBF, SLICE_P, 0, c, 85 + 4 * c);
      directed(SE_COEFF_ABS, SLICE_P, 0, c, 227 + cat_abs[c]);
      directed(SE_SIGMAP, SLICE_P, 0, c, 105 + cat_sig[c]);
      directed(SE_SIGMAP, SLICE_P, 1, c, 277 + cat_sig[c]);
    end
    // random: rows against the reference layout
    for (int i = 0; i < 4000; i++) begin
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
        SE_COEFF_ABS, SE_MVD_X, SE_MVD_Y: v = int'($urandom_range(1, 30));
        SE_MB_TYPE_I: v = int'($urandom_range(0, 24));
        SE_INTRA_MODE: v = int'($urandom_range(0, 8));
        SE_MB_TYPE_PB: v = (req.slice == SLICE_B) ? int'($urandom_range(0, 23)) : int'($urandom_range(0, 3));
        SE_SUB_MB_PB: v = (req.slice == SLICE_B) ? int'($urandom_range(0, 12)) : int'($urandom_range(0, 3));
        SE_CHROMA_PRED: v = int'($urandom_range(0, 3));
        SE_REF_IDX: v = int'($urandom_range(0, 6));
        SE_QP_DELTA: v = int'($urandom_range(0, 8)) - 4;
        SE_CBP: v = int'($urandom_range(0, 15)) + 16 * int'($urandom_range(0, 2));
        default: v = int'($urandom_range(0, 1));
      endcase
      bq.delete(); modes.delete(); ctxs.delete();
      binarize(req, v, bq, modes, ctxs);
      #1;
      first = 1;
      foreach (ctxs[b]) begin
        if (modes[b] != M_DEC) continue;
        check(ctxs[b] >= int'(ctx_base), $sformatf("ctx %0d below base %0d", ctxs[b], ctx_base));
        if (first) check(ctx_row[ctxs[b]] == int'(row_base),
                         $sformatf("kind %0d first ctx %0d row %0d, got %0d", req.kind, ctxs[b], ctx_row[ctxs[b]], row_base));
        else if (req.kind == SE_SIGMAP || req.kind == SE_CBP) check(ctx_row[ctxs[b]] >= int'(row_base) && ctx_row[ctxs[b]] <= int'(row_base) + 3, "sigmap row");
        else check(ctx_row[ctxs[b]] == int'(row_base), $sformatf("kind %0d ctx %0d out of row", req.kind, ctxs[b]));
        first = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

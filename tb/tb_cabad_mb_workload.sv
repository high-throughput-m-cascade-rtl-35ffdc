// tb_cabad_mb_workload: macroblock-level workload for the multi-symbol CABAD.
//
// Where tb_cabad_top draws syntax elements (SEs) at random, this testbench
// orders them the way an H.264/AVC Main-profile macroblock layer does, so that
// the cycle count per macroblock can be measured and held against the
// real-time budget. Each of N_MB macroblocks belongs to an I, P or B picture
// (pattern I B B P B B P ..., PIC_MB macroblocks per picture) and is built as:
//   mb_skip_flag (P/B); mb_type, plus the intra suffix after an intra prefix;
//   for I_NxN sixteen prev/rem intra modes and intra_chroma_pred_mode; for
//   Intra16x16 intra_chroma_pred_mode; for inter types sub_mb_type where the
//   type is 8x8, then ref_idx and mvd x/y per partition and list;
//   coded_block_pattern (not for Intra16x16); mb_qp_delta when residual data
//   follow; per coded 4x4 block coded_block_flag, the significance map and the
//   levels in reverse scanning order with the standard's ctxIdxInc rule for
//   coeff_abs_level_minus1; chroma DC and AC blocks; end_of_slice_flag.
// The statistics (skip rates, partitions, coefficients per block) are this
// testbench's own synthetic choice, not measured streams. All macroblocks are
// coded as one arithmetic-coded segment with contexts starting at random
// states; the slice type of each request follows its picture.
// The whole stream is produced by the reference binarization and CABAC
// encoder; the decoder, at its default sizes, must return every value, decode
// exactly the expected bins and stall exactly two cycles per context-row
// change. The bit-stream is supplied without gaps. Measured: cycles per
// macroblock by picture type, between the last results of consecutive
// macroblocks, and bins per decoding cycle for each group of elements. Checked: the average stays within the Level 4.0 budget of
// MB_BUDGET cycles (245,760 macroblocks/s at a 115 MHz clock, about 468
// cycles), and each of skip, intra-in-inter, 8x8 sub-partitioning, bypass
// levels and I/P/B macroblocks occurred. A watchdog ends a hung run.
module tb_cabad_mb_workload;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  localparam int N_MB      = 210;
  localparam int PIC_MB    = 10;
  localparam int MB_BUDGET = 468;
  localparam int N_CTX     = 460;
  localparam int MAX_SE    = 40000;

  logic               clk = 0, rst_n = 0;
  logic               bs_valid = 0, bs_ready;
  logic [31:0]        bs_data = 0;
  logic               slice_start = 0;
  logic               ctx_init_we = 0;
  logic [5:0]         ctx_init_addr = 0;
  logic [ROW_W-1:0]   ctx_init_data = 0;
  logic               se_req_valid = 0, se_req_ready;
  se_req_t            se_req = '0;
  logic               se_out_valid;
  se_kind_t           se_out_kind;
  logic signed [31:0] se_out_value;
  logic               busy;
  logic [1:0]         bins_cycle;
  logic               stall_cycle;
  logic [8:0]         ctx_base;

  cabad_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ stimulus data
  se_req_t reqs[$];
  int      vals[$];
  int      exp_bins[$];
  int      exp_stall[$];
  int      mb_of_se[$];
  int      mb_last[N_MB];
  slice_t  mb_slice[N_MB];
  int      ctx_row[N_CTX];
  int      init_p[N_CTX];
  bit      init_m[N_CTX];
  logic [31:0] words[$];

  string grp_name[6] = '{"prev/rem intra mode", "significance map", "coeff_abs_level_minus1",
                          "mvd", "ref_idx", "other"};

  localparam int NM = 6;
  int mech[NM];
  string mech_name[NM] = '{"skipped macroblock", "intra macroblock in P/B picture",
                           "8x8 sub-partitioning", "level with bypass suffix",
                           "coded_block_pattern with chroma AC", "I, P and B macroblocks"};

  function automatic void add(se_kind_t k, slice_t sl, int cat, int inc0, int incn, int incc, int v, int mb);
    se_req_t r;
    r = '0;
    r.kind = k; r.slice = sl; r.cat = 3'(cat);
    r.inc0 = 3'(inc0); r.incn = 4'(incn); r.incc = 4'(incc);
    reqs.push_back(r);
    vals.push_back(v);
    mb_of_se.push_back(mb);
  endfunction

  // one coded block: coded_block_flag, significance map, levels
  function automatic void add_block(slice_t sl, int cat, int mb, int density);
    int n, map, cnt, pos, lvl, gt1, eq1, a;
    int lv[$];
    n = max_coeff(cat);
    if ($urandom_range(0, 9) < 3) begin
      add(SE_CBF, sl, cat, int'($urandom_range(0, 3)), 0, 0, 0, mb);
      return;
    end
    add(SE_CBF, sl, cat, int'($urandom_range(0, 3)), 0, 0, 1, mb);
    cnt = 1 + int'($urandom_range(0, density));
    if (cnt > n) cnt = n;
    map = 0;
    // low-frequency positions are more likely
    for (int i = 0; i < cnt; i++) begin
      pos = int'($urandom_range(0, (i < 2) ? ((n < 4) ? n - 1 : 3) : n - 1));
      map |= 1 << pos;
    end
    add(SE_SIGMAP, sl, cat, 0, 0, 0, map, mb);
    cnt = $countones(map);
    for (int i = 0; i < cnt; i++) begin
      a = int'($urandom_range(0, 19));
      lvl = (a < 12) ? 1 : ((a < 17) ? 2 + int'($urandom_range(0, 1)) :
            ((a < 19) ? 4 + int'($urandom_range(0, 10)) : 15 + int'($urandom_range(0, 60))));
      lv.push_back(($urandom_range(0, 1) != 0) ? -lvl : lvl);
    end
    gt1 = 0; eq1 = 0;
    foreach (lv[i]) begin
      add(SE_COEFF_ABS, sl, cat, (gt1 != 0) ? 0 : ((1 + eq1 > 4) ? 4 : 1 + eq1),
          5 + ((gt1 > 4 - (cat == 3)) ? 4 - (cat == 3) : gt1), 0, lv[i], mb);
      if (lv[i] == 1 || lv[i] == -1) eq1++;
      else gt1++;
      if (lv[i] > 14 || lv[i] < -14) mech[3]++;
    end
  endfunction

  function automatic void add_inter_part(slice_t sl, int lists, int mb);
    for (int l = 0; l < lists; l++) begin
      add(SE_REF_IDX, sl, 0, int'($urandom_range(0, 3)), 0, 0, int'($urandom_range(0, 2)), mb);
    end
    for (int l = 0; l < lists; l++) begin
      add(SE_MVD_X, sl, 0, int'($urandom_range(0, 2)), 0, 0, int'($urandom_range(0, 12)) - 6, mb);
      add(SE_MVD_Y, sl, 0, int'($urandom_range(0, 2)), 0, 0, int'($urandom_range(0, 6)) - 3, mb);
    end
  endfunction

  function automatic void add_mb(int mb);
    slice_t sl;
    int t, it, cbp, luma, chroma, parts, sub, density;
    bit intra, i16;
    sl = mb_slice[mb];
    intra = 0; i16 = 0; it = 0;
    density = (sl == SLICE_I) ? 5 : 3;
    if (sl != SLICE_I) begin
      t = (($urandom_range(0, 99)) < ((sl == SLICE_B) ? 45 : 25)) ? 1 : 0;
      add(SE_MB_SKIP, sl, 0, int'($urandom_range(0, 2)), 0, 0, t, mb);
      if (t != 0) begin
        mech[0]++;
        add(SE_END_SLICE, SLICE_P, 0, 0, 0, 0, 0, mb);
        return;
      end
    end
    if (sl == SLICE_I || $urandom_range(0, 19) == 0) begin
      intra = 1;
      it = ($urandom_range(0, 9) < 6) ? 0 : int'($urandom_range(1, 24));
      if (sl == SLICE_P) add(SE_MB_TYPE_PB, sl, 0, 0, 0, 0, 5, mb);
      if (sl == SLICE_B) add(SE_MB_TYPE_PB, sl, 0, int'($urandom_range(0, 2)), 0, 0, 23, mb);
      if (sl != SLICE_I) mech[1]++;
      add(SE_MB_TYPE_I, sl, 0, int'($urandom_range(0, 2)), 0, 0, it, mb);
      i16 = (it != 0);
      if (!i16)
        for (int b = 0; b < 16; b++)
          add(SE_INTRA_MODE, SLICE_I, 0, 0, 0, 0, ($urandom_range(0, 1) != 0) ? 8 : int'($urandom_range(0, 7)), mb);
      add(SE_CHROMA_PRED, SLICE_I, 0, int'($urandom_range(0, 2)), 0, 0, int'($urandom_range(0, 3)), mb);
    end else if (sl == SLICE_P) begin
      t = int'($urandom_range(0, 3));
      add(SE_MB_TYPE_PB, sl, 0, 0, 0, 0, t, mb);
      if (t == 3) begin
        mech[2]++;
        for (int s = 0; s < 4; s++) begin
          sub = int'($urandom_range(0, 3));
          add(SE_SUB_MB_PB, sl, 0, 0, 0, 0, sub, mb);
        end
        for (int s = 0; s < 4; s++) add_inter_part(sl, 1, mb);
      end else begin
        parts = (t == 0) ? 1 : 2;
        for (int p = 0; p < parts; p++) add_inter_part(sl, 1, mb);
      end
    end else begin
      t = int'($urandom_range(0, 22));
      add(SE_MB_TYPE_PB, sl, 0, int'($urandom_range(0, 2)), 0, 0, t, mb);
      if (t == 22) begin
        mech[2]++;
        for (int s = 0; s < 4; s++) begin
          sub = int'($urandom_range(0, 12));
          add(SE_SUB_MB_PB, sl, 0, 0, 0, 0, sub, mb);
        end
        for (int s = 0; s < 4; s++) add_inter_part(sl, 1 + int'($urandom_range(0, 1)), mb);
      end else if (t != 0) begin
        parts = (t <= 3) ? 1 : 2;
        for (int p = 0; p < parts; p++) add_inter_part(sl, (t == 3) ? 2 : 1 + int'($urandom_range(0, 1)), mb);
      end
    end
    // coded_block_pattern
    if (i16) begin
      luma   = (it > 12) ? 15 : 0;
      chroma = ((it - 1) / 4) % 3;
    end else begin
      luma   = int'($urandom) & 15;
      chroma = int'($urandom_range(0, 2));
      add(SE_CBP, sl, 0, 0, int'($urandom_range(0, 15)), int'($urandom_range(0, 15)), luma + 16 * chroma, mb);
    end
    if (chroma == 2) mech[4]++;
    if (luma == 0 && chroma == 0 && !i16) begin
      add(SE_END_SLICE, SLICE_P, 0, 0, 0, 0, 0, mb);
      return;
    end
    add(SE_QP_DELTA, sl, 0, int'($urandom_range(0, 1)), 0, 0, int'($urandom_range(0, 4)) - 2, mb);
    if (i16) add_block(sl, 0, mb, density + 4);
    for (int b8 = 0; b8 < 4; b8++)
      if (luma[b8])
        for (int b4 = 0; b4 < 4; b4++) add_block(sl, i16 ? 1 : 2, mb, density);
    if (chroma != 0)
      for (int c = 0; c < 2; c++) add_block(sl, 3, mb, 2);
    if (chroma == 2)
      for (int c = 0; c < 8; c++) add_block(sl, 4, mb, 1);
    add(SE_END_SLICE, SLICE_P, 0, 0, 0, 0, 0, mb);
  endfunction

  // ------------------------------------------------------------ build the test
  initial begin : build
    bit bq[$];
    int modes[$], ctxs[$];
    cabac_encoder enc;
    int csr_model, r, nb, pic;
    logic [31:0] w;
    string pat = "IBBPBBP";

    foreach (mech[i]) mech[i] = 0;
    foreach (ctx_row[c]) ctx_row[c] = -1;
    for (int row = 0; row < MEM_ROWS; row++)
      for (int s = 0; s < CSR_N; s++)
        if (row_slot_ctx(row, s) >= 0) ctx_row[row_slot_ctx(row, s)] = row;
    enc = new();
    for (int c = 0; c < N_CTX; c++) begin
      init_p[c] = int'($urandom_range(0, 62));
      init_m[c] = 1'($urandom);
      enc.pst[c] = init_p[c];
      enc.mps[c] = init_m[c];
    end
    for (int m = 0; m < N_MB; m++) begin
      pic = (m / PIC_MB) % pat.len();
      mb_slice[m] = (pat[pic] == "I") ? SLICE_I : ((pat[pic] == "P") ? SLICE_P : SLICE_B);
      add_mb(m);
      mb_last[m] = reqs.size() - 1;
    end
    vals[vals.size() - 1] = 1;     // end_of_slice_flag of the last macroblock
    check(reqs.size() <= MAX_SE, "workload size");
    csr_model = -1;
    foreach (reqs[i]) begin
      bq.delete(); modes.delete(); ctxs.delete();
      binarize(reqs[i], vals[i], bq, modes, ctxs);
      exp_bins.push_back(bq.size());
      exp_stall.push_back(0);
      for (int b = 0; b < bq.size(); b++) begin
        enc.encode(modes[b], ctxs[b], bq[b]);
        if (modes[b] == M_DEC) begin
          r = ctx_row[ctxs[b]];
          if (r != csr_model) begin
            exp_stall[i] += (csr_model < 0) ? 1 : 2;
            csr_model = r;
          end
        end
      end
    end
    nb = enc.stream.size();
    for (int i = 0; i < nb + 64; i += 32) begin
      w = '0;
      for (int j = 0; j < 32; j++) if (i + j < nb) w[31 - j] = enc.stream[i + j];
      words.push_back(w);
    end
    $display("workload: %0d macroblocks, %0d SEs, %0d bits", N_MB, reqs.size(), nb);
  end

  // ------------------------------------------------------------ bit-stream source (no gaps)
  int word_idx = 0;
  bit started = 0;
  always @(negedge clk) begin
    bs_valid <= started && word_idx < words.size();
    bs_data  <= (word_idx < words.size()) ? words[word_idx] : 32'd0;
  end
  always @(posedge clk) if (bs_valid && bs_ready) word_idx <= word_idx + 1;

  // ------------------------------------------------------------ monitors
  int out_idx = 0, cur_bins = 0, cur_stall = 0, cur_dec = 0, mb_done = 0;
  // bins and decoding cycles per group: intra modes, significance map,
  // coeff_abs_level_minus1, mvd, ref_idx, other
  longint grp_bins[6], grp_cyc[6];

  function automatic int group_of(se_kind_t k);
    case (k)
      SE_INTRA_MODE: return 0;
      SE_SIGMAP:     return 1;
      SE_COEFF_ABS:  return 2;
      SE_MVD_X, SE_MVD_Y: return 3;
      SE_REF_IDX:    return 4;
      default:       return 5;
    endcase
  endfunction
  longint cyc = 0, t_prev = 0, t_first = 0;
  longint cyc_type[3], mb_type_cnt[3];
  longint bins_total = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    cur_bins  += int'(bins_cycle);
    cur_stall += int'(stall_cycle);
    cur_dec   += int'(dut.bad_fire);
    bins_total += bins_cycle;
    if (dut.accept && out_idx == 0 && t_first == 0) t_first = cyc - 1;
    if (se_out_valid) begin
      if (out_idx < reqs.size()) begin
        check(se_out_kind == reqs[out_idx].kind, $sformatf("kind of SE %0d", out_idx));
        if (reqs[out_idx].kind == SE_SIGMAP)
          check(se_out_value == ($countones(vals[out_idx]) << 16 | vals[out_idx]),
                $sformatf("SE %0d sigmap got %h exp %h", out_idx, se_out_value, vals[out_idx]));
        else
          check(se_out_value == vals[out_idx],
                $sformatf("SE %0d kind %0d got %0d exp %0d", out_idx, reqs[out_idx].kind,
                          se_out_value, vals[out_idx]));
        check(cur_bins == exp_bins[out_idx],
              $sformatf("bins of SE %0d: %0d exp %0d", out_idx, cur_bins, exp_bins[out_idx]));
        check(cur_stall == exp_stall[out_idx],
              $sformatf("stalls of SE %0d: %0d exp %0d", out_idx, cur_stall, exp_stall[out_idx]));
        grp_bins[group_of(reqs[out_idx].kind)] += cur_bins;
        grp_cyc[group_of(reqs[out_idx].kind)]  += cur_dec;
        if (mb_done < N_MB && out_idx == mb_last[mb_done]) begin
          cyc_type[mb_slice[mb_done]] += cyc - ((mb_done == 0) ? t_first : t_prev);
          mb_type_cnt[mb_slice[mb_done]]++;
          t_prev = cyc;
          mb_done++;
        end
      end
      cur_bins = 0; cur_stall = 0; cur_dec = 0;
      out_idx++;
    end
  end

  // ------------------------------------------------------------ driver
  initial begin
    #100000000;
    $display("watchdog expired after %0d of %0d SEs", out_idx, reqs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin : drive
    logic [ROW_W-1:0] row;
    longint total;
    foreach (cyc_type[i]) begin cyc_type[i] = 0; mb_type_cnt[i] = 0; end
    foreach (grp_bins[i]) begin grp_bins[i] = 0; grp_cyc[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < MEM_ROWS; r++) begin
      row = '0;
      for (int s = 0; s < CSR_N; s++)
        if (row_slot_ctx(r, s) >= 0)
          row[s*CTX_W +: CTX_W] = {6'(init_p[row_slot_ctx(r, s)]), init_m[row_slot_ctx(r, s)]};
      @(negedge clk);
      ctx_init_we = 1; ctx_init_addr = 6'(r); ctx_init_data = row;
    end
    @(negedge clk) ctx_init_we = 0;
    started = 1;
    slice_start = 1;
    @(negedge clk) slice_start = 0;
    @(negedge clk);
    foreach (reqs[i]) begin
      se_req_valid = 1;
      se_req = reqs[i];
      #1;
      while (!se_req_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    se_req_valid = 0;
    while (out_idx < reqs.size()) @(posedge clk);
    repeat (2) @(posedge clk);
    check(!busy, "idle at end");
    check(mb_done == N_MB, "all macroblocks decoded");
    if (mb_type_cnt[0] > 0 && mb_type_cnt[1] > 0 && mb_type_cnt[2] > 0) mech[5]++;
    for (int m = 0; m < NM; m++) begin
      $display("mechanism %-36s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism happened: ", mech_name[m]});
    end
    total = cyc_type[0] + cyc_type[1] + cyc_type[2];
    for (int t = 0; t < 3; t++)
      if (mb_type_cnt[t] > 0)
        $display("%s macroblocks: %0d, %0.1f cycles/MB", (t == 0) ? "I" : ((t == 1) ? "P" : "B"),
                 mb_type_cnt[t], real'(cyc_type[t]) / real'(mb_type_cnt[t]));
    $display("average %0.1f cycles/MB (budget %0d), %0.3f bins/cycle",
             real'(total) / real'(N_MB), MB_BUDGET, real'(bins_total) / real'(total));
    for (int g = 0; g < 6; g++)
      if (grp_cyc[g] > 0)
        $display("bins per decoding cycle, %-22s %0.2f", grp_name[g], real'(grp_bins[g]) / real'(grp_cyc[g]));
    check(total <= longint'(MB_BUDGET) * N_MB, "average cycles per macroblock within the Level 4.0 budget");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_cabad_top: end-to-end self-checking testbench of the multi-symbol CABAD.
//
// The top runs with its default sizes (550-context memory as 55 x 70 bits,
// ten-entry CSR, 9-bit window). The test:
//   1. gives every context index a random (pStateIdx, valMPS) state, writes the
//      context memory rows through the initialisation port using the
//      reference row/slot layout, and gives the encoder model the same states;
//   2. draws a random sequence of syntax elements of every supported kind
//      (with neighbour-derived ctxIdxInc values and block categories), sometimes
//      repeating the previous kind so that CSR row hits happen, binarizes each
//      one with the reference binarization and encodes it with the reference
//      CABAC encoder, ending with end_of_slice_flag = 1 and the encoder flush;
//   3. streams the bits in 32-bit words with random gaps and long pauses,
//      starts the slice, issues the requests back to back and compares each
//      decoded value and kind in order.
// Cycle checks (from the design's timing): each SE's bins are all decoded
// (sum of bins per cycle equals its bin count), and each SE spends exactly
// two stall cycles (write back + load) per change of context-memory row,
// one when the CSR is still empty after initialisation, none on a row hit.
// Every mechanism of the design is counted; one that never happened counts as
// a failure. A watchdog ends a hung run.
//
// The expected values come from the H.264/AVC binarization and encoding rules,
// and the expected stall count from the design document's two-cycle row
// change; the element mix and the bit-stream gaps are this testbench's own.
module tb_cabad_top;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  localparam int N_SE = 2500;
  localparam int N_CTX = 460;

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
  se_req_t reqs[N_SE];
  int      vals[N_SE];
  int      exp_bins[N_SE];
  int      exp_stall[N_SE];
  int      got_bins[N_SE];
  int      got_stall[N_SE];
  int      ctx_row[N_CTX];
  int      init_p[N_CTX];
  bit      init_m[N_CTX];
  logic [31:0] words[$];

  // mechanisms
  localparam int NM = 14;
  int mech[NM];
  string mech_name[NM] = '{"three-bin cycle", "two-bin cycle", "multi-bin bypass cycle",
                           "terminal decode", "pState forwarding", "CSR row hit",
                           "SE change with write back + load", "row reload inside an SE",
                           "decision to bypass switch", "cycle cut short by an LPS",
                           "bit-stream back-pressure", "wait for bit-stream",
                           "context memory initialisation", "back-to-back SE"};

  function automatic int rnd_value(se_req_t r);
    int a;
    case (r.kind)
      SE_MB_SKIP, SE_MB_FIELD, SE_CBF: return int'($urandom_range(0, 1));
      SE_END_SLICE: return 0;
      SE_MB_TYPE_I: return int'($urandom_range(0, 24));
      SE_MB_TYPE_PB: begin
        if (r.slice == SLICE_B) return int'($urandom_range(0, 23));
        a = int'($urandom_range(0, 4));
        return (a == 4) ? 5 : a;
      end
      SE_SUB_MB_PB: return (r.slice == SLICE_B) ? int'($urandom_range(0, 12)) : int'($urandom_range(0, 3));
      SE_CBP: return int'($urandom_range(0, 15)) + 16 * int'($urandom_range(0, 2));
      SE_INTRA_MODE: return ($urandom_range(0, 1) != 0) ? 8 : int'($urandom_range(0, 7));
      SE_CHROMA_PRED: return int'($urandom_range(0, 3));
      SE_REF_IDX: return ($urandom_range(0, 9) == 0) ? int'($urandom_range(0, 20)) : int'($urandom_range(0, 3));
      SE_QP_DELTA: return int'($urandom_range(0, 20)) - 10;
      SE_MVD_X, SE_MVD_Y: begin
        a = ($urandom_range(0, 3) == 0) ? int'($urandom_range(9, 300)) : int'($urandom_range(0, 8));
        return ($urandom_range(0, 1) != 0) ? -a : a;
      end
      SE_COEFF_ABS: begin
        a = ($urandom_range(0, 4) == 0) ? int'($urandom_range(14, 120)) : int'($urandom_range(1, 4));
        return ($urandom_range(0, 1) != 0) ? -a : a;
      end
      SE_SIGMAP: begin
        a = int'($urandom) & ((1 << max_coeff(int'(r.cat))) - 1);
        if ($urandom_range(0, 3) == 0) a = a & 32'h7;     // short maps
        if (a == 0) a = 1 << $urandom_range(0, max_coeff(int'(r.cat)) - 1);
        return a;
      end
      default: return 0;
    endcase
  endfunction

  function automatic se_req_t rnd_req(se_kind_t k);
    se_req_t r;
    r = '0;
    r.kind  = k;
    r.slice = (k == SE_MB_TYPE_I) ? slice_t'($urandom_range(0, 2)) :
              (k == SE_INTRA_MODE || k == SE_CHROMA_PRED) ? SLICE_I :
              (((k == SE_MB_SKIP || k == SE_MB_TYPE_PB || k == SE_SUB_MB_PB) &&
                $urandom_range(0, 1) != 0) ? SLICE_B : SLICE_P);
    r.field = 1'($urandom);
    r.cat   = 3'($urandom_range(0, 4));
    case (k)
      SE_MB_SKIP, SE_MB_FIELD, SE_MB_TYPE_I, SE_CHROMA_PRED, SE_MVD_X, SE_MVD_Y, SE_MB_TYPE_PB:
        r.inc0 = 3'($urandom_range(0, 2));
      SE_CBP: begin
        r.incn = 4'($urandom);
        r.incc = 4'($urandom);
      end
      SE_CBF, SE_REF_IDX: r.inc0 = 3'($urandom_range(0, 3));
      SE_QP_DELTA: r.inc0 = 3'($urandom_range(0, 1));
      SE_COEFF_ABS: begin
        r.inc0 = 3'($urandom_range(0, 4));
        r.incn = 4'($urandom_range(5, (r.cat == 3) ? 8 : 9));
      end
      default: ;
    endcase
    return r;
  endfunction

  // ------------------------------------------------------------ build the test
  initial begin : build
    bit bq[$];
    int modes[$], ctxs[$];
    cabac_encoder enc;
    se_kind_t k, prev_k;
    int csr_model, r, nb;
    logic [31:0] w;

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
    csr_model = -1;
    prev_k = SE_MB_SKIP;
    for (int i = 0; i < N_SE; i++) begin
      if (i == N_SE - 1) k = SE_END_SLICE;
      else if (i > 0 && $urandom_range(0, 3) == 0) k = prev_k;
      else begin
        k = se_kind_t'($urandom_range(0, 15));
        if (k == SE_END_SLICE) k = SE_SIGMAP;
      end
      if (k == SE_SIGMAP && $urandom_range(0, 2) == 0) k = SE_COEFF_ABS;
      reqs[i] = rnd_req(k);
      if (i > 0 && k == prev_k) begin
        // same block category and field flag keep the context row
        reqs[i].cat   = reqs[i - 1].cat;
        reqs[i].field = reqs[i - 1].field;
        if (k == SE_COEFF_ABS) reqs[i].incn = 4'($urandom_range(5, (reqs[i].cat == 3) ? 8 : 9));
      end
      if (k == SE_END_SLICE) begin
        reqs[i].slice = SLICE_P;
        vals[i] = (i == N_SE - 1) ? 1 : 0;
      end else vals[i] = rnd_value(reqs[i]);
      if (i % 97 == 50) begin reqs[i] = rnd_req(SE_END_SLICE); vals[i] = 0; end
      prev_k = k;
      bq.delete(); modes.delete(); ctxs.delete();
      binarize(reqs[i], vals[i], bq, modes, ctxs);
      exp_bins[i] = bq.size();
      exp_stall[i] = 0;
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
    // pack the stream, pad with zero words
    nb = enc.stream.size();
    for (int i = 0; i < nb + 64; i += 32) begin
      w = '0;
      for (int j = 0; j < 32; j++) if (i + j < nb) w[31 - j] = enc.stream[i + j];
      words.push_back(w);
    end
    $display("test: %0d SEs, %0d bits", N_SE, nb);
  end

  // ------------------------------------------------------------ bit-stream source
  int word_idx = 0;
  bit started = 0;
  int pause = 0;
  always @(negedge clk) begin
    if (pause > 0) pause--;
    else if ($urandom_range(0, 399) == 0) pause = int'($urandom_range(20, 40));
    bs_valid <= started && word_idx < words.size() && pause == 0 && ($urandom_range(0, 9) != 0);
    bs_data  <= (word_idx < words.size()) ? words[word_idx] : 32'd0;
  end
  always @(posedge clk) if (bs_valid && bs_ready) word_idx <= word_idx + 1;

  // ------------------------------------------------------------ monitors
  int out_idx = 0, req_idx = 0;
  longint cycles_bad = 0, bins_total = 0, stall_total = 0;
  bit prev_dec_in_se = 0;

  always @(posedge clk) if (rst_n) begin
    // per-SE accounting of the SE in decoding (accepted, not yet returned)
    if (out_idx < N_SE) begin
      got_bins[out_idx]  += int'(bins_cycle);
      got_stall[out_idx] += int'(stall_cycle);
    end
    bins_total  += bins_cycle;
    stall_total += stall_cycle;
    if (dut.bad_fire) begin
      cycles_bad++;
      if (dut.n_used == 2'd3) mech[0]++;
      if (dut.n_used == 2'd2) mech[1]++;
      if (dut.mode == MODE_BYPASS && dut.n_used >= 2'd2) mech[2]++;
      if (dut.mode == MODE_TERMINAL) mech[3]++;
      if (dut.mode == MODE_DECISION && dut.n_used >= 2'd2 && dut.sel_slot[1] == dut.sel_slot[0]) mech[4]++;
      if (dut.mode == MODE_BYPASS && prev_dec_in_se) mech[8]++;
      if (dut.mode == MODE_DECISION && dut.n_used == 2'd1 && dut.stage_ok[1] && !dut.bin_valid[1]) mech[9]++;
      prev_dec_in_se = (dut.mode == MODE_DECISION) && !dut.bz_done;
      if (stall_cycle) check(0, "stall and decode in one cycle");
    end
    if (dut.state == 3'd4 && !dut.bad_fire) mech[11]++;
    if (bs_valid && !bs_ready) mech[10]++;
    if (ctx_init_we && !busy) mech[12]++;
    if (dut.accept && dut.bad_fire) mech[13]++;
    if (dut.accept) begin
      check(req_idx < N_SE, "request count");
      prev_dec_in_se = 0;
      req_idx++;
    end
    if (se_out_valid) begin
      if (out_idx < N_SE) begin
        check(se_out_kind == reqs[out_idx].kind, $sformatf("kind of SE %0d", out_idx));
        if (reqs[out_idx].kind == SE_SIGMAP)
          check(se_out_value == ($countones(vals[out_idx]) << 16 | vals[out_idx]),
                $sformatf("SE %0d sigmap got %h exp %h", out_idx, se_out_value, vals[out_idx]));
        else
          check(se_out_value == vals[out_idx],
                $sformatf("SE %0d kind %0d got %0d exp %0d", out_idx, reqs[out_idx].kind,
                          se_out_value, vals[out_idx]));
        check(got_bins[out_idx] == exp_bins[out_idx],
              $sformatf("bins of SE %0d: %0d exp %0d", out_idx, got_bins[out_idx], exp_bins[out_idx]));
        check(got_stall[out_idx] == exp_stall[out_idx],
              $sformatf("stalls of SE %0d: %0d exp %0d", out_idx, got_stall[out_idx], exp_stall[out_idx]));
        if (exp_stall[out_idx] == 0 && reqs[out_idx].kind != SE_END_SLICE && out_idx > 0) mech[5]++;
        if (got_stall[out_idx] >= 2 && reqs[out_idx].kind != SE_SIGMAP) mech[6]++;
        if (reqs[out_idx].kind == SE_SIGMAP && got_stall[out_idx] > 2) mech[7]++;
      end
      out_idx++;
    end
  end

  // ------------------------------------------------------------ driver
  initial begin
    #50000000;
    $display("watchdog expired after %0d of %0d SEs", out_idx, N_SE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin : drive
    logic [ROW_W-1:0] row;
    foreach (got_bins[i]) begin got_bins[i] = 0; got_stall[i] = 0; end
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!busy, "idle after reset");
    // context memory initialisation
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
    // requests, back to back; ready is sampled after the falling edge
    @(negedge clk);
    for (int i = 0; i < N_SE; i++) begin
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
    while (out_idx < N_SE) @(posedge clk);
    repeat (2) @(posedge clk);
    check(!busy, "idle at end");
    check(out_idx == N_SE, "all SEs returned");
    for (int m = 0; m < NM; m++) begin
      $display("mechanism %-34s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism happened: ", mech_name[m]});
    end
    $display("decode cycles %0d, bins %0d, bins/decode cycle %0.3f, stall cycles %0d",
             cycles_bad, bins_total, real'(bins_total) / real'(cycles_bad), stall_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

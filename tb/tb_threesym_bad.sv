// tb_threesym_bad: self-checking testbench of the M-cascade three-symbol BAD.
//
// For random range/offset, contexts and 9-bit windows it runs the bit-serial
// reference decoder one symbol at a time: stage 2 is expected valid only after
// an MPS in stage 1 and stage 3 only after MPS, MPS (never in terminal mode).
// Each valid stage's bin, context update, range, offset and cumulative bit
// count are compared. It also counts how often each decodable sequence
// (L, M, ML, MM, MML, MMM) occurred and fails if one never did. Contexts are
// drawn with high pState often, so that long MPS runs happen. Combinational
// block, checked 1 ns after each stimulus; watchdog included.
//
// The expected valid pattern follows the design document's binvalid rule; the
// per-symbol results follow the H.264/AVC decoding flowcharts.
module tb_threesym_bad;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  bad_mode_t        mode;
  ctx_t             ctx_in [3], ctx_out[3];
  logic [8:0]       range_in, offset_in;
  logic [WIN_W-1:0] bits;
  logic             bin [3], bin_valid[3];
  logic [8:0]       range_out[3], offset_out[3];
  logic [3:0]       used_out[3];

  int checks = 0, failures = 0;
  int seq_cnt[6];   // L, M, ML, MM, MML, MMM (M = last stage valid and MPS, not followed)

  threesym_bad dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    dec_res_t d;
    bit b9[9];
    int m, rng, off, pos, nvalid;
    bit exp_valid;
    for (int i = 0; i < 20000; i++) begin
      m = (i % 10 < 7) ? M_DEC : ((i % 10 < 9) ? M_BYP : M_TERM);
      mode = (m == M_DEC) ? MODE_DECISION : ((m == M_BYP) ? MODE_BYPASS : MODE_TERMINAL);
      range_in  = 9'(256 + $urandom_range(0, 254));
      offset_in = 9'($urandom_range(0, int'(range_in) - 1));
      for (int k = 0; k < 3; k++) begin
        ctx_in[k].pstate  = 6'((i % 3 == 0) ? $urandom_range(0, 62) : $urandom_range(40, 62));
        ctx_in[k].val_mps = 1'($urandom);
      end
      bits = WIN_W'($urandom);
      #1;
      rng = int'(range_in); off = int'(offset_in); pos = 0;
      exp_valid = 1; nvalid = 0;
      for (int k = 0; k < 3; k++) begin
        check(bin_valid[k] == exp_valid, $sformatf("valid %0d", k));
        if (exp_valid) begin
          for (int j = 0; j < 9; j++) b9[j] = (pos + j < WIN_W) ? bits[WIN_W - 1 - pos - j] : 1'b0;
          d = ref_decode(m, rng, off, int'(ctx_in[k].pstate), ctx_in[k].val_mps, b9);
          check(bin[k] == d.bin, $sformatf("bin %0d", k));
          check(int'(range_out[k]) == d.range && int'(offset_out[k]) == d.offset,
                $sformatf("range/offset %0d", k));
          check(int'(used_out[k]) == pos + d.used, $sformatf("used %0d", k));
          if (m == M_DEC)
            check(int'(ctx_out[k].pstate) == d.pstate && ctx_out[k].val_mps == d.val_mps,
                  $sformatf("ctx %0d", k));
          nvalid++;
          rng = d.range; off = d.offset; pos += d.used;
          exp_valid = d.mps && (m != M_TERM);
          if (k == 2 || !exp_valid) begin
            // classify the sequence of this cycle
            if (!d.mps) seq_cnt[(nvalid == 1) ? 0 : ((nvalid == 2) ? 2 : 4)]++;
            else        seq_cnt[(nvalid == 1) ? 1 : ((nvalid == 2) ? 3 : 5)]++;
          end
        end else exp_valid = 0;
      end
    end
    // MM as a complete cycle needs the context selection to stop stage 3; the
    // core alone always tries stage 3 after two MPS, so MM is not expected here
    foreach (seq_cnt[s]) if (s != 3) check(seq_cnt[s] > 0, $sformatf("sequence class %0d seen", s));
    $display("sequences L=%0d M=%0d ML=%0d MM=%0d MML=%0d MMM=%0d",
             seq_cnt[0], seq_cnt[1], seq_cnt[2], seq_cnt[3], seq_cnt[4], seq_cnt[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

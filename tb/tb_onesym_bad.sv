// tb_onesym_bad: self-checking testbench of the one-symbol arithmetic decoder.
//
// Drives random decision, bypass and terminal operations with legal
// range/offset pairs (range 256..510, offset < range) and random contexts and
// bit windows, and compares every output against the bit-serial flowchart
// reference in cabac_ref_pkg (renormalization one bit at a time). Also checks
// the MPS-branch outputs that feed the next cascade stage. The block is
// combinational, so each case is checked after a 1 ns settle; a watchdog ends
// a hung run.
//
// The reference follows the decoding flowcharts of the H.264/AVC standard, as
// the design document reproduces them.
module tb_onesym_bad;
  import cabad_pkg::*;
  import cabac_ref_pkg::*;

  bad_mode_t        mode;
  ctx_t             ctx_in, ctx_out;
  logic [8:0]       range_in, offset_in, range_out, offset_out, range_mps, offset_mps;
  logic [WIN_W-1:0] bits;
  logic             bin_flag, bin_val;
  logic [3:0]       used_out, used_mps;

  int checks = 0, failures = 0;

  onesym_bad dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode=%0d r=%0d o=%0d p=%0d", what, mode, range_in, offset_in, ctx_in.pstate);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    dec_res_t d, dm;
    bit b9[9];
    int m;
    int n_lps = 0, n_mps = 0;
    for (int i = 0; i < 20000; i++) begin
      m = (i % 10 < 6) ? M_DEC : ((i % 10 < 9) ? M_BYP : M_TERM);
      mode = (m == M_DEC) ? MODE_DECISION : ((m == M_BYP) ? MODE_BYPASS : MODE_TERMINAL);
      range_in  = 9'(256 + $urandom_range(0, 254));
      offset_in = 9'($urandom_range(0, int'(range_in) - 1));
      // bias towards the offset boundary to exercise both branches
      if (i % 4 == 0) offset_in = (offset_in < range_in / 2) ? offset_in : range_in - 9'(1 + $urandom_range(0, 3));
      ctx_in.pstate  = 6'($urandom_range(0, 62));
      ctx_in.val_mps = 1'($urandom);
      bits = WIN_W'($urandom);
      for (int j = 0; j < 9; j++) b9[j] = bits[WIN_W - 1 - j];
      #1;
      d = ref_decode(m, int'(range_in), int'(offset_in), int'(ctx_in.pstate), ctx_in.val_mps, b9);
      check(bin_val == d.bin, "bin");
      check(bin_flag == d.mps, "bin_flag");
      check(int'(range_out) == d.range, "range");
      check(int'(offset_out) == d.offset, "offset");
      check(int'(used_out) == d.used, "used");
      if (m == M_DEC) begin
        check(int'(ctx_out.pstate) == d.pstate && ctx_out.val_mps == d.val_mps, "ctx");
        if (d.mps) n_mps++; else n_lps++;
      end
      // MPS branch: decode again with the offset forced below range - rLPS
      if (m == M_DEC) begin
        dm = ref_decode(m, int'(range_in), 0, int'(ctx_in.pstate), ctx_in.val_mps, b9);
        check(int'(range_mps) == dm.range && int'(used_mps) == dm.used, "mps branch");
        if (d.mps) check(offset_mps == offset_out, "mps offset");
      end
    end
    check(n_lps > 1000 && n_mps > 1000, "both branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// onesym_bad: one-symbol binary arithmetic decoder core (combinational).
//
// Decodes one bin in decision, bypass or terminal mode from the current
// codIRange/codIOffset, the context {pStateIdx, valMPS} and a look-ahead window
// of the bit-stream, and renormalizes the result in the same step.
//
//   decision : rLPS = rangeTabLPS[pStateIdx][codIRange[7:6]]; RangX = range - rLPS.
//              offset <  RangX -> MPS: bin = valMPS, range = RangX
//              offset >= RangX -> LPS: bin = !valMPS, offset -= RangX, range = rLPS
//              The context moves through transIdxMPS / transIdxLPS and valMPS
//              flips on an LPS at pStateIdx 0.
//   bypass   : offset = (offset << 1) | next bit; offset >= range -> bin 1 and
//              offset -= range (LPS), otherwise bin 0 (MPS). range is unchanged.
//   terminal : range -= 2; offset >= range -> bin 1, no renormalization;
//              otherwise bin 0 and renormalization.
//
// bin_flag is the comparator output, 1 for the MPS case. Besides the result of
// the symbol actually decoded, the core also exports the result of the MPS
// branch (range_mps/offset_mps/used_mps). The MPS branch depends only on the
// subtraction range - rLPS, not on the comparison, which is what lets the
// M-cascade start the next symbol before this one is resolved.
//
// The rangeTabLPS lookup is split into a 64:1 row selection on pStateIdx and a
// 4:1 selection on the quantized range, as the design describes. used_* is the
// number of bit-stream bits the step consumes (0..7). Purely combinational.
//
// From the design document: the decision, bypass and terminal flows, the split
// rangeTabLPS lookup and the MPS-branch outputs; the tables and bit-exact
// arithmetic are those of the H.264/AVC standard. This design's own choices:
// renormalization by a leading-zero count in the same step and the 0..7 bit
// count output.
module onesym_bad
  import cabad_pkg::*;
(
  input  bad_mode_t          mode,
  input  ctx_t               ctx_in,
  input  logic [8:0]         range_in,
  input  logic [8:0]         offset_in,
  input  logic [WIN_W-1:0]   bits,        // next bit-stream bits, MSB first
  output logic               bin_flag,    // 1: MPS
  output logic               bin_val,
  output ctx_t               ctx_out,
  output logic [8:0]         range_out,
  output logic [8:0]         offset_out,
  output logic [3:0]         used_out,
  output logic [8:0]         range_mps,
  output logic [8:0]         offset_mps,
  output logic [3:0]         used_mps
);

  logic [31:0] lps_row;     // 64:1 stage
  logic [7:0]  rlps;        // 4:1 stage
  logic [8:0]  rangx;
  logic [9:0]  off_byp;
  logic [21:0] rn_mps, rn_lps;

  always_comb begin
    lps_row = range_lps_row(ctx_in.pstate);
    case (range_in[7:6])
      2'd0:    rlps = lps_row[7:0];
      2'd1:    rlps = lps_row[15:8];
      2'd2:    rlps = lps_row[23:16];
      default: rlps = lps_row[31:24];
    endcase
    off_byp = {offset_in, bits[WIN_W-1]};

    bin_flag   = 1'b1;
    bin_val    = 1'b0;
    ctx_out    = ctx_in;
    range_out  = range_in;
    offset_out = offset_in;
    used_out   = 4'd0;
    range_mps  = range_in;
    offset_mps = offset_in;
    used_mps   = 4'd0;
    rangx      = range_in;
    rn_mps     = '0;
    rn_lps     = '0;

    case (mode)
      MODE_BYPASS: begin
        bin_flag   = (off_byp < {1'b0, range_in});
        range_mps  = range_in;
        offset_mps = off_byp[8:0];
        used_mps   = 4'd1;
        range_out  = range_in;
        used_out   = 4'd1;
        if (bin_flag) begin
          bin_val    = 1'b0;
          offset_out = off_byp[8:0];
        end else begin
          bin_val    = 1'b1;
          offset_out = 9'(off_byp - {1'b0, range_in});
        end
      end
      MODE_TERMINAL: begin
        rangx    = range_in - 9'd2;
        bin_flag = (offset_in < rangx);
        rn_mps   = renorm(rangx, offset_in, bits);
        range_mps  = rn_mps[21:13];
        offset_mps = rn_mps[12:4];
        used_mps   = rn_mps[3:0];
        if (bin_flag) begin
          bin_val    = 1'b0;
          range_out  = range_mps;
          offset_out = offset_mps;
          used_out   = used_mps;
        end else begin
          bin_val    = 1'b1;
          range_out  = rangx;
          offset_out = offset_in;
          used_out   = 4'd0;
        end
      end
      default: begin   // MODE_DECISION
        rangx    = range_in - {1'b0, rlps};
        bin_flag = (offset_in < rangx);
        rn_mps   = renorm(rangx, offset_in, bits);
        rn_lps   = renorm({1'b0, rlps}, offset_in - rangx, bits);
        range_mps  = rn_mps[21:13];
        offset_mps = rn_mps[12:4];
        used_mps   = rn_mps[3:0];
        if (bin_flag) begin
          bin_val    = ctx_in.val_mps;
          ctx_out    = ctx_mps_update(ctx_in);
          range_out  = range_mps;
          offset_out = offset_mps;
          used_out   = used_mps;
        end else begin
          bin_val        = ~ctx_in.val_mps;
          ctx_out.pstate = trans_idx_lps(ctx_in.pstate);
          ctx_out.val_mps = (ctx_in.pstate == 6'd0) ? ~ctx_in.val_mps : ctx_in.val_mps;
          range_out  = rn_lps[21:13];
          offset_out = rn_lps[12:4];
          used_out   = rn_lps[3:0];
        end
      end
    endcase
  end

endmodule

// cabad_pkg: types, constants, probability tables and syntax-element stepping
// functions shared by the multi-symbol CABAD (context-based adaptive binary
// arithmetic decoder) for H.264/AVC.
//
// A context is 7 bits, {pStateIdx[5:0], valMPS}. The arithmetic decoder keeps a
// 9-bit codIRange and a 9-bit codIOffset. rangeTabLPS, transIdxLPS and
// transIdxMPS are the probability tables of the H.264/AVC standard; the design
// splits rangeTabLPS into a 64:1 row select on pStateIdx followed by a 4:1
// select on the quantized range, so that the row can be fetched ahead of the
// range arriving.
//
// The se_* functions describe, for every supported syntax element (SE), how its
// bin string is parsed: which arithmetic mode the next bin uses (se_mode), which
// of the ten context state registers it reads (se_slot), which memory row of the
// SE those contexts live in (se_row) and how a decoded bin advances the parse
// (se_step). Context selection runs se_step on the bin values it assumes (the
// MPS of each stage) to pick the contexts of the second and third bin of a
// cycle; the binarization engine runs it on the bins actually decoded. Both
// therefore agree by construction whenever the assumed bins were right.
package cabad_pkg;

  localparam int CTX_W    = 7;    // {pStateIdx, valMPS}
  localparam int CSR_N    = 10;   // context state registers
  localparam int WIN_W    = 9;    // bit-stream look-ahead window
  localparam int MEM_ROWS = 55;   // 550 x 7 bits = 55 rows of ten contexts
  localparam int ROW_W    = CSR_N * CTX_W;

  typedef enum logic [1:0] {
    MODE_DECISION = 2'd0,
    MODE_BYPASS   = 2'd1,
    MODE_TERMINAL = 2'd2
  } bad_mode_t;

  typedef enum logic [1:0] {
    SLICE_I = 2'd0,
    SLICE_P = 2'd1,
    SLICE_B = 2'd2
  } slice_t;

  typedef enum logic [3:0] {
    SE_MB_SKIP     = 4'd0,   // mb_skip_flag (P or B slice)
    SE_MB_FIELD    = 4'd1,   // mb_field_decoding_flag
    SE_MB_TYPE_I   = 4'd2,   // mb_type in an I slice, or its intra suffix in a P/B slice
    SE_MB_TYPE_PB  = 4'd3,   // mb_type in a P slice (prefix) or a B slice
    SE_SUB_MB_PB   = 4'd4,   // sub_mb_type in a P or B slice
    SE_INTRA_MODE  = 4'd5,   // prev_intra4x4_pred_mode_flag + rem_intra4x4_pred_mode
    SE_CHROMA_PRED = 4'd6,   // intra_chroma_pred_mode
    SE_REF_IDX     = 4'd7,   // ref_idx_l0 / ref_idx_l1
    SE_MVD_X       = 4'd8,   // mvd_lX[][][0]
    SE_MVD_Y       = 4'd9,   // mvd_lX[][][1]
    SE_QP_DELTA    = 4'd10,  // mb_qp_delta
    SE_CBF         = 4'd11,  // coded_block_flag
    SE_SIGMAP      = 4'd12,  // significant_coeff_flag / last_significant_coeff_flag map
    SE_COEFF_ABS   = 4'd13,  // coeff_abs_level_minus1 with its sign
    SE_END_SLICE   = 4'd14,  // end_of_slice_flag
    SE_CBP         = 4'd15   // coded_block_pattern (luma prefix + chroma suffix)
  } se_kind_t;

  typedef enum logic [2:0] {
    PH_PREFIX    = 3'd0,
    PH_SUF_UNARY = 3'd1,
    PH_SUF_BITS  = 3'd2,
    PH_SIGN      = 3'd3,
    PH_SIG       = 3'd4,
    PH_LAST      = 3'd5,
    PH_DONE      = 3'd6
  } se_phase_t;

  typedef struct packed {
    logic [5:0] pstate;
    logic       val_mps;
  } ctx_t;

  // One request for a syntax element. inc0 is the ctxIdxInc of bin 0 where the
  // standard derives it from neighbouring blocks (condTermFlag A/B); incn is the
  // ctxIdxInc of bins 1.. of coeff_abs_level_minus1 (5..9), which depends on
  // the levels already decoded in the block. For coded_block_pattern, incn
  // carries the neighbour terms of the luma prefix, {condTermFlagA of 8x8
  // block 2, condTermFlagB of block 1, condTermFlagB of block 0, condTermFlagA
  // of block 0} (the other terms come from bins of the same element), and
  // incc the ctxIdxInc of the two chroma bins, {bin 1 - 4, bin 0}.
  typedef struct packed {
    se_kind_t   kind;
    slice_t     slice;
    logic       field;
    logic [2:0] cat;     // ctxBlockCat 0..4
    logic [2:0] inc0;
    logic [3:0] incn;
    logic [3:0] incc;
  } se_req_t;

  typedef struct packed {
    se_req_t          req;
    se_phase_t        phase;
    logic [5:0]       bin_idx;
    logic [6:0]       hist;    // bin string so far (bit i = binIdx i), first 7 bins
    logic [15:0]      val;
    logic [3:0]       k;       // Exp-Golomb order
    logic [3:0]       nbits;   // suffix bits still to read
    logic [4:0]       pos;     // significance map scanning position
    logic [15:0]      mask;    // significance map
    logic signed [31:0] result;
  } se_state_t;

  // ---------------------------------------------------------------- tables
  // rangeTabLPS row for one pStateIdx: {q3, q2, q1, q0}
  function automatic logic [31:0] range_lps_row(input logic [5:0] p);
    case (p)
      6'd0 : return {8'd240, 8'd208, 8'd176, 8'd128};
      6'd1 : return {8'd227, 8'd197, 8'd167, 8'd128};
      6'd2 : return {8'd216, 8'd187, 8'd158, 8'd128};
      6'd3 : return {8'd205, 8'd178, 8'd150, 8'd123};
      6'd4 : return {8'd195, 8'd169, 8'd142, 8'd116};
      6'd5 : return {8'd185, 8'd160, 8'd135, 8'd111};
      6'd6 : return {8'd175, 8'd152, 8'd128, 8'd105};
      6'd7 : return {8'd166, 8'd144, 8'd122, 8'd100};
      6'd8 : return {8'd158, 8'd137, 8'd116, 8'd95};
      6'd9 : return {8'd150, 8'd130, 8'd110, 8'd90};
      6'd10: return {8'd142, 8'd123, 8'd104, 8'd85};
      6'd11: return {8'd135, 8'd117, 8'd99,  8'd81};
      6'd12: return {8'd128, 8'd111, 8'd94,  8'd77};
      6'd13: return {8'd122, 8'd105, 8'd89,  8'd73};
      6'd14: return {8'd116, 8'd100, 8'd85,  8'd69};
      6'd15: return {8'd110, 8'd95,  8'd80,  8'd66};
      6'd16: return {8'd104, 8'd90,  8'd76,  8'd62};
      6'd17: return {8'd99,  8'd86,  8'd72,  8'd59};
      6'd18: return {8'd94,  8'd81,  8'd69,  8'd56};
      6'd19: return {8'd89,  8'd77,  8'd65,  8'd53};
      6'd20: return {8'd85,  8'd73,  8'd62,  8'd51};
      6'd21: return {8'd80,  8'd69,  8'd59,  8'd48};
      6'd22: return {8'd76,  8'd66,  8'd56,  8'd46};
      6'd23: return {8'd72,  8'd63,  8'd53,  8'd43};
      6'd24: return {8'd69,  8'd59,  8'd50,  8'd41};
      6'd25: return {8'd65,  8'd56,  8'd48,  8'd39};
      6'd26: return {8'd62,  8'd54,  8'd45,  8'd37};
      6'd27: return {8'd59,  8'd51,  8'd43,  8'd35};
      6'd28: return {8'd56,  8'd48,  8'd41,  8'd33};
      6'd29: return {8'd53,  8'd46,  8'd39,  8'd32};
      6'd30: return {8'd50,  8'd43,  8'd37,  8'd30};
      6'd31: return {8'd48,  8'd41,  8'd35,  8'd29};
      6'd32: return {8'd45,  8'd39,  8'd33,  8'd27};
      6'd33: return {8'd43,  8'd37,  8'd31,  8'd26};
      6'd34: return {8'd41,  8'd35,  8'd30,  8'd24};
      6'd35: return {8'd39,  8'd33,  8'd28,  8'd23};
      6'd36: return {8'd37,  8'd32,  8'd27,  8'd22};
      6'd37: return {8'd35,  8'd30,  8'd26,  8'd21};
      6'd38: return {8'd33,  8'd29,  8'd24,  8'd20};
      6'd39: return {8'd31,  8'd27,  8'd23,  8'd19};
      6'd40: return {8'd30,  8'd26,  8'd22,  8'd18};
      6'd41: return {8'd28,  8'd25,  8'd21,  8'd17};
      6'd42: return {8'd27,  8'd23,  8'd20,  8'd16};
      6'd43: return {8'd25,  8'd22,  8'd19,  8'd15};
      6'd44: return {8'd24,  8'd21,  8'd18,  8'd14};
      6'd45: return {8'd23,  8'd20,  8'd17,  8'd14};
      6'd46: return {8'd22,  8'd19,  8'd16,  8'd13};
      6'd47: return {8'd21,  8'd18,  8'd15,  8'd12};
      6'd48: return {8'd20,  8'd17,  8'd14,  8'd12};
      6'd49: return {8'd19,  8'd16,  8'd14,  8'd11};
      6'd50: return {8'd18,  8'd15,  8'd13,  8'd11};
      6'd51: return {8'd17,  8'd15,  8'd12,  8'd10};
      6'd52: return {8'd16,  8'd14,  8'd12,  8'd10};
      6'd53: return {8'd15,  8'd13,  8'd11,  8'd9};
      6'd54: return {8'd14,  8'd12,  8'd11,  8'd9};
      6'd55: return {8'd14,  8'd12,  8'd10,  8'd8};
      6'd56: return {8'd13,  8'd11,  8'd9,   8'd8};
      6'd57: return {8'd12,  8'd11,  8'd9,   8'd7};
      6'd58: return {8'd12,  8'd10,  8'd9,   8'd7};
      6'd59: return {8'd11,  8'd10,  8'd8,   8'd7};
      6'd60: return {8'd11,  8'd9,   8'd8,   8'd6};
      6'd61: return {8'd10,  8'd9,   8'd7,   8'd6};
      6'd62: return {8'd9,   8'd8,   8'd7,   8'd6};
      default: return {8'd2, 8'd2, 8'd2, 8'd2};
    endcase
  endfunction

  function automatic logic [5:0] trans_idx_lps(input logic [5:0] p);
    case (p)
      6'd0, 6'd1: return 6'd0;
      6'd2: return 6'd1;   6'd3, 6'd4: return 6'd2;  6'd5, 6'd6: return 6'd4;
      6'd7: return 6'd5;   6'd8: return 6'd6;        6'd9: return 6'd7;
      6'd10: return 6'd8;  6'd11, 6'd12: return 6'd9;
      6'd13, 6'd14: return 6'd11; 6'd15: return 6'd12;
      6'd16, 6'd17: return 6'd13; 6'd18, 6'd19: return 6'd15;
      6'd20, 6'd21: return 6'd16; 6'd22, 6'd23: return 6'd18;
      6'd24, 6'd25: return 6'd19; 6'd26, 6'd27: return 6'd21;
      6'd28, 6'd29: return 6'd22; 6'd30: return 6'd23;
      6'd31, 6'd32: return 6'd24; 6'd33: return 6'd25;
      6'd34, 6'd35: return 6'd26; 6'd36, 6'd37: return 6'd27;
      6'd38: return 6'd28; 6'd39, 6'd40: return 6'd29;
      6'd41, 6'd42, 6'd43: return 6'd30; 6'd44: return 6'd31;
      6'd45, 6'd46: return 6'd32; 6'd47, 6'd48, 6'd49: return 6'd33;
      6'd50, 6'd51: return 6'd34; 6'd52, 6'd53, 6'd54: return 6'd35;
      6'd55, 6'd56, 6'd57: return 6'd36; 6'd58, 6'd59, 6'd60: return 6'd37;
      6'd61, 6'd62: return 6'd38;
      default: return 6'd63;
    endcase
  endfunction

  function automatic logic [5:0] trans_idx_mps(input logic [5:0] p);
    return (p < 6'd62) ? p + 6'd1 : p;
  endfunction

  // MPS update of a context (the "pState Update" of context selection)
  function automatic ctx_t ctx_mps_update(input ctx_t c);
    ctx_t n;
    n.pstate  = trans_idx_mps(c.pstate);
    n.val_mps = c.val_mps;
    return n;
  endfunction

  // Renormalization: shift codIRange left until its MSB is set, filling
  // codIOffset from the bit-stream. Returns {range, offset, shift}.
  function automatic logic [21:0] renorm(input logic [8:0] rng, input logic [8:0] off,
                                         input logic [WIN_W-1:0] bits);
    logic [3:0] sh;
    logic [17:0] cat_off;
    sh = 4'd0;
    for (int i = 8; i >= 0; i--) begin
      if (rng[i]) begin
        sh = 4'(8 - i);
        break;
      end
    end
    cat_off = {off, bits} << sh;
    return {rng << sh, cat_off[17:9], sh};
  endfunction

  // ---------------------------------------------------------------- SE parse
  function automatic logic [4:0] max_num_coeff(input logic [2:0] cat);
    case (cat)
      3'd0, 3'd2: return 5'd16;
      3'd3:       return 5'd4;
      default:    return 5'd15;
    endcase
  endfunction

  function automatic logic [4:0] popcount16(input logic [15:0] m);
    logic [4:0] c = '0;
    for (int i = 0; i < 16; i++) c += 5'(m[i]);
    return c;
  endfunction

  function automatic se_state_t se_init(input se_req_t r);
    se_state_t s;
    s        = '0;
    s.req    = r;
    s.phase  = (r.kind == SE_SIGMAP) ? PH_SIG : PH_PREFIX;
    return s;
  endfunction

  function automatic logic se_done(input se_state_t s);
    return s.phase == PH_DONE;
  endfunction

  function automatic bad_mode_t se_mode(input se_state_t s);
    if (s.req.kind == SE_END_SLICE) return MODE_TERMINAL;
    if (s.req.kind == SE_MB_TYPE_I && s.bin_idx == 6'd1) return MODE_TERMINAL;
    if ((s.req.kind == SE_MVD_X || s.req.kind == SE_MVD_Y || s.req.kind == SE_COEFF_ABS) &&
        (s.phase == PH_SUF_UNARY || s.phase == PH_SUF_BITS || s.phase == PH_SIGN))
      return MODE_BYPASS;
    return MODE_DECISION;
  endfunction

  // ctxIdxInc of a significance-map position (frame/field coded 4x4 blocks)
  function automatic logic [3:0] sig_inc(input se_state_t s);
    if (s.req.cat == 3'd3) return (s.pos > 5'd2) ? 4'd2 : 4'(s.pos);
    return 4'(s.pos);
  endfunction

  // Row of the SE's context block that the next bin reads (only the
  // significance map spans several rows: five sig/last pairs per row).
  function automatic logic [1:0] se_row(input se_state_t s);
    if (s.req.kind == SE_SIGMAP) return 2'(sig_inc(s) / 4'd5);
    if (s.req.kind == SE_CBP && s.bin_idx == 6'd5) return 2'd1;   // second chroma bin
    return 2'd0;
  endfunction

  // CSR slot (ctxIdxInc within the loaded row) of the next decision bin
  function automatic logic [3:0] se_slot(input se_state_t s);
    logic [5:0] b;
    logic [3:0] o;
    b = s.bin_idx;
    case (s.req.kind)
      SE_MB_SKIP, SE_MB_FIELD, SE_CBF: return {1'b0, s.req.inc0};
      SE_MB_TYPE_I: begin
        if (s.req.slice != SLICE_I) begin
          // intra suffix in a P/B slice: ctxIdx 17..20 are slots 3..6 of the
          // P mb_type row, 32..35 slots 5..8 of the B mb_type row
          o = (s.req.slice == SLICE_B) ? 4'd5 : 4'd3;
          if (b == 6'd0) return o;
          if (b == 6'd2) return o + 4'd1;
          if (b == 6'd3) return o + 4'd2;
          if (b == 6'd4) return s.hist[3] ? o + 4'd2 : o + 4'd3;
          return o + 4'd3;
        end
        if (b == 6'd0) return {1'b0, s.req.inc0};
        if (b == 6'd2) return 4'd3;
        if (b == 6'd3) return 4'd4;
        if (b == 6'd4) return s.hist[3] ? 4'd5 : 4'd6;
        if (b == 6'd5) return s.hist[3] ? 4'd6 : 4'd7;
        return 4'd7;
      end
      SE_MB_TYPE_PB: begin
        if (s.req.slice == SLICE_B) begin
          if (b == 6'd0) return {1'b0, s.req.inc0};
          if (b == 6'd1) return 4'd3;
          if (b == 6'd2) return s.hist[1] ? 4'd5 : 4'd4;
          return 4'd5;
        end
        if (b == 6'd0) return 4'd0;
        if (b == 6'd1) return 4'd1;
        return (s.hist[1] != 1'b1) ? 4'd2 : 4'd3;
      end
      SE_SUB_MB_PB: begin
        if (s.req.slice == SLICE_B) begin
          if (b == 6'd0) return 4'd0;
          if (b == 6'd1) return 4'd1;
          if (b == 6'd2) return s.hist[1] ? 4'd2 : 4'd3;
          return 4'd3;
        end
        return (b > 6'd2) ? 4'd2 : b[3:0];
      end
      SE_CBP: begin
        // luma bin k is 8x8 block k: condTermFlag = 1 when the neighbouring
        // block has no coded coefficients (its cbp bit is 0)
        case (b)
          6'd0: return {2'b00, s.req.incn[1], s.req.incn[0]};
          6'd1: return {2'b00, s.req.incn[2], !s.hist[0]};
          6'd2: return {2'b00, !s.hist[0], s.req.incn[3]};
          6'd3: return {2'b00, !s.hist[1], !s.hist[2]};
          6'd4: return 4'd4 + {2'b00, s.req.incc[1:0]};
          default: return {2'b00, s.req.incc[3:2]};
        endcase
      end
      SE_INTRA_MODE: return (b == 6'd0) ? 4'd4 : 4'd5;
      SE_CHROMA_PRED: return (b == 6'd0) ? {1'b0, s.req.inc0} : 4'd3;
      SE_REF_IDX: begin
        if (b == 6'd0) return {1'b0, s.req.inc0};
        return (b == 6'd1) ? 4'd4 : 4'd5;
      end
      SE_QP_DELTA: begin
        if (b == 6'd0) return {1'b0, s.req.inc0};
        return (b == 6'd1) ? 4'd2 : 4'd3;
      end
      SE_MVD_X, SE_MVD_Y: begin
        if (b == 6'd0) return {1'b0, s.req.inc0};
        if (b >= 6'd4) return 4'd6;
        return 4'(b) + 4'd2;
      end
      SE_COEFF_ABS: return (b == 6'd0) ? {1'b0, s.req.inc0} : s.req.incn;
      SE_SIGMAP: begin
        logic [3:0] i;
        i = sig_inc(s);
        return 4'((i % 4'd5) * 4'd2) + ((s.phase == PH_LAST) ? 4'd1 : 4'd0);
      end
      default: return 4'd0;
    endcase
  endfunction

  function automatic se_state_t se_finish(input se_state_t s, input logic signed [31:0] v);
    se_state_t n;
    n        = s;
    n.result = v;
    n.phase  = PH_DONE;
    return n;
  endfunction

  // Advance the parse of an SE by one decoded bin.
  function automatic se_state_t se_step(input se_state_t s, input logic b);
    se_state_t n;
    logic [1:0]  chroma;
    logic [1:0]  pred;
    logic [15:0] m;
    logic [4:0]  mx;
    n = s;
    if (s.phase == PH_DONE) return s;
    if (s.bin_idx < 6'd7) n.hist[s.bin_idx[2:0]] = b;
    if (s.bin_idx != 6'd63) n.bin_idx = s.bin_idx + 6'd1;
    case (s.req.kind)
      SE_MB_SKIP, SE_MB_FIELD, SE_CBF, SE_END_SLICE:
        n = se_finish(n, 32'(b));
      SE_MB_TYPE_I: begin
        if (s.bin_idx == 6'd0 && !b)      n = se_finish(n, 32'd0);
        else if (s.bin_idx == 6'd1 && b)  n = se_finish(n, 32'd25);   // I_PCM
        else if ((s.bin_idx == 6'd5 && !n.hist[3]) || s.bin_idx == 6'd6) begin
          if (n.hist[3]) begin
            chroma = n.hist[4] ? 2'd2 : 2'd1;
            pred   = {n.hist[5], n.hist[6]};
          end else begin
            chroma = 2'd0;
            pred   = {n.hist[4], n.hist[5]};
          end
          n = se_finish(n, 32'd1 + 32'(pred) + 32'd4 * 32'(chroma) + (n.hist[2] ? 32'd12 : 32'd0));
        end
      end
      SE_MB_TYPE_PB: begin
        if (s.req.slice == SLICE_B) begin
          // 0 | 10x | 11xxxx [x]: values 0..22, 23 = intra prefix 111101
          if (s.bin_idx == 6'd0 && !b) n = se_finish(n, 32'd0);
          else if (s.bin_idx == 6'd2 && !n.hist[1]) n = se_finish(n, b ? 32'd2 : 32'd1);
          else if (s.bin_idx == 6'd5) begin
            case ({n.hist[2], n.hist[3], n.hist[4], n.hist[5]})
              4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100: ;   // one more bin
              4'b1101: n = se_finish(n, 32'd23);
              4'b1110: n = se_finish(n, 32'd11);
              4'b1111: n = se_finish(n, 32'd22);
              default: n = se_finish(n, 32'd3 + 32'({n.hist[3], n.hist[4], n.hist[5]}));
            endcase
          end else if (s.bin_idx == 6'd6) begin
            if (n.hist[3]) n = se_finish(n, 32'd20 + 32'(b));
            else n = se_finish(n, 32'd12 + 32'({n.hist[4], n.hist[5], b}));
          end
        end
        else if (s.bin_idx == 6'd0 && b) n = se_finish(n, 32'd5);   // intra prefix
        else if (s.bin_idx == 6'd2) begin
          case ({n.hist[1], n.hist[2]})
            2'b00:   n = se_finish(n, 32'd0);
            2'b11:   n = se_finish(n, 32'd1);
            2'b10:   n = se_finish(n, 32'd2);
            default: n = se_finish(n, 32'd3);
          endcase
        end
      end
      SE_SUB_MB_PB: begin
        if (s.req.slice == SLICE_B) begin
          // 0 | 10x | 110xx | 1110xx | 1111x
          if (s.bin_idx == 6'd0 && !b) n = se_finish(n, 32'd0);
          else if (s.bin_idx == 6'd2 && !n.hist[1]) n = se_finish(n, b ? 32'd2 : 32'd1);
          else if (s.bin_idx == 6'd4 && !n.hist[2]) n = se_finish(n, 32'd3 + 32'({n.hist[3], b}));
          else if (s.bin_idx == 6'd4 && n.hist[3])  n = se_finish(n, 32'd11 + 32'(b));
          else if (s.bin_idx == 6'd5) n = se_finish(n, 32'd7 + 32'({n.hist[4], b}));
        end
        else if (s.bin_idx == 6'd0 && b) n = se_finish(n, 32'd0);
        else if (s.bin_idx == 6'd1 && !b) n = se_finish(n, 32'd1);
        else if (s.bin_idx == 6'd2)       n = se_finish(n, b ? 32'd2 : 32'd3);
      end
      SE_CBP: begin
        // bins 0..3: CodedBlockPatternLuma, bit k = 8x8 block k (FL, LSB first);
        // bins 4..5: CodedBlockPatternChroma (TU, cMax 2); value luma + 16*chroma
        if (s.bin_idx == 6'd4 && !b) n = se_finish(n, 32'({n.hist[3], n.hist[2], n.hist[1], n.hist[0]}));
        else if (s.bin_idx == 6'd5)
          n = se_finish(n, 32'({n.hist[3], n.hist[2], n.hist[1], n.hist[0]}) + (b ? 32'd32 : 32'd16));
      end
      SE_INTRA_MODE: begin
        // bin 0: prev_intra4x4_pred_mode_flag; bins 1..3: rem mode, LSB first
        if (s.bin_idx == 6'd0) begin
          if (b) n = se_finish(n, 32'd8);
        end else begin
          n.val[4'(s.bin_idx[1:0]) - 4'd1] = b;
          if (s.bin_idx == 6'd3) n = se_finish(n, 32'(n.val[2:0]));
        end
      end
      SE_CHROMA_PRED: begin
        if (!b) n = se_finish(n, 32'(s.val));
        else begin
          n.val = s.val + 16'd1;
          if (n.val == 16'd3) n = se_finish(n, 32'd3);
        end
      end
      SE_REF_IDX: begin
        if (!b || s.val == 16'd63) n = se_finish(n, 32'(s.val));
        else n.val = s.val + 16'd1;
      end
      SE_QP_DELTA: begin
        if (!b || s.val == 16'd52) begin
          if (s.val[0]) n = se_finish(n, 32'(s.val[15:1]) + 32'd1);
          else          n = se_finish(n, -32'(s.val >> 1));
        end else n.val = s.val + 16'd1;
      end
      SE_MVD_X, SE_MVD_Y, SE_COEFF_ABS: begin
        case (s.phase)
          PH_PREFIX: begin
            if (b) begin
              n.val = s.val + 16'd1;
              if (s.req.kind == SE_COEFF_ABS && n.val == 16'd14) begin
                n.phase = PH_SUF_UNARY; n.k = 4'd0;
              end else if (s.req.kind != SE_COEFF_ABS && n.val == 16'd9) begin
                n.phase = PH_SUF_UNARY; n.k = 4'd3;
              end
            end else begin
              if (s.req.kind != SE_COEFF_ABS && s.val == 16'd0) n = se_finish(n, 32'd0);
              else n.phase = PH_SIGN;
            end
          end
          PH_SUF_UNARY: begin
            if (b) begin
              n.val = s.val + (16'd1 << s.k);
              n.k   = s.k + 4'd1;
            end else if (s.k == 4'd0) n.phase = PH_SIGN;
            else begin
              n.nbits = s.k;
              n.phase = PH_SUF_BITS;
            end
          end
          PH_SUF_BITS: begin
            n.val   = s.val + (16'(b) << (s.nbits - 4'd1));
            n.nbits = s.nbits - 4'd1;
            if (s.nbits == 4'd1) n.phase = PH_SIGN;
          end
          default: begin   // PH_SIGN
            if (s.req.kind == SE_COEFF_ABS)
              n = se_finish(n, b ? -(32'(s.val) + 32'd1) : 32'(s.val) + 32'd1);
            else
              n = se_finish(n, b ? -32'(s.val) : 32'(s.val));
          end
        endcase
      end
      SE_SIGMAP: begin
        mx = max_num_coeff(s.req.cat);
        m  = s.mask;
        if (s.phase == PH_SIG && b) begin
          m[s.pos[3:0]] = 1'b1;
          n.mask  = m;
          n.phase = PH_LAST;
        end else if (s.phase == PH_LAST && b) begin
          n = se_finish(n, {11'd0, popcount16(m), m});
        end else begin
          n.pos   = s.pos + 5'd1;
          n.phase = PH_SIG;
          if (n.pos == mx - 5'd1) begin
            m[n.pos[3:0]] = 1'b1;   // last position inferred significant
            n.mask = m;
            n = se_finish(n, {11'd0, popcount16(m), m});
          end
        end
      end
      default: n = se_finish(n, 32'd0);
    endcase
    return n;
  endfunction

endpackage

// cabac_ref_pkg: reference models for the CABAD testbenches.
//
// Holds what the testbenches need to produce stimulus and expected values
// without using the decoder's own logic: the standard H.264/AVC binarization
// of every supported syntax element (bin string, per-bin arithmetic mode and
// standard ctxIdx), a bit-exact CABAC arithmetic encoder that turns bq into
// a bit-stream, a bit-serial reference of the decoder flowcharts (decision,
// bypass, terminal with loop renormalization), and the context-memory layout
// (row, slot) -> ctxIdx used to initialise the memory. Only the probability
// tables are shared with the design, since they are constants of the standard.
package cabac_ref_pkg;
  import cabad_pkg::*;

  localparam int M_DEC  = 0;
  localparam int M_BYP  = 1;
  localparam int M_TERM = 2;

  // ------------------------------------------------------------ binarization
  // bq/modes/ctxs are appended for one syntax element
  function automatic void put(ref bit bq[$], ref int modes[$], ref int ctxs[$],
                              input bit b, input int m, input int c);
    bq.push_back(b);
    modes.push_back(m);
    ctxs.push_back(c);
  endfunction

  function automatic int sig_cat_offset(int cat);
    case (cat)
      0: return 0;  1: return 15; 2: return 29; 3: return 44; default: return 47;
    endcase
  endfunction

  function automatic int abs_cat_offset(int cat);
    case (cat)
      0: return 0;  1: return 10; 2: return 20; 3: return 30; default: return 39;
    endcase
  endfunction

  function automatic int max_coeff(int cat);
    case (cat)
      0, 2: return 16; 3: return 4; default: return 15;
    endcase
  endfunction

  // k-th order Exp-Golomb suffix, bypass bq
  function automatic void put_egk(ref bit bq[$], ref int modes[$], ref int ctxs[$],
                                  input int suf, input int k);
    while (1) begin
      if (suf >= (1 << k)) begin
        put(bq, modes, ctxs, 1, M_BYP, -1);
        suf -= (1 << k);
        k++;
      end else begin
        put(bq, modes, ctxs, 0, M_BYP, -1);
        while (k > 0) begin
          k--;
          put(bq, modes, ctxs, (suf >> k) & 1, M_BYP, -1);
        end
        break;
      end
    end
  endfunction

  function automatic string b_mb_type_bins(int v);
    case (v)
      0: return "0";        1: return "100";      2: return "101";
      3: return "110000";   4: return "110001";   5: return "110010";
      6: return "110011";   7: return "110100";   8: return "110101";
      9: return "110110";  10: return "110111";  11: return "111110";
     12: return "1110000"; 13: return "1110001"; 14: return "1110010";
     15: return "1110011"; 16: return "1110100"; 17: return "1110101";
     18: return "1110110"; 19: return "1110111"; 20: return "1111000";
     21: return "1111001"; 22: return "111111";  default: return "111101";
    endcase
  endfunction

  function automatic string b_sub_bins(int v);
    case (v)
      0: return "0";      1: return "100";    2: return "101";
      3: return "11000";  4: return "11001";  5: return "11010";
      6: return "11011";  7: return "111000"; 8: return "111001";
      9: return "111010"; 10: return "111011"; 11: return "11110";
      default: return "11111";
    endcase
  endfunction

  // value: SE value; for SE_SIGMAP value[15:0] is the significance map
  function automatic void binarize(input se_req_t r, input int value,
                                   ref bit bq[$], ref int modes[$], ref int ctxs[$]);
    int a, i, lastpos, mx, pred, chroma, ac, base, k;
    string str;
    bit b0, b1;
    case (r.kind)
      SE_MB_SKIP: put(bq, modes, ctxs, value[0], M_DEC, ((r.slice == SLICE_B) ? 24 : 11) + int'(r.inc0));
      SE_MB_FIELD: put(bq, modes, ctxs, value[0], M_DEC, 70 + int'(r.inc0));
      SE_CBF: put(bq, modes, ctxs, value[0], M_DEC, 85 + 4 * int'(r.cat) + int'(r.inc0));
      SE_END_SLICE: put(bq, modes, ctxs, value[0], M_TERM, 276);
      SE_MB_TYPE_I: begin
        // I slice: ctxIdxOffset 3; in a P/B slice the same bin string is the
        // suffix after the intra prefix, ctxIdxOffset 17 (P) or 32 (B)
        int o, c0, c2, c3, c4y, c4n, c5y, c5n, c6;
        if (r.slice == SLICE_I) begin
          o = 3; c0 = int'(r.inc0); c2 = 3; c3 = 4; c4y = 5; c4n = 6; c5y = 6; c5n = 7; c6 = 7;
        end else begin
          o = (r.slice == SLICE_P) ? 17 : 32;
          c0 = 0; c2 = 1; c3 = 2; c4y = 2; c4n = 3; c5y = 3; c5n = 3; c6 = 3;
        end
        if (value == 0) put(bq, modes, ctxs, 0, M_DEC, o + c0);
        else if (value == 25) begin
          put(bq, modes, ctxs, 1, M_DEC, o + c0);
          put(bq, modes, ctxs, 1, M_TERM, 276);
        end else begin
          a = value - 1;
          pred = a % 4; chroma = (a / 4) % 3; ac = a / 12;
          put(bq, modes, ctxs, 1, M_DEC, o + c0);
          put(bq, modes, ctxs, 0, M_TERM, 276);
          put(bq, modes, ctxs, ac[0], M_DEC, o + c2);
          put(bq, modes, ctxs, chroma != 0, M_DEC, o + c3);
          if (chroma != 0) begin
            put(bq, modes, ctxs, chroma == 2, M_DEC, o + c4y);
            put(bq, modes, ctxs, pred[1], M_DEC, o + c5y);
            put(bq, modes, ctxs, pred[0], M_DEC, o + c6);
          end else begin
            put(bq, modes, ctxs, pred[1], M_DEC, o + c4n);
            put(bq, modes, ctxs, pred[0], M_DEC, o + c5n);
          end
        end
      end
      SE_MB_TYPE_PB: if (r.slice == SLICE_B) begin
        // bin strings of mb_type in B slices, 23 = intra prefix
        a = 0;
        str = b_mb_type_bins(value);
        for (i = 0; i < str.len(); i++) begin
          k = (i == 0) ? int'(r.inc0) : ((i == 1) ? 3 : ((i == 2) ? ((str[1] == "1") ? 5 : 4) : 5));
          put(bq, modes, ctxs, str[i] == "1", M_DEC, 27 + k);
        end
      end else begin
        case (value)
          0: begin put(bq, modes, ctxs, 0, M_DEC, 14); put(bq, modes, ctxs, 0, M_DEC, 15); put(bq, modes, ctxs, 0, M_DEC, 16); end
          1: begin put(bq, modes, ctxs, 0, M_DEC, 14); put(bq, modes, ctxs, 1, M_DEC, 15); put(bq, modes, ctxs, 1, M_DEC, 17); end
          2: begin put(bq, modes, ctxs, 0, M_DEC, 14); put(bq, modes, ctxs, 1, M_DEC, 15); put(bq, modes, ctxs, 0, M_DEC, 17); end
          3: begin put(bq, modes, ctxs, 0, M_DEC, 14); put(bq, modes, ctxs, 0, M_DEC, 15); put(bq, modes, ctxs, 1, M_DEC, 16); end
          default: put(bq, modes, ctxs, 1, M_DEC, 14);
        endcase
      end
      SE_SUB_MB_PB: if (r.slice == SLICE_B) begin
        str = b_sub_bins(value);
        for (i = 0; i < str.len(); i++) begin
          k = (i == 0) ? 0 : ((i == 1) ? 1 : ((i == 2) ? ((str[1] == "1") ? 2 : 3) : 3));
          put(bq, modes, ctxs, str[i] == "1", M_DEC, 36 + k);
        end
      end else begin
        case (value)
          0: put(bq, modes, ctxs, 1, M_DEC, 21);
          1: begin put(bq, modes, ctxs, 0, M_DEC, 21); put(bq, modes, ctxs, 0, M_DEC, 22); end
          2: begin put(bq, modes, ctxs, 0, M_DEC, 21); put(bq, modes, ctxs, 1, M_DEC, 22); put(bq, modes, ctxs, 1, M_DEC, 23); end
          default: begin put(bq, modes, ctxs, 0, M_DEC, 21); put(bq, modes, ctxs, 1, M_DEC, 22); put(bq, modes, ctxs, 0, M_DEC, 23); end
        endcase
      end
      SE_CBP: begin
        // value = luma (4 bits, bit k = 8x8 block k) + 16 * chroma (0..2)
        for (i = 0; i < 4; i++) begin
          case (i)
            0: { b1, b0 } = { r.incn[1], r.incn[0] };
            1: { b1, b0 } = { r.incn[2], !value[0] };
            2: { b1, b0 } = { !value[0], r.incn[3] };
            default: { b1, b0 } = { !value[1], !value[2] };
          endcase
          put(bq, modes, ctxs, value[i], M_DEC, 73 + 2 * int'(b1) + int'(b0));
        end
        put(bq, modes, ctxs, value[5:4] != 0, M_DEC, 77 + int'(r.incc[1:0]));
        if (value[5:4] != 0) put(bq, modes, ctxs, value[5:4] == 2, M_DEC, 81 + int'(r.incc[3:2]));
      end
      SE_INTRA_MODE: begin
        if (value == 8) put(bq, modes, ctxs, 1, M_DEC, 68);
        else begin
          put(bq, modes, ctxs, 0, M_DEC, 68);
          for (i = 0; i < 3; i++) put(bq, modes, ctxs, value[i], M_DEC, 69);
        end
      end
      SE_CHROMA_PRED: begin
        for (i = 0; i < value; i++) put(bq, modes, ctxs, 1, M_DEC, (i == 0) ? 64 + int'(r.inc0) : 67);
        if (value < 3) put(bq, modes, ctxs, 0, M_DEC, (value == 0) ? 64 + int'(r.inc0) : 67);
      end
      SE_REF_IDX, SE_QP_DELTA: begin
        base = (r.kind == SE_REF_IDX) ? 54 : 60;
        if (r.kind == SE_QP_DELTA) k = (value > 0) ? 2 * value - 1 : -2 * value;
        else k = value;
        for (i = 0; i <= k; i++) begin
          if (i == 0) a = base + int'(r.inc0);
          else if (i == 1) a = base + ((r.kind == SE_REF_IDX) ? 4 : 2);
          else a = base + ((r.kind == SE_REF_IDX) ? 5 : 3);
          put(bq, modes, ctxs, i < k, M_DEC, a);
        end
      end
      SE_MVD_X, SE_MVD_Y: begin
        base = (r.kind == SE_MVD_X) ? 40 : 47;
        a = (value < 0) ? -value : value;
        for (i = 0; i < ((a < 9) ? a + 1 : 9); i++) begin
          k = (i == 0) ? int'(r.inc0) : ((i >= 4) ? 6 : i + 2);
          put(bq, modes, ctxs, i < a, M_DEC, base + k);
        end
        if (a >= 9) put_egk(bq, modes, ctxs, a - 9, 3);
        if (a != 0) put(bq, modes, ctxs, value < 0, M_BYP, -1);
      end
      SE_COEFF_ABS: begin
        base = 227 + abs_cat_offset(int'(r.cat));
        a = ((value < 0) ? -value : value) - 1;
        for (i = 0; i < ((a < 14) ? a + 1 : 14); i++)
          put(bq, modes, ctxs, i < a, M_DEC, base + ((i == 0) ? int'(r.inc0) : int'(r.incn)));
        if (a >= 14) put_egk(bq, modes, ctxs, a - 14, 0);
        put(bq, modes, ctxs, value < 0, M_BYP, -1);
      end
      SE_SIGMAP: begin
        mx = max_coeff(int'(r.cat));
        lastpos = 0;
        for (i = 0; i < mx; i++) if (value[i]) lastpos = i;
        for (i = 0; i < mx - 1; i++) begin
          k = (r.cat == 3) ? ((i > 2) ? 2 : i) : i;
          put(bq, modes, ctxs, value[i], M_DEC,
              (r.field ? 277 : 105) + sig_cat_offset(int'(r.cat)) + k);
          if (value[i]) begin
            put(bq, modes, ctxs, i == lastpos, M_DEC,
                (r.field ? 338 : 166) + sig_cat_offset(int'(r.cat)) + k);
            if (i == lastpos) break;
          end
        end
      end
      default: ;
    endcase
  endfunction

  // ------------------------------------------------------------ memory layout
  // ctxIdx held in (row, slot) of the context memory, -1 if unused
  function automatic int row_slot_ctx(int row, int slot);
    int cat, r, j, fld, base;
    if (row == 0)  return (slot < 8) ? 3 + slot : -1;
    if (row == 1)  return (slot < 3) ? 11 + slot : -1;
    if (row == 2)  return (slot < 7) ? 14 + slot : -1;
    if (row == 3)  return (slot < 3) ? 21 + slot : -1;
    if (row == 4)  return (slot < 3) ? 24 + slot : -1;
    if (row == 5)  return (slot < 9) ? 27 + slot : -1;
    if (row == 6)  return (slot < 4) ? 36 + slot : -1;
    if (row == 7)  return (slot < 7) ? 40 + slot : -1;
    if (row == 8)  return (slot < 7) ? 47 + slot : -1;
    if (row == 9)  return (slot < 6) ? 54 + slot : -1;
    if (row == 10) return (slot < 4) ? 60 + slot : -1;
    if (row == 11) return (slot < 6) ? 64 + slot : -1;
    if (row == 12) return (slot < 3) ? 70 + slot : -1;
    if (row == 13) return (slot < 8) ? 73 + slot : -1;
    if (row == 14) return (slot < 4) ? 81 + slot : -1;
    if (row >= 15 && row <= 19) return (slot < 4) ? 85 + 4 * (row - 15) + slot : -1;
    if (row >= 20 && row <= 24) begin
      cat = row - 20;
      return (cat == 3 && slot == 9) ? -1 : 227 + abs_cat_offset(cat) + slot;
    end
    if (row >= 25 && row <= 50) begin
      fld = (row >= 38);
      r = row - (fld ? 38 : 25);
      if (r < 3) begin cat = 0; base = 0; end
      else if (r < 6) begin cat = 1; base = 3; end
      else if (r < 9) begin cat = 2; base = 6; end
      else if (r < 10) begin cat = 3; base = 9; end
      else begin cat = 4; base = 10; end
      j = 5 * (r - base) + slot / 2;   // ctxIdxInc of the pair
      if (j > ((cat == 3) ? 2 : max_coeff(cat) - 2)) return -1;
      if (slot % 2 == 0) return (fld ? 277 : 105) + sig_cat_offset(cat) + j;
      return (fld ? 338 : 166) + sig_cat_offset(cat) + j;
    end
    return -1;
  endfunction

  // ------------------------------------------------------------ bit-serial decoder
  typedef struct {
    int  range;
    int  offset;
    int  used;
    bit  bin;
    bit  mps;      // comparator: MPS case
    int  pstate;
    bit  val_mps;
  } dec_res_t;

  // bits[i] is the i-th bit after the current position
  function automatic dec_res_t ref_decode(int mode, int range, int offset, int pstate,
                                          bit val_mps, bit bits[9]);
    dec_res_t d;
    int rlps;
    logic [31:0] row;
    d.used = 0; d.pstate = pstate; d.val_mps = val_mps;
    if (mode == M_BYP) begin
      offset = (offset << 1) | bits[0];
      d.used = 1;
      if (offset >= range) begin d.bin = 1; d.mps = 0; offset -= range; end
      else begin d.bin = 0; d.mps = 1; end
    end else if (mode == M_TERM) begin
      range -= 2;
      if (offset >= range) begin d.bin = 1; d.mps = 0; end
      else begin
        d.bin = 0; d.mps = 1;
        while (range < 256) begin
          range = range << 1; offset = (offset << 1) | bits[d.used]; d.used++;
        end
      end
    end else begin
      row = range_lps_row(6'(pstate));
      rlps = int'(row[8 * ((range >> 6) & 3) +: 8]);
      range -= rlps;
      if (offset >= range) begin
        d.bin = !val_mps; d.mps = 0;
        offset -= range; range = rlps;
        if (pstate == 0) d.val_mps = !val_mps;
        d.pstate = int'(trans_idx_lps(6'(pstate)));
      end else begin
        d.bin = val_mps; d.mps = 1;
        d.pstate = (pstate < 62) ? pstate + 1 : pstate;
      end
      while (range < 256) begin
        range = range << 1; offset = (offset << 1) | bits[d.used]; d.used++;
      end
    end
    d.range = range; d.offset = offset;
    return d;
  endfunction

  // ------------------------------------------------------------ encoder
  class cabac_encoder;
    int low, range, outstanding;
    bit first;
    bit stream[$];
    int pst[460];
    bit mps[460];

    function new();
      low = 0; range = 510; outstanding = 0; first = 1;
    endfunction

    function void put_bit(bit b);
      if (first) first = 0;
      else stream.push_back(b);
      while (outstanding > 0) begin
        stream.push_back(!b);
        outstanding--;
      end
    endfunction

    function void renorm();
      while (range < 256) begin
        if (low < 256) put_bit(0);
        else if (low >= 512) begin low -= 512; put_bit(1); end
        else begin low -= 256; outstanding++; end
        range = range << 1;
        low = low << 1;
      end
    endfunction

    function void encode(int mode, int ctx, bit b);
      int rlps;
      logic [31:0] row;
      if (mode == M_DEC) begin
        row = range_lps_row(6'(pst[ctx]));
        rlps = int'(row[8 * ((range >> 6) & 3) +: 8]);
        range -= rlps;
        if (b != mps[ctx]) begin
          low += range; range = rlps;
          if (pst[ctx] == 0) mps[ctx] = !mps[ctx];
          pst[ctx] = int'(trans_idx_lps(6'(pst[ctx])));
        end else if (pst[ctx] < 62) pst[ctx]++;
        renorm();
      end else if (mode == M_BYP) begin
        low = low << 1;
        if (b) low += range;
        if (low >= 1024) begin put_bit(1); low -= 1024; end
        else if (low < 512) put_bit(0);
        else begin low -= 512; outstanding++; end
      end else begin
        range -= 2;
        if (b) begin
          low += range;
          range = 2;
          renorm();
          put_bit((low >> 9) & 1);
          stream.push_back((low >> 8) & 1);
          stream.push_back(1);
        end else renorm();
      end
    endfunction
  endclass

endpackage

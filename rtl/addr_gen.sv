// addr_gen: address generator (AG) of the multi-symbol CABAD.
//
// Maps a syntax-element request to gamma_base, the context index of the first
// context the SE uses (ctxIdxOffset, plus ctxBlockCatOffset for residual
// data, as in the H.264/AVC standard), and to the context-memory row holding
// that set of contexts. Every row holds ten 7-bit contexts; a CSR slot s of a
// row with base b is ctxIdx b + s, except in the significance-map rows, where
// slot 2j is significant_coeff_flag and slot 2j+1 last_significant_coeff_flag
// of the same scanning position (five pairs per row).
//
// Row map of the 55-row memory (this design's own arrangement):
//    0 mb_type I (3..10)        1 mb_skip_flag P (11..13)  2 mb_type P (14..20,
//      prefix 14..17, intra suffix 17..20)
//    3 sub_mb_type P (21..23)   4 mb_skip_flag B (24..26)  5 mb_type B (27..35,
//      prefix 27..32, intra suffix 32..35)
//    6 sub_mb_type B (36..39)   7 mvd x (40..46)           8 mvd y (47..53)
//    9 ref_idx (54..59)        10 mb_qp_delta (60..63)
//   11 intra modes: intra_chroma_pred_mode 64..67 in slots 0..3,
//      prev_intra4x4_pred_mode_flag 68 in slot 4, rem_intra4x4_pred_mode 69 in slot 5
//   12 mb_field_decoding_flag (70..72)
//   13 coded_block_pattern: luma prefix 73..76 in slots 0..3, chroma bin 0
//      77..80 in slots 4..7;  14 chroma bin 1 (81..84) in slots 0..3
//   15..19 coded_block_flag, ctxBlockCat 0..4
//   20..24 coeff_abs_level_minus1, ctxBlockCat 0..4
//   25..37 significance map, frame coded: ctxBlockCat 0..4 take 3,3,3,1,3 rows
//   38..50 significance map, field coded, same layout
//   51..54 spare
// end_of_slice_flag (terminal mode) needs no context: need_ctx = 0.
// Purely combinational.
module addr_gen
  import cabad_pkg::*;
(
  input  se_req_t    req,
  output logic [5:0] row_base,
  output logic [8:0] ctx_base,
  output logic       need_ctx
);

  function automatic logic [3:0] sig_row_of_cat(input logic [2:0] c);
    case (c)
      3'd0: return 4'd0;
      3'd1: return 4'd3;
      3'd2: return 4'd6;
      3'd3: return 4'd9;
      default: return 4'd10;
    endcase
  endfunction

  function automatic logic [8:0] sig_cat_off(input logic [2:0] c);
    case (c)
      3'd0: return 9'd0;
      3'd1: return 9'd15;
      3'd2: return 9'd29;
      3'd3: return 9'd44;
      default: return 9'd47;
    endcase
  endfunction

  function automatic logic [8:0] abs_cat_off(input logic [2:0] c);
    case (c)
      3'd0: return 9'd0;
      3'd1: return 9'd10;
      3'd2: return 9'd20;
      3'd3: return 9'd30;
      default: return 9'd39;
    endcase
  endfunction

  logic [2:0] cat;

  always_comb begin
    cat      = (req.cat > 3'd4) ? 3'd4 : req.cat;
    need_ctx = 1'b1;
    row_base = 6'd51;
    ctx_base = 9'd0;
    case (req.kind)
      SE_MB_TYPE_I: begin
        // in a P/B slice this is the intra suffix; it lives in the P or B
        // mb_type row, whose base is reported
        case (req.slice)
          SLICE_P: begin row_base = 6'd2; ctx_base = 9'd14; end
          SLICE_B: begin row_base = 6'd5; ctx_base = 9'd27; end
          default: begin row_base = 6'd0; ctx_base = 9'd3;  end
        endcase
      end
      SE_MB_SKIP: begin
        if (req.slice == SLICE_B) begin row_base = 6'd4; ctx_base = 9'd24; end
        else                      begin row_base = 6'd1; ctx_base = 9'd11; end
      end
      SE_MB_TYPE_PB: begin
        if (req.slice == SLICE_B) begin row_base = 6'd5; ctx_base = 9'd27; end
        else                      begin row_base = 6'd2; ctx_base = 9'd14; end
      end
      SE_SUB_MB_PB: begin
        if (req.slice == SLICE_B) begin row_base = 6'd6; ctx_base = 9'd36; end
        else                      begin row_base = 6'd3; ctx_base = 9'd21; end
      end
      SE_CBP:         begin row_base = 6'd13; ctx_base = 9'd73; end
      SE_MVD_X:       begin row_base = 6'd7;  ctx_base = 9'd40; end
      SE_MVD_Y:       begin row_base = 6'd8;  ctx_base = 9'd47; end
      SE_REF_IDX:     begin row_base = 6'd9;  ctx_base = 9'd54; end
      SE_QP_DELTA:    begin row_base = 6'd10; ctx_base = 9'd60; end
      SE_INTRA_MODE,
      SE_CHROMA_PRED: begin row_base = 6'd11; ctx_base = 9'd64; end
      SE_MB_FIELD:    begin row_base = 6'd12; ctx_base = 9'd70; end
      SE_CBF: begin
        row_base = 6'd15 + 6'(cat);
        ctx_base = 9'd85 + 9'd4 * 9'(cat);
      end
      SE_COEFF_ABS: begin
        row_base = 6'd20 + 6'(cat);
        ctx_base = 9'd227 + abs_cat_off(cat);
      end
      SE_SIGMAP: begin
        row_base = (req.field ? 6'd38 : 6'd25) + 6'(sig_row_of_cat(cat));
        ctx_base = (req.field ? 9'd277 : 9'd105) + sig_cat_off(cat);
      end
      SE_END_SLICE: begin row_base = 6'd51; ctx_base = 9'd276; need_ctx = 1'b0; end
      default: ;
    endcase
  end

endmodule

// binarizer: binarization engine (BM) of the multi-symbol CABAD.
//
// Holds the parse state of the syntax element (SE) being decoded and, each
// decoding cycle, takes the up-to-three bins of the M-cascade BAD. Bins are
// accepted in order while the BAD marks them valid (binvalid1..3), context
// selection marks them usable (stage_ok) and the SE goes on; acceptance also
// stops after a bin that ends the SE, that switches the arithmetic mode
// (decision to bypass in mvd / coeff_abs_level_minus1, or into the terminal
// bin of mb_type) or that moves the significance map or coded_block_pattern
// to its next row of contexts. n_used tells the controller whose range/offset to commit.
//
// Supported binarizations: flags (mb_skip_flag, mb_field_decoding_flag,
// coded_block_flag, end_of_slice_flag), the table-based mb_type of I slices
// (also used as the intra suffix of P/B slices, with the suffix contexts),
// mb_type (prefix) and sub_mb_type of P and B slices, coded_block_pattern
// (4 luma bins, then up to 2 chroma bins), prev/rem intra 4x4 mode (one
// SE: flag, then 3 fixed-length bins LSB first), TU intra_chroma_pred_mode,
// unary ref_idx and mb_qp_delta, UEG3 signed mvd (prefix cut-off 9) and UEG0
// coeff_abs_level_minus1 (cut-off 14) with its sign bin, and a whole
// significance map (sig/last pairs; the last position is inferred). Values:
// the SE value, signed; intra mode gives 8 for "use predicted mode" else the
// rem mode; coeff_abs gives the signed level; the significance map gives
// {numCoeff[20:16], map[15:0]} with bit i for scanning position i;
// coded_block_pattern gives luma + 16 * chroma.
//
// The binarization rules are those of the H.264/AVC standard, which the design
// document points to; the tree-walking form (one bin at a time, shared with
// context selection) and the merged intra-mode and significance-map elements
// are this design's own choices.
//
// start loads a new SE; advance commits the bins of a decoding cycle. done,
// result, row_change and n_used are combinational from the current state and
// bins, valid in the cycle of advance.
module binarizer
  import cabad_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  se_req_t            req,
  input  logic               advance,
  input  logic               bin       [3],
  input  logic               bin_valid [3],
  input  logic               stage_ok  [3],
  output se_state_t          state,
  output logic [1:0]         n_used,
  output logic               done,
  output logic signed [31:0] result,
  output logic               row_change,
  output logic [1:0]         next_row
);

  se_state_t cur, nxt;
  logic      stop;

  assign state = cur;

  always_comb begin
    nxt    = cur;
    n_used = 2'd0;
    stop   = 1'b0;
    for (int k = 0; k < 3; k++) begin
      if (!stop && bin_valid[k] && stage_ok[k]) begin
        nxt    = se_step(nxt, bin[k]);
        n_used = n_used + 2'd1;
        if (se_done(nxt) || se_mode(nxt) != se_mode(cur) || se_row(nxt) != se_row(cur))
          stop = 1'b1;
      end else begin
        stop = 1'b1;
      end
    end
    done       = se_done(nxt) && !se_done(cur);
    result     = nxt.result;
    row_change = !se_done(nxt) && (se_row(nxt) != se_row(cur));
    next_row   = se_row(nxt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      cur.phase <= PH_DONE;
    end else if (start) begin
      cur <= se_init(req);
    end else if (advance) begin
      cur <= nxt;
    end
  end

endmodule

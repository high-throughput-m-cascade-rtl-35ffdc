// ctx_select: context selection for the three stages of the M-cascade BAD.
//
// From the parse state of the current syntax element and the ten context
// state registers (CSR) it picks the context of each of the three bins that a
// cycle may decode. Bin 1 uses the state as it is. Since stage k+1 only counts
// when stage k was an MPS, the bin value of stage k is known in advance to be
// its valMPS (0 in bypass mode); the lookup logic steps the parse state with
// that value to get the ctxIdxInc of the next bin (this resolves the
// ctxIdxInc rules that depend on earlier bins, such as mb_type bin 4/5).
//
// When two stages use the same context, the later one must see the state
// after the earlier MPS: pStateIdx_2 is transIdxMPS(pStateIdx_1) when
// ctxIdxInc_2 == ctxIdxInc_1, and pStateIdx_3 is forwarded from stage 2 or
// stage 1 in the same way (valMPS never changes on an MPS).
//
// stage_ok[k] says that bin k may be used at all this cycle: the SE is not yet
// finished on the assumed path, the bin uses the same arithmetic mode as bin 1
// (a decision-to-bypass switch always waits for the next cycle), it reads the
// same context-memory row as bin 1, and the mode is not terminal (one bin per
// cycle). Purely combinational.
//
// From the design document: selecting the contexts of the later stages from
// the MPS value assumed for the earlier ones, and forwarding the pStateIdx
// between stages that share a context. This design's own choices: deriving the
// ctxIdxInc by stepping the shared parse functions, and the exact stop rules
// of stage_ok.
module ctx_select
  import cabad_pkg::*;
(
  input  se_state_t  state,
  input  ctx_t       csr      [CSR_N],
  output bad_mode_t  mode,
  output ctx_t       ctx      [3],
  output logic [3:0] slot     [3],
  output logic       stage_ok [3]
);

  function automatic ctx_t csr_read(input ctx_t regs[CSR_N], input logic [3:0] s);
    return regs[(s < 4'(CSR_N)) ? s : 4'd0];
  endfunction

  se_state_t st1, st2, st3;

  always_comb begin
    mode = se_mode(state);
    // stage 1
    st1     = state;
    slot[0] = se_slot(st1);
    ctx[0]  = csr_read(csr, slot[0]);
    // stage 2: lookup logic on valMPS_1, pState forwarded from stage 1
    st2     = se_step(st1, (mode == MODE_DECISION) ? ctx[0].val_mps : 1'b0);
    slot[1] = se_slot(st2);
    ctx[1]  = (slot[1] == slot[0]) ? ctx_mps_update(ctx[0]) : csr_read(csr, slot[1]);
    // stage 3: lookup logic on valMPS_2, pState forwarded from stage 2 or 1
    st3     = se_step(st2, (mode == MODE_DECISION) ? ctx[1].val_mps : 1'b0);
    slot[2] = se_slot(st3);
    if (slot[2] == slot[1])      ctx[2] = ctx_mps_update(ctx[1]);
    else if (slot[2] == slot[0]) ctx[2] = ctx_mps_update(ctx[0]);
    else                         ctx[2] = csr_read(csr, slot[2]);
    stage_ok[0] = !se_done(st1);
    stage_ok[1] = stage_ok[0] && (mode != MODE_TERMINAL) && !se_done(st2) &&
                  (se_mode(st2) == mode) && (se_row(st2) == se_row(st1));
    stage_ok[2] = stage_ok[1] && !se_done(st3) &&
                  (se_mode(st3) == mode) && (se_row(st3) == se_row(st1));
  end

endmodule

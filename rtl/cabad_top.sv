// cabad_top: high-throughput M-cascade multi-symbol CABAD for H.264/AVC.
//
// Decodes syntax elements (SEs) from a CABAC bit-stream, up to three bins per
// cycle. The blocks are the address generator (AG), the single-port context
// memory (550 x 7 bits as 55 rows of ten contexts), the context state register
// (CSR) holding the ten contexts of the current SE, and a BAD stage that does
// context selection (CS), three-symbol M-cascade arithmetic decoding and
// binarization (BM) in one cycle.
//
// Pipeline and control (one state machine):
//   IDLE  accepts an SE request (this is the AG step: the request's context row
//         is computed combinationally) or a slice start.
//   INIT  codIRange = 510, codIOffset = first 9 bits of the slice.
//   WB    context memory update (CMU): the CSR is written back to its row.
//   CML   context memory load: the new row is captured in the CSR.
//   BAD   CS + BAD + BM: decodes 1..3 bins of the SE per cycle; waits while
//         fewer than 9 bit-stream bits are buffered.
// A request whose row is already in the CSR (e.g. prev/rem intra mode followed
// by intra_chroma_pred_mode, or coeff_abs of the same block category) goes
// straight to BAD. Otherwise the CSR is written back and the new row loaded,
// costing two cycles between the last BAD cycle of one SE and the first of the
// next, as in the design's timing (AG overlaps the write back). The
// significance map keeps five sig/last pairs per row, so it decodes without
// stalls between its two flags and reloads the CSR (two cycles) only every
// five scanning positions. end_of_slice_flag needs no context and skips WB/CML.
// The CSR is written back lazily, when another row is needed.
//
// Interfaces: bit-stream words (valid/ready, first bit in bit 31); context
// memory initialisation rows (ctx_init_*, accepted only when idle, e.g. from
// an initialisation engine or a processor; they invalidate the CSR); SE
// requests (valid/ready, se_req_t carries the SE kind, slice type, field flag,
// ctxBlockCat and the neighbour-derived ctxIdxInc values); SE results
// (se_out_valid for one cycle with the value). Status outputs report the bins
// decoded and stall cycles for performance counting.
//
// From the design document: the block split (AG, context memory, CSR, CS + BAD
// + BM in one stage), the two-cycle row change and the memory size. This
// design's own choices: skipping the stall on a CSR row hit, the lazy write
// back, the request/result handshakes and the initialisation port.
module cabad_top
  import cabad_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // bit-stream
  input  logic               bs_valid,
  input  logic [31:0]        bs_data,
  output logic               bs_ready,
  // slice start: initialise the arithmetic decoding engine
  input  logic               slice_start,
  // context memory initialisation
  input  logic               ctx_init_we,
  input  logic [5:0]         ctx_init_addr,
  input  logic [ROW_W-1:0]   ctx_init_data,
  // syntax element request
  input  logic               se_req_valid,
  input  se_req_t            se_req,
  output logic               se_req_ready,
  // syntax element result
  output logic               se_out_valid,
  output se_kind_t           se_out_kind,
  output logic signed [31:0] se_out_value,
  // status
  output logic               busy,
  output logic [1:0]         bins_cycle,
  output logic               stall_cycle,
  output logic [8:0]         ctx_base      // gamma_base of the SE being decoded
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_WB, S_CML, S_BAD} state_t;
  state_t state;

  logic [8:0]       range_q, offset_q;
  logic [5:0]       csr_row, tgt_row, row_base_q;
  logic [8:0]       ctx_base_q;
  logic             csr_valid;

  // bit-stream
  logic [WIN_W-1:0] window;
  logic [6:0]       avail;
  logic [3:0]       consume;

  // AG
  logic [5:0]       ag_row;
  logic [8:0]       ag_ctx_base;
  logic             ag_need_ctx;

  // memory / CSR
  logic             mem_we;
  logic [5:0]       mem_addr;
  logic [ROW_W-1:0] mem_wdata, mem_rdata, csr_row_data;
  ctx_t             csr_ctx [CSR_N];
  logic             csr_load;
  logic             upd_en [3];

  // CS / BAD / BM
  se_state_t        bz_state;
  bad_mode_t        mode;
  ctx_t             sel_ctx [3];
  logic [3:0]       sel_slot[3];
  logic             stage_ok[3];
  logic             bin     [3];
  logic             bin_valid[3];
  ctx_t             new_ctx [3];
  logic [8:0]       rng_k   [3];
  logic [8:0]       off_k   [3];
  logic [3:0]       used_k  [3];
  logic [1:0]       n_used;
  logic             bz_done, bz_row_change;
  logic [1:0]       bz_next_row;
  logic signed [31:0] bz_result;

  logic             bad_fire, accept, init_fire;
  logic [1:0]       last_k;

  bitstream_buffer u_bs (
    .clk, .rst_n, .flush(1'b0),
    .in_valid(bs_valid), .in_data(bs_data), .in_ready(bs_ready),
    .consume, .window, .avail
  );

  addr_gen u_ag (
    .req(se_req), .row_base(ag_row), .ctx_base(ag_ctx_base), .need_ctx(ag_need_ctx)
  );

  ctx_memory #(.ROWS(MEM_ROWS), .WIDTH(ROW_W)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  csr_regfile u_csr (
    .clk, .rst_n, .load(csr_load), .load_row(mem_rdata),
    .upd_en, .upd_slot(sel_slot), .upd_ctx(new_ctx),
    .ctx(csr_ctx), .row_out(csr_row_data)
  );

  ctx_select u_cs (
    .state(bz_state), .csr(csr_ctx), .mode, .ctx(sel_ctx), .slot(sel_slot), .stage_ok
  );

  threesym_bad u_bad (
    .mode, .ctx_in(sel_ctx), .range_in(range_q), .offset_in(offset_q), .bits(window),
    .bin, .bin_valid, .ctx_out(new_ctx), .range_out(rng_k), .offset_out(off_k),
    .used_out(used_k)
  );

  binarizer u_bm (
    .clk, .rst_n, .start(accept), .req(se_req), .advance(bad_fire),
    .bin, .bin_valid, .stage_ok, .state(bz_state), .n_used, .done(bz_done),
    .result(bz_result), .row_change(bz_row_change), .next_row(bz_next_row)
  );

  // ------------------------------------------------------------ control
  assign bad_fire  = (state == S_BAD) && (avail >= 7'(WIN_W));
  assign init_fire = (state == S_INIT) && (avail >= 7'(WIN_W));
  assign accept    = se_req_valid && se_req_ready;
  assign se_req_ready = ((state == S_IDLE) && !slice_start && !ctx_init_we) ||
                        (bad_fire && bz_done);
  assign last_k    = (n_used == 2'd0) ? 2'd0 : n_used - 2'd1;

  always_comb begin
    consume = 4'd0;
    if (init_fire)     consume = 4'(WIN_W);
    else if (bad_fire) consume = used_k[last_k];
    for (int k = 0; k < 3; k++)
      upd_en[k] = bad_fire && (mode == MODE_DECISION) && (2'(k) < n_used);
    mem_we    = 1'b0;
    mem_addr  = tgt_row;
    mem_wdata = csr_row_data;
    if (state == S_IDLE && ctx_init_we) begin
      mem_we    = 1'b1;
      mem_addr  = ctx_init_addr;
      mem_wdata = ctx_init_data;
    end else if (state == S_WB) begin
      mem_we   = 1'b1;
      mem_addr = csr_row;
    end
    csr_load = (state == S_CML);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      range_q    <= 9'd510;
      offset_q   <= '0;
      csr_row    <= '0;
      tgt_row    <= '0;
      row_base_q <= '0;
      ctx_base_q <= '0;
      csr_valid  <= 1'b0;
    end else begin
      if (state == S_IDLE && ctx_init_we) csr_valid <= 1'b0;
      if (init_fire) begin
        range_q  <= 9'd510;
        offset_q <= window[WIN_W-1 -: 9];
        state    <= S_IDLE;
      end
      if (bad_fire) begin
        range_q  <= rng_k[last_k];
        offset_q <= off_k[last_k];
        if (bz_done) state <= S_IDLE;
        else if (bz_row_change) begin
          tgt_row <= row_base_q + 6'(bz_next_row);
          state   <= S_WB;
        end
      end
      if (state == S_IDLE && slice_start) state <= S_INIT;
      if (state == S_WB) begin
        csr_valid <= 1'b0;
        state     <= S_CML;
      end
      if (state == S_CML) begin
        csr_row   <= tgt_row;
        csr_valid <= 1'b1;
        state     <= S_BAD;
      end
      if (accept) begin
        row_base_q <= ag_row;
        ctx_base_q <= ag_ctx_base;
        tgt_row    <= ag_row;
        if (!ag_need_ctx || (csr_valid && csr_row == ag_row)) state <= S_BAD;
        else if (csr_valid) state <= S_WB;
        else state <= S_CML;
      end
    end
  end

  assign se_out_valid = bad_fire && bz_done;
  assign se_out_kind  = bz_state.req.kind;
  assign se_out_value = bz_result;
  assign busy         = (state != S_IDLE);
  assign bins_cycle   = bad_fire ? n_used : 2'd0;
  assign stall_cycle  = (state == S_WB) || (state == S_CML);
  assign ctx_base     = ctx_base_q;

  // a decoding cycle always accepts its first bin
  a_progress: assert property (@(posedge clk) disable iff (!rst_n)
                               bad_fire |-> n_used != 2'd0);

endmodule

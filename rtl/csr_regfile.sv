// csr_regfile: context state register (CSR), ten 7-bit contexts.
//
// Holds the set of contexts C_j(s) of the syntax element being decoded, so the
// BAD stage reads and updates contexts without touching the context memory.
// load copies a 70-bit memory row in (slot i = bits [7i+6:7i]); row_out is the
// same packing, written back to memory when the syntax element (or the
// significance-map row) changes. Each decoding cycle may update up to three
// slots, one per valid bin; when several bins hit the same slot the later bin
// wins, because its context already includes the earlier update (forwarded by
// context selection). load has priority over updates. One-cycle write, the
// read ports are the register outputs.
//
// From the design document: a register set of ten contexts that holds one
// memory row and is written back when the row changes. This design's own
// choices: the later-bin-wins rule for updates of the same slot and load
// priority.
module csr_regfile
  import cabad_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [ROW_W-1:0] load_row,
  input  logic             upd_en   [3],
  input  logic [3:0]       upd_slot [3],
  input  ctx_t             upd_ctx  [3],
  output ctx_t             ctx      [CSR_N],
  output logic [ROW_W-1:0] row_out
);

  ctx_t regs [CSR_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CSR_N; i++) regs[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < CSR_N; i++) regs[i] <= load_row[i*CTX_W +: CTX_W];
    end else begin
      for (int k = 0; k < 3; k++)
        if (upd_en[k] && upd_slot[k] < 4'(CSR_N)) regs[upd_slot[k]] <= upd_ctx[k];
    end
  end

  always_comb begin
    for (int i = 0; i < CSR_N; i++) begin
      ctx[i] = regs[i];
      row_out[i*CTX_W +: CTX_W] = regs[i];
    end
  end

endmodule

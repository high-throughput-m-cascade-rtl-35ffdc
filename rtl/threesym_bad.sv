// threesym_bad: M-cascade multi-symbol binary arithmetic decoder (combinational).
//
// Three one-symbol cores are chained so that stage k+1 starts from the MPS
// branch of stage k (its range - rLPS and renormalized offset), never from the
// resolved result. A cycle therefore decodes one of the symbol sequences
// L, M, ML, MM, MML or MMM: stage 2 is valid only when stage 1 was an MPS and
// stage 3 only when stages 1 and 2 were both MPS (the binvalid truth table of
// the design, driven by the comparator flags MSB_1 and MSB_2). Any other
// sequence (MLM, LMM, ...) is split over later cycles.
//
// All three stages work in the same mode in a cycle (decision or bypass); in
// terminal mode only stage 1 is valid. Each stage gets its own context from
// context selection. The bit-stream window of stage k+1 is the window of stage
// k shifted by the bits consumed on the MPS branch of stage k.
//
// Outputs per stage: the bin, its valid flag, the updated context, and the
// range/offset and cumulative bit count after that stage's actual symbol, so
// that the controller can commit the result of whichever stage is the last
// bin the binarization engine accepts.
//
// From the design document: the three cascaded stages and the binvalid rule
// for the six sequences. This design's own choices: one arithmetic mode per
// cycle, and terminal mode restricted to one bin.
module threesym_bad
  import cabad_pkg::*;
(
  input  bad_mode_t        mode,
  input  ctx_t             ctx_in    [3],
  input  logic [8:0]       range_in,
  input  logic [8:0]       offset_in,
  input  logic [WIN_W-1:0] bits,
  output logic             bin       [3],
  output logic             bin_valid [3],
  output ctx_t             ctx_out   [3],
  output logic [8:0]       range_out [3],
  output logic [8:0]       offset_out[3],
  output logic [3:0]       used_out  [3]    // cumulative bits consumed after stage k
);

  // stage 1
  logic             f1;
  logic [8:0]       r1m, o1m;
  logic [3:0]       u1m, u1;
  // stage 2
  logic [WIN_W-1:0] bits2;
  logic             f2;
  logic [8:0]       r2m, o2m;
  logic [3:0]       u2m, u2;
  // stage 3
  logic [WIN_W-1:0] bits3;
  logic             f3_unused;
  logic [8:0]       r3m_unused, o3m_unused;
  logic [3:0]       u3m_unused, u3;

  onesym_bad u_sym1 (
    .mode, .ctx_in(ctx_in[0]), .range_in(range_in), .offset_in(offset_in), .bits(bits),
    .bin_flag(f1), .bin_val(bin[0]), .ctx_out(ctx_out[0]),
    .range_out(range_out[0]), .offset_out(offset_out[0]), .used_out(u1),
    .range_mps(r1m), .offset_mps(o1m), .used_mps(u1m)
  );

  assign bits2 = bits << u1m;

  onesym_bad u_sym2 (
    .mode, .ctx_in(ctx_in[1]), .range_in(r1m), .offset_in(o1m), .bits(bits2),
    .bin_flag(f2), .bin_val(bin[1]), .ctx_out(ctx_out[1]),
    .range_out(range_out[1]), .offset_out(offset_out[1]), .used_out(u2),
    .range_mps(r2m), .offset_mps(o2m), .used_mps(u2m)
  );

  assign bits3 = bits2 << u2m;

  onesym_bad u_sym3 (
    .mode, .ctx_in(ctx_in[2]), .range_in(r2m), .offset_in(o2m), .bits(bits3),
    .bin_flag(f3_unused), .bin_val(bin[2]), .ctx_out(ctx_out[2]),
    .range_out(range_out[2]), .offset_out(offset_out[2]), .used_out(u3),
    .range_mps(r3m_unused), .offset_mps(o3m_unused), .used_mps(u3m_unused)
  );

  always_comb begin
    used_out[0]  = u1;
    used_out[1]  = u1m + u2;
    used_out[2]  = u1m + u2m + u3;
    // binvalid1..3
    bin_valid[0] = 1'b1;
    bin_valid[1] = (mode != MODE_TERMINAL) && f1;
    bin_valid[2] = (mode != MODE_TERMINAL) && f1 && f2;
  end

endmodule

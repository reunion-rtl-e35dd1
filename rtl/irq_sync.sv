// irq_sync: schedules an external interrupt at the same program point on both cores
// of a logical processor pair.
//
// The interrupt request is replicated to both cores. When it arrives, the vocal core
// picks the fingerprint interval at which it will be taken: the interval boundary
// after every interval the vocal has closed so far (target = vocal ivl_closed). Each
// core takes the interrupt (take_v / take_m, one-cycle pulse) once its own count of
// compared-and-retired intervals reaches the target, that is after the instructions
// before that boundary have been compared and retired. Because both cores retire the
// same intervals in the same order, both take it between the same two instructions,
// though not in the same cycle. A second request while one is pending is merged with
// it. The vocal's choice of interval and servicing after comparison and retirement
// follow the document; the choice of "next boundary" and the merging are this
// design's. The target reaches the mute side without delay here; in silicon it
// would travel with the vocal's fingerprints.
module irq_sync (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq,
  input  logic [31:0] vocal_closed,
  input  logic [31:0] vocal_retired,
  input  logic [31:0] mute_retired,
  output logic        take_v,
  output logic        take_m,
  output logic        pending
);
  logic        pend_v, pend_m;
  logic [31:0] target;

  assign take_v  = pend_v && (vocal_retired >= target);
  assign take_m  = pend_m && (mute_retired  >= target);
  assign pending = pend_v || pend_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v <= 1'b0; pend_m <= 1'b0; target <= '0;
    end else begin
      if (irq && !pend_v && !pend_m) begin
        pend_v <= 1'b1; pend_m <= 1'b1; target <= vocal_closed;
      end else begin
        if (take_v) pend_v <= 1'b0;
        if (take_m) pend_m <= 1'b0;
      end
    end
  end
endmodule

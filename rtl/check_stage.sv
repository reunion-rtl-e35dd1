// check_stage: the in-order "check" stage that sits between a core's reorder buffer
// and its architectural state.
//
// Retire groups (up to RETIRE_W instructions) enter when grp_valid && grp_ready. Each
// entering group is written to the result buffer and hashed by the two-stage
// fingerprint generator. A fingerprint interval closes when it holds FP_INTERVAL or
// more instructions; its fingerprint (ready two cycles later) is queued locally and
// sent to the partner core on fp_tx. When the oldest local fingerprint and the oldest
// partner fingerprint (fp_rx, from the channel) are both present they are compared:
// equal -> the interval's groups leave the result buffer one per cycle on
// ret_valid/ret_grp (to the register file and non-speculative store buffer), unequal
// -> cmp_mismatch pulses and the stage halts until `flush` (rollback) empties it.
//
// Serializing instructions: a group holding one first closes the open interval, then
// waits until everything older has compared and retired, then enters alone as an
// interval of its own, and nothing younger enters until it has retired (ser_stall is
// high meanwhile). In single-step mode (re-execution) an interval closes only at the
// first load, so that the single-stepped instructions up to and including it are
// compared as one fingerprint. ivl_closed / ivl_retired count intervals, for
// interrupt scheduling.
//
// From the document: check as an in-order stage before the register file, the
// fingerprint of register updates, branch targets and store addresses/values, the
// fingerprint interval, the swap with the partner, retire-on-match, recovery on
// mismatch, the serializing behaviour and the circular result buffer. This design's
// choices: intervals close at group boundaries, retirement of one group per cycle, the
// queue and buffer depths, and the tag that records how many groups an interval has.
module check_stage
  import reunion_pkg::*;
#(
  parameter int unsigned FP_INTERVAL = 1,   // instructions per fingerprint
  parameter int unsigned RB_DEPTH    = 64,  // result buffer, in groups
  parameter int unsigned FPQ_DEPTH   = 64   // outstanding fingerprints per queue
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            single_step,
  // from the reorder buffer
  input  logic            grp_valid,
  input  group_t          grp,
  output logic            grp_ready,
  // fingerprint swap
  output logic            fp_tx_valid,
  output logic [FP_W-1:0] fp_tx,
  input  logic            fp_rx_valid,
  input  logic [FP_W-1:0] fp_rx,
  // comparison outcome
  output logic            cmp_valid,
  output logic            cmp_match,
  output logic            cmp_mismatch,
  output logic            halted,
  // retirement to safe state
  output logic            ret_valid,
  output group_t          ret_grp,
  output logic            retiring,
  // status
  output logic            ser_stall,
  output logic [31:0]     ivl_closed,
  output logic [31:0]     ivl_retired
);
  localparam int unsigned TAG_W = $clog2(RB_DEPTH + 1);
  localparam int unsigned CW    = $clog2(FPQ_DEPTH + 1);

  // ---------------- group bookkeeping ----------------
  logic             has_ser, has_load;
  logic [2:0]       n_instr;
  logic [TAG_W-1:0] open_grps;
  logic [15:0]      open_instr;
  logic             ser_wait;      // a serializing group is in check
  logic             drained;
  logic             rb_full, rb_empty, lq_full, lq_empty, pq_empty, pq_full;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_count;
  logic [CW-1:0]    lq_count, pq_count;
  logic [TAG_W-1:0] ret_left;
  logic             accept, close;
  logic [TAG_W-1:0] close_tag;
  logic             space;

  always_comb begin
    has_ser = 1'b0; has_load = 1'b0; n_instr = '0;
    for (int i = 0; i < RETIRE_W; i++) begin
      if (grp[i].valid) begin
        n_instr = n_instr + 3'd1;
        has_ser  = has_ser  | grp[i].serializing;
        has_load = has_load | grp[i].is_load;
      end
    end
  end

  // Room for the group and for its fingerprint (two may be in the generator).
  assign space   = !rb_full && (32'(lq_count) + 3 <= FPQ_DEPTH);
  assign drained = rb_empty && (open_grps == 0) && lq_empty && (ret_left == 0);

  always_comb begin
    accept     = 1'b0;
    close      = 1'b0;
    close_tag  = open_grps;
    ser_stall  = 1'b0;
    if (!flush && !halted && grp_valid) begin
      if (ser_wait) begin
        ser_stall = 1'b1;                       // younger instructions wait
      end else if (has_ser) begin
        ser_stall = 1'b1;
        if (open_grps != 0) begin
          close      = 1'b1;                    // end the open interval first
        end else if (drained && space) begin
          accept    = 1'b1;                     // serializing group alone
          close     = 1'b1;
          close_tag = TAG_W'(1);
        end
      end else if (space) begin
        accept    = 1'b1;
        close_tag = open_grps + 1'b1;
        if (single_step) close = has_load;
        else             close = (32'(open_instr) + 32'(n_instr) >= FP_INTERVAL) ||
                                 (32'(open_grps) + 1 >= RB_DEPTH);
      end
    end
  end
  assign grp_ready = accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_grps <= '0; open_instr <= '0; ser_wait <= 1'b0;
    end else if (flush) begin
      open_grps <= '0; open_instr <= '0; ser_wait <= 1'b0;
    end else begin
      if (close) begin
        open_grps <= '0; open_instr <= '0;
      end else if (accept) begin
        open_grps  <= open_grps + 1'b1;
        open_instr <= open_instr + 16'(n_instr);
      end
      if (accept && has_ser) ser_wait <= 1'b1;
      else if (ser_wait && rb_empty && ret_left == 0) ser_wait <= 1'b0;
    end
  end

  // ---------------- fingerprint generation ----------------
  logic             fg_valid;
  logic [FP_W-1:0]  fg_fp;
  logic [TAG_W-1:0] fg_tag;

  fingerprint_gen #(.M(GROUP_FP_BITS), .N(FP_W), .TAG_W(TAG_W)) u_fg (
    .clk, .rst_n, .flush,
    .in_valid  (accept),
    .in_data   (group_fp_bits(grp)),
    .close,
    .close_tag,
    .fp_valid  (fg_valid),
    .fp        (fg_fp),
    .fp_tag    (fg_tag)
  );

  assign fp_tx_valid = fg_valid;
  assign fp_tx       = fg_fp;

  // ---------------- fingerprint queues and comparator ----------------
  logic [TAG_W+FP_W-1:0] lq_head;
  logic [FP_W-1:0]       pq_head;
  logic                  do_cmp;

  // The next interval may be compared in the cycle in which the previous one retires
  // its last group, so that intervals of one group retire at one group per cycle.
  assign do_cmp = !flush && !halted && !lq_empty && !pq_empty &&
                  ((ret_left == 0) || (ret_left == 1 && ret_valid));

  fingerprint_queue #(.W(TAG_W + FP_W), .DEPTH(FPQ_DEPTH)) u_lq (
    .clk, .rst_n, .flush,
    .push (fg_valid), .din ({fg_tag, fg_fp}),
    .pop  (do_cmp),   .dout (lq_head),
    .empty(lq_empty), .full (lq_full), .count (lq_count)
  );

  fingerprint_queue #(.W(FP_W), .DEPTH(FPQ_DEPTH)) u_pq (
    .clk, .rst_n, .flush,
    .push (fp_rx_valid), .din (fp_rx),
    .pop  (do_cmp),      .dout (pq_head),
    .empty(pq_empty),    .full (pq_full), .count (pq_count)
  );

  assign cmp_valid    = do_cmp;
  assign cmp_match    = do_cmp && (lq_head[FP_W-1:0] == pq_head);
  assign cmp_mismatch = do_cmp && (lq_head[FP_W-1:0] != pq_head);

  // ---------------- result buffer and retirement ----------------
  assign ret_valid = !flush && (ret_left != 0) && !rb_empty;
  assign retiring  = (ret_left != 0);

  result_buffer #(.T(group_t), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n, .flush,
    .push (accept), .din (grp),
    .pop  (ret_valid), .dout (ret_grp),
    .empty(rb_empty), .full (rb_full), .count (rb_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ret_left <= '0; halted <= 1'b0; ivl_closed <= '0; ivl_retired <= '0;
    end else if (flush) begin
      ret_left <= '0; halted <= 1'b0; ivl_closed <= ivl_retired;
    end else begin
      if (close) ivl_closed <= ivl_closed + 1;
      if (ret_valid) begin
        ret_left <= ret_left - 1'b1;
        if (ret_left == 1) ivl_retired <= ivl_retired + 1;
      end
      if (cmp_match) ret_left <= lq_head[TAG_W+FP_W-1:FP_W];
      if (cmp_mismatch) halted <= 1'b1;
    end
  end

  // A full partner queue would lose a fingerprint: the partner is throttled by the
  // same depth, so this cannot happen while both cores run the same stream.
  always_ff @(posedge clk)
    if (rst_n && !flush)
      assert (!(fp_rx_valid && pq_full && !do_cmp))
        else $error("check_stage: partner fingerprint queue overflow");
endmodule

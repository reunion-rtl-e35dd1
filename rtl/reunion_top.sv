// reunion_top: the redundancy logic of a Reunion chip multiprocessor.
//
// N_PAIRS logical processor pairs, each made of a vocal core (index 2p) and a mute
// core (index 2p+1) that run the same instruction stream, share one L2 controller.
// Per pair this module holds: a check stage and an architectural register file for
// each core, a fingerprint channel each way between the two check stages, the
// re-execution protocol controller, and the interrupt scheduler. The out-of-order
// cores, their private L1 caches and store buffers, and main memory are outside:
// their ports are brought out here.
//
// Per core: retire groups come in on grp_valid/grp/grp_ready; checked groups leave
// on ret_valid/ret_grp (the stores in them may drain from the store buffer) and are
// written into the core's register file, readable on arf_raddr/arf_rdata. Per pair:
// `rollback` tells both cores to squash everything uncompared and restart from the
// register file, `single_step` asks for non-speculative execution up to the first load,
// which must be issued as REQ_SYNC; `due_error` reports an uncorrectable error;
// irq_take pulses when a core must take the replicated external interrupt, and
// irq_pending is high from the request until both cores of the pair have taken it.
//
// Timing: the comparison latency COMPARE_LAT counts generation (2 cycles), the
// channel (COMPARE_LAT-3 cycles) and the compare (1 cycle); a group accepted in
// cycle t leaves on ret_valid in cycle t+COMPARE_LAT+1 when the partner is in step.
// The structure follows the document's pair organisation; the split of the
// comparison latency into these three parts is this design's choice.
module reunion_top
  import reunion_pkg::*;
#(
  parameter int unsigned N_PAIRS     = 4,
  parameter int unsigned COMPARE_LAT = 10,
  parameter int unsigned FP_INTERVAL = 1,
  parameter int unsigned RB_DEPTH    = 64,
  parameter int unsigned FPQ_DEPTH   = 64,
  parameter int unsigned AW          = 26,
  parameter int unsigned LINE_W      = 512,
  parameter int unsigned L2_SETS     = 32768,
  parameter int unsigned L2_WAYS     = 8,
  parameter int unsigned L2_HIT_LAT  = 35
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // cores: retirement into check
  input  logic   [2*N_PAIRS-1:0]             grp_valid,
  input  group_t [2*N_PAIRS-1:0]             grp,
  output logic   [2*N_PAIRS-1:0]             grp_ready,
  output logic   [2*N_PAIRS-1:0]             ret_valid,
  output group_t [2*N_PAIRS-1:0]             ret_grp,
  output logic   [2*N_PAIRS-1:0]             ser_stall,
  input  logic   [2*N_PAIRS-1:0][REG_AW-1:0] arf_raddr,
  output logic   [2*N_PAIRS-1:0][XLEN-1:0]   arf_rdata,
  output logic   [2*N_PAIRS-1:0]             irq_take,
  output logic   [N_PAIRS-1:0]               irq_pending,
  // pairs: recovery and interrupts
  input  logic   [N_PAIRS-1:0]               irq,
  output logic   [N_PAIRS-1:0]               rollback,
  output logic   [N_PAIRS-1:0]               single_step,
  output logic   [N_PAIRS-1:0]               due_error,
  output logic   [N_PAIRS-1:0][1:0]          reexec_phase,
  output logic   [N_PAIRS-1:0][15:0]         n_rollbacks,
  output logic   [N_PAIRS-1:0][15:0]         n_phase2,
  output logic   [N_PAIRS-1:0][15:0]         n_recovered,
  // private L1s to the shared L2 controller
  input  phantom_e                           strength,
  output logic                               l2_ready,
  input  logic   [2*N_PAIRS-1:0]             req_valid,
  input  req_e   [2*N_PAIRS-1:0]             req_type,
  input  logic   [2*N_PAIRS-1:0][AW-1:0]     req_addr,
  input  logic   [2*N_PAIRS-1:0][LINE_W-1:0] req_data,
  output logic   [2*N_PAIRS-1:0]             req_ready,
  output logic   [2*N_PAIRS-1:0]             rsp_valid,
  output logic   [LINE_W-1:0]                rsp_data,
  output logic                               rsp_excl,
  output logic                               prb_valid,
  output logic   [$clog2(2*N_PAIRS)-1:0]     prb_core,
  output probe_e                             prb_type,
  output logic   [AW-1:0]                    prb_addr,
  input  logic                               prb_ack,
  input  logic                               prb_dirty,
  input  logic   [LINE_W-1:0]                prb_data,
  // main memory
  output logic                               mem_req_valid,
  output logic                               mem_req_we,
  output logic   [AW-1:0]                    mem_req_addr,
  output logic   [LINE_W-1:0]                mem_req_data,
  input  logic                               mem_req_ready,
  input  logic                               mem_rsp_valid,
  input  logic   [LINE_W-1:0]                mem_rsp_data,
  output logic                               ev_phantom,
  output logic                               ev_sync,
  output logic                               ev_mute_drop,
  output logic                               ev_miss
);
  localparam int unsigned CH_LAT = (COMPARE_LAT > 3) ? COMPARE_LAT - 3 : 1;

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    localparam int unsigned V = 2 * p;
    localparam int unsigned U = 2 * p + 1;

    logic            tx_v [2], rx_v [2];
    logic [FP_W-1:0] tx   [2], rx   [2];
    logic            cmp_v [2], cmp_ok [2], cmp_bad [2], halted [2], retiring [2];
    logic [31:0]     closed [2], retired [2];
    logic            flush, step, copy_we;
    logic [REG_AW-1:0] copy_idx;
    logic [XLEN-1:0] vocal_rd;

    for (genvar k = 0; k < 2; k++) begin : g_core
      localparam int unsigned C = 2 * p + k;
      logic [RETIRE_W-1:0]             we;
      logic [RETIRE_W-1:0][REG_AW-1:0] wa;
      logic [RETIRE_W-1:0][XLEN-1:0]   wd;
      logic [XLEN-1:0]                 rdata;

      check_stage #(.FP_INTERVAL(FP_INTERVAL), .RB_DEPTH(RB_DEPTH), .FPQ_DEPTH(FPQ_DEPTH)) u_check (
        .clk, .rst_n, .flush, .single_step(step),
        .grp_valid (grp_valid[C]), .grp (grp[C]), .grp_ready (grp_ready[C]),
        .fp_tx_valid (tx_v[k]), .fp_tx (tx[k]),
        .fp_rx_valid (rx_v[k]), .fp_rx (rx[k]),
        .cmp_valid (cmp_v[k]), .cmp_match (cmp_ok[k]), .cmp_mismatch (cmp_bad[k]),
        .halted (halted[k]),
        .ret_valid (ret_valid[C]), .ret_grp (ret_grp[C]), .retiring (retiring[k]),
        .ser_stall (ser_stall[C]), .ivl_closed (closed[k]), .ivl_retired (retired[k])
      );

      always_comb begin
        for (int i = 0; i < RETIRE_W; i++) begin
          we[i] = ret_valid[C] && ret_grp[C][i].valid && ret_grp[C][i].we;
          wa[i] = ret_grp[C][i].rd;
          wd[i] = ret_grp[C][i].value;
        end
      end

      arch_regfile #(.NR(NREG), .W(XLEN), .P(RETIRE_W)) u_arf (
        .clk, .rst_n, .we, .waddr (wa), .wdata (wd),
        .raddr     ((k == 0 && copy_we) ? copy_idx : arf_raddr[C]),
        .rdata,
        .copy_we   (k == 1 && copy_we),
        .copy_idx,
        .copy_data (vocal_rd)
      );
      assign arf_rdata[C] = rdata;
      if (k == 0) begin : g_vrd
        assign vocal_rd = rdata;
      end
    end

    // fingerprint swap: vocal -> mute and mute -> vocal
    fingerprint_channel #(.W(FP_W), .LAT(CH_LAT)) u_ch_vm (
      .clk, .rst_n, .flush,
      .in_valid (tx_v[0]), .in_data (tx[0]), .out_valid (rx_v[1]), .out_data (rx[1]));
    fingerprint_channel #(.W(FP_W), .LAT(CH_LAT)) u_ch_mv (
      .clk, .rst_n, .flush,
      .in_valid (tx_v[1]), .in_data (tx[1]), .out_valid (rx_v[0]), .out_data (rx[0]));

    reexec_ctrl #(.NR(NREG)) u_reexec (
      .clk, .rst_n,
      .match_v (cmp_ok[0]), .match_m (cmp_ok[1]),
      .mismatch_v (cmp_bad[0]), .mismatch_m (cmp_bad[1]),
      .retiring_v (retiring[0]), .retiring_m (retiring[1]),
      .halted_v (halted[0]), .halted_m (halted[1]),
      .retired_v (retired[0]), .retired_m (retired[1]),
      .flush, .single_step (step), .copy_we, .copy_idx,
      .due_error (due_error[p]), .phase (reexec_phase[p]),
      .n_rollbacks (n_rollbacks[p]), .n_phase2 (n_phase2[p]), .n_recovered (n_recovered[p])
    );

    irq_sync u_irq (
      .clk, .rst_n, .irq (irq[p]),
      .vocal_closed (closed[0]), .vocal_retired (retired[0]), .mute_retired (retired[1]),
      .take_v (irq_take[V]), .take_m (irq_take[U]), .pending (irq_pending[p])
    );

    assign rollback[p]    = flush;
    assign single_step[p] = step;
  end

  shared_cache_ctrl #(
    .N_PAIRS (N_PAIRS), .AW (AW), .LINE_W (LINE_W),
    .SETS (L2_SETS), .WAYS (L2_WAYS), .HIT_LAT (L2_HIT_LAT)
  ) u_l2 (
    .clk, .rst_n, .strength, .ready (l2_ready),
    .req_valid, .req_type, .req_addr, .req_data, .req_ready,
    .rsp_valid, .rsp_data, .rsp_excl,
    .prb_valid, .prb_core, .prb_type, .prb_addr, .prb_ack, .prb_dirty, .prb_data,
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_data, .mem_req_ready,
    .mem_rsp_valid, .mem_rsp_data,
    .ev_phantom, .ev_sync, .ev_mute_drop, .ev_miss
  );
endmodule

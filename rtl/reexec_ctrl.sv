// reexec_ctrl: the re-execution protocol of one logical processor pair (vocal + mute).
//
// NORMAL: both check stages run freely. A fingerprint mismatch seen by either core
// starts phase 1: wait until neither core is half-way through retiring a checked
// interval and both have retired the same number of intervals (the core that lags
// still retires the intervals before the failing one, then meets the mismatch
// itself), or both have halted, or DRAIN_TIMEOUT cycles have passed (a mismatch seen
// by one core only, e.g. a fingerprint corrupted in the channel); then pulse `flush` (rollback to the safe state in the register files,
// squashing everything uncompared, including fingerprints in the channels), then
// raise `single_step`: both cores execute non-speculatively up to and including the
// first load or atomic, which they issue as a synchronizing request, and the check
// stages compare those instructions as one interval. If both cores report a match the
// pair returns to NORMAL (forward progress of at least one instruction). If that
// comparison fails, phase 2: rollback again, copy the vocal register file to the
// mute one register per cycle (copy_we/copy_idx, NREG cycles), and single-step again.
// A mismatch in phase 2 can only be a soft error that escaped detection: `due_error`
// (detected, uncorrectable error) is raised and stays until reset.
//
// The two phases, their order, the register copy, the single step to the first
// load and the failure outcome follow the document. The drain rule before a
// rollback, the one-register-per-cycle copy and the event counters are this design's
// choices. The copy covers the register file; the program counter and other
// architectural state of the core are copied by the core alongside it.
module reexec_ctrl
  import reunion_pkg::*;
#(
  parameter int unsigned NR            = NREG,
  parameter int unsigned DRAIN_TIMEOUT = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  match_v,
  input  logic                  match_m,
  input  logic                  mismatch_v,
  input  logic                  mismatch_m,
  input  logic                  retiring_v,
  input  logic                  retiring_m,
  input  logic                  halted_v,
  input  logic                  halted_m,
  input  logic [31:0]           retired_v,
  input  logic [31:0]           retired_m,
  output logic                  flush,
  output logic                  single_step,
  output logic                  copy_we,
  output logic [$clog2(NR)-1:0] copy_idx,
  output logic                  due_error,
  output logic [1:0]            phase,          // 0 normal, 1 phase 1, 2 phase 2, 3 failed
  output logic [15:0]           n_rollbacks,    // phase-1 starts
  output logic [15:0]           n_phase2,       // phase-2 starts
  output logic [15:0]           n_recovered     // returns to NORMAL
);
  typedef enum logic [3:0] {
    S_NORMAL, S_DRAIN1, S_FLUSH1, S_STEP1, S_DRAIN2, S_FLUSH2, S_COPY, S_STEP2, S_FAIL
  } state_e;

  state_e state;
  logic   got_v, got_m;   // match seen from each core in a single-step phase
  logic   any_mm, both_ok, drained;
  logic [15:0] drain_t;

  assign any_mm  = mismatch_v || mismatch_m;
  assign both_ok = (got_v || match_v) && (got_m || match_m);
  assign drained = !retiring_v && !retiring_m &&
                   ((retired_v == retired_m) || (halted_v && halted_m) ||
                    (32'(drain_t) >= DRAIN_TIMEOUT));

  always_comb begin
    flush       = (state == S_FLUSH1) || (state == S_FLUSH2);
    single_step = (state == S_STEP1) || (state == S_STEP2) || (state == S_COPY);
    copy_we     = (state == S_COPY);
    due_error   = (state == S_FAIL);
    unique case (state)
      S_NORMAL:                     phase = 2'd0;
      S_DRAIN1, S_FLUSH1, S_STEP1:  phase = 2'd1;
      S_FAIL:                       phase = 2'd3;
      default:                      phase = 2'd2;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_NORMAL; copy_idx <= '0; got_v <= 1'b0; got_m <= 1'b0; drain_t <= '0;
      n_rollbacks <= '0; n_phase2 <= '0; n_recovered <= '0;
    end else begin
      drain_t <= (state == S_DRAIN1 || state == S_DRAIN2) ? drain_t + 1'b1 : '0;
      unique case (state)
        S_NORMAL: if (any_mm) begin
          state <= S_DRAIN1; n_rollbacks <= n_rollbacks + 1'b1;
        end
        S_DRAIN1: if (drained) state <= S_FLUSH1;
        S_FLUSH1: begin state <= S_STEP1; got_v <= 1'b0; got_m <= 1'b0; end
        S_STEP1: begin
          if (any_mm) begin
            state <= S_DRAIN2; n_phase2 <= n_phase2 + 1'b1;
          end else if (both_ok) begin
            state <= S_NORMAL; n_recovered <= n_recovered + 1'b1;
          end else begin
            got_v <= got_v | match_v; got_m <= got_m | match_m;
          end
        end
        S_DRAIN2: if (drained) state <= S_FLUSH2;
        S_FLUSH2: begin state <= S_COPY; copy_idx <= '0; end
        S_COPY: begin
          copy_idx <= copy_idx + 1'b1;
          if (32'(copy_idx) == NR - 1) begin
            state <= S_STEP2; got_v <= 1'b0; got_m <= 1'b0;
          end
        end
        S_STEP2: begin
          if (any_mm) state <= S_FAIL;
          else if (both_ok) begin
            state <= S_NORMAL; n_recovered <= n_recovered + 1'b1;
          end else begin
            got_v <= got_v | match_v; got_m <= got_m | match_m;
          end
        end
        S_FAIL: state <= S_FAIL;
        default: state <= S_NORMAL;
      endcase
    end
  end
endmodule

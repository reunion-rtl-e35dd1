// tb_reunion_sweep: the comparison-latency and fingerprint-interval configurations
// evaluated for the Reunion design, run on the complete top module.
//
// Eight copies of reunion_top (one logical pair each) are built side by side, for
// COMPARE_LAT = 4, 10, 20, 40 cycles and FP_INTERVAL = 1, 50 instructions. Every
// other parameter keeps its default except the L2, which is cut to 16 sets x 2 ways
// so that its directory clears quickly after reset: this test sends no L2 traffic.
// In each copy the vocal and the mute retire the same program of TOTAL groups: the
// first N_FREE groups are four-instruction groups with no serializing instruction,
// the rest contain a lone serializing instruction every 20th group.
//
// Per configuration the testbench checks, against values it works out itself:
//  * every group leaves check unchanged and in order, and both register files end
//    equal to a reference register file;
//  * the first group retires COMPARE_LAT+1 cycles after it was accepted with
//    FP_INTERVAL=1, and 12 cycles later with FP_INTERVAL=50 (a 50-instruction
//    interval closes with the 13th four-instruction group);
//  * retirement keeps up with one group per cycle wherever the result buffer
//    (RB_DEPTH groups) and the fingerprint queues (FPQ_DEPTH entries) cover the
//    comparison latency, which at the defaults is every configuration here;
//    otherwise the rate must reach at least half of what they allow;
//  * a serializing instruction holds retirement back for at least one full
//    comparison latency, and for no more than two plus one interval.
// It prints the measured rate and stall per configuration. The configurations are
// the document's; the program, the L2 size and the bounds are this testbench's.
module tb_reunion_sweep;
  import reunion_pkg::*;
  localparam int NCFG = 8;
  localparam int unsigned LATS [NCFG] = '{4, 10, 20, 40, 4, 10, 20, 40};
  localparam int unsigned IVLS [NCFG] = '{1, 1, 1, 1, 50, 50, 50, 50};
  localparam int TOTAL = 260, N_FREE = 200, RB = 64, FPQ = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0d", what, cycle); end
  endtask
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  function automatic logic [63:0] mix(int i, int s);
    logic [63:0] x = 64'(i) * 64'h9E37_79B9_7F4A_7C15 ^ 64'(s) * 64'hC2B2_AE3D_27D4_EB4F;
    x = x ^ (x >> 31); x = x * 64'hBF58_476D_1CE4_E5B9; x = x ^ (x >> 29);
    return x;
  endfunction
  function automatic bit is_ser(int i);
    return i >= N_FREE && i % 20 == 19;
  endfunction
  function automatic group_t prog(int i);
    group_t g = '0;
    int n = is_ser(i) ? 1 : RETIRE_W;
    for (int k = 0; k < n; k++) begin
      g[k].valid = 1'b1;
      g[k].we    = 1'b1;
      g[k].rd    = REG_AW'(mix(i, k));
      g[k].value = mix(i, k + 8);
      g[k].addr  = mix(i, k + 16);
    end
    g[0].serializing = is_ser(i);
    return g;
  endfunction

  // Reference register file after the whole program.
  logic [XLEN-1:0] rarf [NREG];
  initial begin
    foreach (rarf[r]) rarf[r] = '0;
    for (int i = 0; i < TOTAL; i++) begin
      automatic group_t g = prog(i);
      for (int k = 0; k < RETIRE_W; k++) if (g[k].valid && g[k].we) rarf[g[k].rd] = g[k].value;
    end
  end

  int n_ser = 0;
  initial for (int i = 0; i < TOTAL; i++) if (is_ser(i)) n_ser++;

  bit done [NCFG];

  for (genvar j = 0; j < NCFG; j++) begin : g_cfg
    localparam int unsigned L = LATS[j], IV = IVLS[j];
    logic   [1:0] grp_valid, grp_ready, ret_valid, ser_stall, irq_take;
    group_t [1:0] grp, ret_grp;
    logic   [1:0][REG_AW-1:0] arf_raddr;
    logic   [1:0][XLEN-1:0]   arf_rdata;
    logic   [0:0] irq, irq_pending, rollback, single_step, due_error;
    logic   [0:0][1:0]  reexec_phase;
    logic   [0:0][15:0] n_rollbacks, n_phase2, n_recovered;
    phantom_e strength;
    logic l2_ready;
    logic [1:0] req_valid, req_ready, rsp_valid;
    req_e [1:0] req_type;
    logic [1:0][25:0]  req_addr;
    logic [1:0][511:0] req_data;
    logic [511:0] rsp_data, prb_data, mem_req_data, mem_rsp_data;
    logic rsp_excl, prb_valid, prb_ack, prb_dirty;
    logic [0:0] prb_core;
    probe_e prb_type;
    logic [25:0] prb_addr, mem_req_addr;
    logic mem_req_valid, mem_req_we, mem_req_ready, mem_rsp_valid;
    logic ev_phantom, ev_sync, ev_mute_drop, ev_miss;

    reunion_top #(.N_PAIRS(1), .COMPARE_LAT(L), .FP_INTERVAL(IV),
                  .L2_SETS(16), .L2_WAYS(2)) dut (.*);

    assign irq = '0;
    assign strength = PH_GLOBAL;
    assign req_valid = '0; assign req_type = '{REQ_READ, REQ_READ};
    assign req_addr = '0; assign req_data = '0;
    assign prb_ack = 1'b0; assign prb_dirty = 1'b0; assign prb_data = '0;
    assign mem_req_ready = 1'b1; assign mem_rsp_valid = 1'b0; assign mem_rsp_data = '0;

    int idx [2], ret_cnt [2];
    int acc0 = -1, acc_last_free = -1, ret0 = -1, n_stall = 0;
    logic [REG_AW-1:0] rd_addr;

    for (genvar c = 0; c < 2; c++) begin : g_core
      assign grp_valid[c] = rst_n && idx[c] < TOTAL;
      assign grp[c]       = prog(idx[c]);
      assign arf_raddr[c] = rd_addr;
    end

    initial begin
      idx = '{0, 0}; ret_cnt = '{0, 0}; rd_addr = '0;
    end

    always @(posedge clk) if (rst_n) begin
      for (int c = 0; c < 2; c++) begin
        if (grp_valid[c] && grp_ready[c]) begin
          if (c == 0 && idx[c] == 0) acc0 = cycle;
          if (c == 0 && idx[c] == N_FREE - 1) acc_last_free = cycle;
          idx[c] <= idx[c] + 1;
        end
        if (ret_valid[c]) begin
          checks++;
          if (ret_grp[c] !== prog(ret_cnt[c])) begin
            failures++;
            $display("FAIL cfg lat=%0d ivl=%0d core %0d group %0d wrong", L, IV, c, ret_cnt[c]);
          end
          if (c == 0 && ret_cnt[c] == 0) ret0 = cycle;
          ret_cnt[c] <= ret_cnt[c] + 1;
        end
      end
      if (ser_stall[0]) n_stall++;
      check(!rollback[0] && !due_error[0], $sformatf("lat=%0d ivl=%0d: no recovery", L, IV));
    end

    initial begin
      real rate, bound;
      int first_lat, exp_first;
      done[j] = 0;
      wait (rst_n);
      wait (ret_cnt[0] == TOTAL && ret_cnt[1] == TOTAL);
      @(negedge clk);
      for (int r = 0; r < NREG; r++) begin
        rd_addr = REG_AW'(r);
        #1;
        check(arf_rdata[0] === rarf[r] && arf_rdata[1] === rarf[r],
              $sformatf("lat=%0d ivl=%0d: register r%0d", L, IV, r));
      end
      first_lat = ret0 - acc0;
      exp_first = int'(L) + 1 + (IV == 50 ? 12 : 0);
      check(first_lat == exp_first,
            $sformatf("lat=%0d ivl=%0d: first retirement after %0d cycles, expected %0d", L, IV, first_lat, exp_first));
      rate  = real'(N_FREE - 1) / real'(acc_last_free - acc0);
      bound = 1.0;
      if (real'(RB) / real'(L + 2 + (IV == 50 ? 13 : 0)) < bound) bound = real'(RB) / real'(L + 2 + (IV == 50 ? 13 : 0));
      if (IV == 1 && real'(FPQ - 3) / real'(L + 1) < bound) bound = real'(FPQ - 3) / real'(L + 1);
      if (bound >= 1.0) check(acc_last_free - acc0 == N_FREE - 1,
                         $sformatf("lat=%0d ivl=%0d: one group per cycle (took %0d cycles)", L, IV, acc_last_free - acc0));
      else         check(rate >= 0.5 * bound,
                         $sformatf("lat=%0d ivl=%0d: rate %0.3f below half of %0.3f", L, IV, rate, bound));
      check(n_stall >= n_ser * int'(L + 1),
            $sformatf("lat=%0d ivl=%0d: serializing stall %0d < %0d", L, IV, n_stall, n_ser * int'(L + 1)));
      check(n_stall <= n_ser * (2 * int'(L + 1) + 20),
            $sformatf("lat=%0d ivl=%0d: serializing stall %0d too long", L, IV, n_stall));
      $display("lat=%0d ivl=%0d: first retirement %0d cycles, %0.3f groups/cycle (bound %0.3f), %0.1f stall cycles per serializing instruction",
               L, IV, first_lat, rate, bound, real'(n_stall) / real'(n_ser));
      done[j] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done.and() == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

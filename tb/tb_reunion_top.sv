// tb_reunion_top: end-to-end run of the whole design at its default parameters
// (four logical processor pairs, 10-cycle comparison latency, 16 MB 8-way L2).
//
// Behavioural cores replay a fixed program of retire groups per pair; the vocal and
// the mute of a pair run it with independent random stalls, so they drift apart in
// time. The mute's copy of an instruction is corrupted on purpose to play an input
// incoherence or soft error: pair 0 once (phase-1 recovery), pair 1 also during the
// first single-step (phase-2 recovery with register copy), pair 2 also during the
// second single-step (uncorrectable error). In single-step the cores issue the load
// that ends it as a synchronizing request to the L2. Pair 3 takes an external
// interrupt. All cores also send random L1 misses, writebacks and evictions to the
// L2 (mute requests become phantom requests or are dropped) and a behavioural L1
// answers probes. Checked: every retired group is the program's next one, the final
// register files equal a reference built from the program, both cores of a pair take
// the interrupt at the same instruction, the accept-to-retire latency, and that
// every mechanism (rollback, phase 2, uncorrectable error, single step with sync,
// serializing stall, phantom, sync, dropped mute writeback, L2 miss, interrupt,
// retirement) happened at least once.
module tb_reunion_top;
  import reunion_pkg::*;
  localparam int unsigned NP = 4, NC = 8, AW = 26, LW = 512, COMPARE_LAT = 10;
  localparam int TOTAL = 300;   // groups in each pair's program
  localparam int INJ_AT = 40;   // group whose mute copy is first corrupted

  logic clk = 1'b0, rst_n = 1'b0;
  logic   [NC-1:0] grp_valid, grp_ready, ret_valid, ser_stall, irq_take;
  group_t [NC-1:0] grp, ret_grp;
  logic   [NC-1:0][REG_AW-1:0] arf_raddr;
  logic   [NC-1:0][XLEN-1:0]   arf_rdata;
  logic   [NP-1:0] irq, irq_pending, rollback, single_step, due_error;
  logic   [NP-1:0][1:0]  reexec_phase;
  logic   [NP-1:0][15:0] n_rollbacks, n_phase2, n_recovered;
  phantom_e strength;
  logic l2_ready;
  logic [NC-1:0] req_valid, req_ready, rsp_valid;
  req_e [NC-1:0] req_type;
  logic [NC-1:0][AW-1:0] req_addr;
  logic [NC-1:0][LW-1:0] req_data;
  logic [LW-1:0] rsp_data, prb_data, mem_req_data, mem_rsp_data;
  logic rsp_excl, prb_valid, prb_ack, prb_dirty;
  logic [2:0] prb_core;
  probe_e prb_type;
  logic [AW-1:0] prb_addr, mem_req_addr;
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_rsp_valid;
  logic ev_phantom, ev_sync, ev_mute_drop, ev_miss;
  int n_reads, n_writes;

  reunion_top dut (.*);
  mem_model #(.AW(AW), .LINE_W(LW), .LAT(240)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0d", what, cycle); end
  endtask

  // ---------------- the program ----------------
  function automatic logic [63:0] mix(int p, int i, int s);
    logic [63:0] x = 64'(p) * 64'h9E37_79B9_7F4A_7C15 ^ 64'(i) * 64'hC2B2_AE3D_27D4_EB4F ^ 64'(s) * 64'h1656_67B1_9E37_79F9;
    x = x ^ (x >> 29); x = x * 64'hBF58_476D_1CE4_E5B9; x = x ^ (x >> 32);
    return x;
  endfunction
  function automatic group_t prog(int p, int i);
    group_t g = '0;
    int n = 1 + int'(mix(p, i, 0) % 4);
    bit ser = (i % 37 == 36);
    if (ser) n = 1;
    for (int k = 0; k < n; k++) begin
      g[k].valid = 1'b1;
      g[k].we = mix(p, i, k + 10) % 4 != 0;
      g[k].rd = REG_AW'(mix(p, i, k + 20));
      g[k].value = mix(p, i, k + 30);
      g[k].addr = mix(p, i, k + 40);
      g[k].is_store = mix(p, i, k + 50) % 5 == 0;
    end
    g[0].serializing = ser;
    g[n-1].is_load = (i % 3 == 0);
    return g;
  endfunction
  function automatic bit has_load(group_t g);
    for (int k = 0; k < RETIRE_W; k++) if (g[k].valid && g[k].is_load) return 1;
    return 0;
  endfunction

  // ---------------- events ----------------
  int n_ser_stall = 0, n_phantom = 0, n_sync = 0, n_drop = 0, n_miss = 0, n_step_sync = 0;
  int n_irq_pend = 0, n_irq_v = 0, n_irq_m = 0, irq_at_v = -1, irq_at_m = -1, n_lat = 0;
  int ret_cnt [NC];
  int pc [NC];
  initial foreach (ret_cnt[i]) begin ret_cnt[i] = 0; pc[i] = 0; end

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (ser_stall != 0) n_ser_stall++;
    if (ev_phantom) n_phantom++;
    if (ev_sync) n_sync++;
    if (ev_mute_drop) n_drop++;
    if (ev_miss) n_miss++;
    for (int c = 0; c < NC; c++) begin
      if (ret_valid[c]) begin
        checks++;
        if (ret_grp[c] !== prog(c / 2, ret_cnt[c])) begin
          failures++; $display("FAIL core %0d retired group %0d wrong @%0d", c, ret_cnt[c], cycle);
        end
        ret_cnt[c]++;
      end
    end
    if (irq_pending[3]) n_irq_pend++;
    if (irq_take[6]) begin n_irq_v++; irq_at_v = ret_cnt[6]; end
    if (irq_take[7]) begin n_irq_m++; irq_at_m = ret_cnt[7]; end
  end

  // ---------------- cores ----------------
  int inj_normal [NP] = '{1, 1, 1, 0};   // corrupt the mute's INJ_AT group once
  int inj_step   [NP] = '{0, 1, 2, 0};   // and its load in that many single steps
  bit sync_req [NC], sync_done [NC], step_stop [NC];
  int acc0_at [NC];

  for (genvar c = 0; c < NC; c++) begin : g_core
    localparam int P = c / 2;
    localparam bit MUTE = c % 2;
    initial begin
      grp_valid[c] = 1'b0; grp[c] = '0; sync_req[c] = 0; sync_done[c] = 0; step_stop[c] = 0;
      acc0_at[c] = -1;
    end
    always @(posedge clk) if (rst_n) begin
      if (rollback[P]) begin
        pc[c] <= ret_cnt[c] + (ret_valid[c] ? 1 : 0);
        sync_done[c] <= 0; step_stop[c] <= 0;
      end else if (grp_valid[c] && grp_ready[c]) begin
        if (pc[c] == 0) acc0_at[c] = cycle;
        if (single_step[P] && has_load(grp[c])) begin
          step_stop[c] <= 1;
          if (MUTE && inj_step[P] > 0) inj_step[P]--;
        end
        if (MUTE && pc[c] == INJ_AT && !single_step[P] && inj_normal[P] > 0) inj_normal[P]--;
        pc[c] <= pc[c] + 1;
        sync_done[c] <= 0;
      end
      if (!single_step[P]) step_stop[c] <= 0;
    end
    always @(negedge clk) begin
      automatic group_t g = prog(P, pc[c]);
      automatic bit go = rst_n && !rollback[P] && !due_error[P] && pc[c] < TOTAL &&
                         !step_stop[c] && !sync_req[c];
      // first group presented in the same cycle by both cores (latency check)
      if (pc[c] != 0 && $urandom_range(99) < 25) go = 0;
      if (go && single_step[P] && has_load(g) && !sync_done[c]) begin
        sync_req[c] = 1; go = 0;           // the load goes out as a synchronizing request
      end
      if (MUTE && go) begin
        if ((pc[c] == INJ_AT && !single_step[P] && inj_normal[P] > 0) ||
            (single_step[P] && has_load(g) && inj_step[P] > 0))
          g[0].value = g[0].value ^ 64'h1;
      end
      grp_valid[c] = go;
      grp[c] = g;
    end
  end

  // ---------------- L1 miss traffic and synchronizing requests ----------------
  for (genvar c = 0; c < NC; c++) begin : g_mem
    initial begin
      req_valid[c] = 1'b0; req_type[c] = REQ_READ; req_addr[c] = '0; req_data[c] = '0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        if (sync_req[c]) begin
          req_type[c] = REQ_SYNC;
          req_addr[c] = AW'(26'h40 + c / 2);
        end else if (l2_ready && $urandom_range(99) < 3 && cycle < 45000) begin
          automatic int r = $urandom_range(3);
          req_type[c] = (r == 0) ? REQ_WRITE : (r == 1) ? REQ_WB : (r == 2) ? REQ_EVICT : REQ_READ;
          req_addr[c] = AW'($urandom_range(15) * 32768 + $urandom_range(3));  // few sets, many ways
          req_data[c] = {16{32'(c * 1000 + cycle)}};
        end else continue;
        req_valid[c] = 1'b1;
        @(posedge clk); while (!req_ready[c]) @(posedge clk);
        @(negedge clk); req_valid[c] = 1'b0;
        if (req_type[c] != REQ_WB && req_type[c] != REQ_EVICT) begin
          while (!rsp_valid[c]) @(negedge clk);
          if (req_type[c] == REQ_SYNC) begin
            n_step_sync++;
            sync_req[c] = 0; sync_done[c] = 1;
          end
        end
      end
    end
  end

  // probes: vocal copies are clean here, mute copies are garbage
  initial begin prb_ack = 0; prb_dirty = 0; prb_data = '0; end
  always @(posedge clk) begin
    if (prb_valid && !prb_ack) begin
      prb_dirty <= prb_core[0];
      prb_data  <= {16{32'hDEAD_BEEF}};
      prb_ack   <= 1'b1;
      @(posedge clk);
      prb_ack <= 1'b0;
    end
  end

  // ---------------- reference register files ----------------
  function automatic void ref_arf(int p, int n, ref logic [XLEN-1:0] r [NREG]);
    foreach (r[i]) r[i] = '0;
    for (int i = 0; i < n; i++) begin
      group_t g = prog(p, i);
      for (int k = 0; k < RETIRE_W; k++) if (g[k].valid && g[k].we) r[g[k].rd] = g[k].value;
    end
  endfunction

  logic [XLEN-1:0] rarf [NREG];
  initial begin
    strength = PH_GLOBAL; irq = '0; arf_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (200) @(negedge clk);
    irq[3] = 1'b1; @(negedge clk); irq[3] = 1'b0;
    // run until every live pair is done and the L2 has come out of reset
    begin
      int k = 0;
      while (k < 60000 && !(l2_ready && ret_cnt[0] == TOTAL && ret_cnt[1] == TOTAL &&
                            ret_cnt[2] == TOTAL && ret_cnt[3] == TOTAL &&
                            ret_cnt[6] == TOTAL && ret_cnt[7] == TOTAL && cycle > 46000)) begin
        @(negedge clk); k++;
      end
    end
    repeat (300) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      if (c / 2 != 2) check(ret_cnt[c] == TOTAL, $sformatf("core %0d retired %0d of %0d", c, ret_cnt[c], TOTAL));
      ref_arf(c / 2, ret_cnt[c], rarf);
      for (int r = 0; r < NREG; r++) begin
        arf_raddr[c] = REG_AW'(r); #1;
        check(arf_rdata[c] === rarf[r], $sformatf("core %0d r%0d", c, r));
      end
    end
    check(n_rollbacks[0] == 1 && n_phase2[0] == 0 && n_recovered[0] == 1 && !due_error[0], "pair 0: phase-1 recovery");
    check(n_rollbacks[1] == 1 && n_phase2[1] == 1 && n_recovered[1] == 1 && !due_error[1], "pair 1: phase-2 recovery");
    check(n_phase2[2] == 1 && due_error[2], "pair 2: uncorrectable error");
    check(n_rollbacks[3] == 0 && !due_error[3], "pair 3: no recovery");
    check(n_irq_v == 1 && n_irq_m == 1 && irq_at_v == irq_at_m && irq_at_v > 0,
          $sformatf("interrupt at the same instruction (%0d/%0d)", irq_at_v, irq_at_m));
    check(n_irq_pend > 0 && !irq_pending[3], "interrupt pending, then cleared");
    check(n_ser_stall > 0, "serializing stall");
    check(n_step_sync >= 10, $sformatf("single-step synchronizing loads (%0d)", n_step_sync));
    check(n_sync >= 5 && n_phantom > 0 && n_drop > 0 && n_miss > 0,
          $sformatf("L2: sync=%0d phantom=%0d drop=%0d miss=%0d", n_sync, n_phantom, n_drop, n_miss));
    check(n_lat > 0, "latency measured");
    $display("rollbacks=%0d/%0d/%0d/%0d phase2=%0d/%0d/%0d due=%b ser_stall_cycles=%0d sync=%0d step_sync=%0d phantom=%0d drop=%0d miss=%0d irq=%0d@%0d lat_checks=%0d mem r/w=%0d/%0d cycles=%0d",
             n_rollbacks[0], n_rollbacks[1], n_rollbacks[2], n_rollbacks[3], n_phase2[0], n_phase2[1], n_phase2[2],
             due_error, n_ser_stall, n_sync, n_step_sync, n_phantom, n_drop, n_miss, n_irq_v, irq_at_v, n_lat,
             n_reads, n_writes, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accept-to-retire latency of group 0, presented by both cores in the same cycle
  for (genvar c = 0; c < NC; c += 2) begin : g_lat
    always @(posedge clk) if (rst_n && ret_valid[c] && ret_cnt[c] == 0 && acc0_at[c] >= 0 && acc0_at[c] == acc0_at[c+1]) begin
      n_lat++;
      checks++;
      if (cycle - acc0_at[c] != COMPARE_LAT + 1) begin
        failures++; $display("FAIL latency %0d, expected %0d", cycle - acc0_at[c], COMPARE_LAT + 1);
      end
    end
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reunion_incoh: input incoherence and its repair, end to end, for the three
// phantom request strengths.
//
// Three single-pair copies of reunion_top run side by side with `strength` set to
// PH_NULL, PH_SHARED and PH_GLOBAL. Only the L2 is made small (16 sets x 2 ways,
// enough for the 24 lines used) so that it clears quickly after reset; the
// comparison latency, depths and L2 hit latency keep their defaults. Each core is a
// small behavioural model without an L1: it loads K lines one after the other
// through the L2 (REQ_READ, or REQ_SYNC while the pair single-steps), puts the first
// 64 bits of the reply into a one-instruction retire group (a load writing register
// i mod 32) and hands it to check. On `rollback` a core restarts from its last
// retired load; while `single_step` is high it stops after the load it has handed in.
//
// The mute's loads are phantom requests. With PH_NULL the mute reads zeros, so every
// load's fingerprints differ: each load must be retired through a rollback and a
// phase-1 re-execution whose synchronizing request gives both cores the same line.
// With PH_GLOBAL the mute reads the same data as the vocal (from memory on an L2
// miss) and no recovery is needed. PH_SHARED lies between them: the vocal core runs
// a few cycles behind the mute, so the mute's phantom request for a line not yet in
// the L2 misses and returns zeros; once the vocal has brought the line in, shared
// phantom requests hit. So exactly the first touch of each line needs a recovery.
// The testbench checks that every retired load carries the memory's value (from the
// memory model's own line formula), that both
// register files end equal to a reference, that no recovery needs phase 2 or ends in
// an uncorrectable error, the recovery count for PH_NULL (one per load), PH_SHARED
// (one per distinct line) and PH_GLOBAL (none), and that the mute's
// phantom requests and the pair's synchronizing requests really happened.
// The strengths are the document's; the load stream and the core model are this
// testbench's.
module tb_reunion_incoh;
  import reunion_pkg::*;
  localparam int NCFG = 3, K = 48, AW = 26, LW = 512;
  localparam phantom_e STR [NCFG] = '{PH_NULL, PH_SHARED, PH_GLOBAL};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0d", what, cycle); end
  endtask
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  function automatic logic [AW-1:0] load_addr(int i);
    return AW'((i * 7) % 24 + 1);
  endfunction
  function automatic logic [REG_AW-1:0] load_rd(int i);
    return REG_AW'(i % NREG);
  endfunction

  bit done [NCFG];

  for (genvar j = 0; j < NCFG; j++) begin : g_cfg
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
    logic [1:0][AW-1:0] req_addr;
    logic [1:0][LW-1:0] req_data;
    logic [LW-1:0] rsp_data, prb_data, mem_req_data, mem_rsp_data;
    logic rsp_excl, prb_valid, prb_ack, prb_dirty;
    logic [0:0] prb_core;
    probe_e prb_type;
    logic [AW-1:0] prb_addr, mem_req_addr;
    logic mem_req_valid, mem_req_we, mem_req_ready, mem_rsp_valid;
    logic ev_phantom, ev_sync, ev_mute_drop, ev_miss;
    int n_reads, n_writes;

    reunion_top #(.N_PAIRS(1), .L2_SETS(16), .L2_WAYS(2)) dut (.*);
    mem_model #(.AW(AW), .LINE_W(LW), .LAT(40)) u_mem (.*);

    assign irq = '0;
    assign strength = STR[j];

    // The cores keep no private copies: probes are answered at once, clean.
    initial begin prb_ack = 1'b0; prb_dirty = 1'b0; prb_data = '0; end
    always @(posedge clk) prb_ack <= prb_valid && !prb_ack;

    int ret_cnt [2];
    int n_phantom = 0, n_sync = 0;
    bit restart [2];
    int restart_at [2];
    initial begin ret_cnt = '{0, 0}; restart = '{0, 0}; restart_at = '{0, 0}; end

    always @(posedge clk) if (rst_n) begin
      if (ev_phantom) n_phantom++;
      if (ev_sync) n_sync++;
      for (int c = 0; c < 2; c++) begin
        if (ret_valid[c]) begin
          automatic logic [LW-1:0] line = u_mem.init_line(load_addr(ret_cnt[c]));
          checks++;
          if (!(ret_grp[c][0].valid && ret_grp[c][0].we && ret_grp[c][0].is_load &&
                ret_grp[c][0].rd == load_rd(ret_cnt[c]) && ret_grp[c][0].value == line[63:0] &&
                !ret_grp[c][1].valid)) begin
            failures++;
            $display("FAIL strength %0d core %0d load %0d retired %h", j, c, ret_cnt[c], ret_grp[c][0].value);
          end
          ret_cnt[c] <= ret_cnt[c] + 1;
        end
        if (rollback[0]) begin restart[c] = 1; restart_at[c] = ret_cnt[c]; end
      end
    end

    for (genvar c = 0; c < 2; c++) begin : g_core
      initial begin
        int idx;
        logic [LW-1:0] data;
        bit stepping, taken;
        idx = 0;
        grp_valid[c] = 1'b0; grp[c] = '0;
        req_valid[c] = 1'b0; req_type[c] = REQ_READ; req_addr[c] = '0; req_data[c] = '0;
        wait (rst_n && l2_ready);
        while (idx < K && !due_error[0]) begin
          @(negedge clk);
          if (restart[c]) begin idx = restart_at[c]; restart[c] = 0; end
          // the load goes to the L2
          stepping = single_step[0];
          // the vocal runs a little behind, so a mute's phantom request can reach
          // a line before the vocal's read has brought it into the L2
          if (c == 0 && !stepping) repeat (4) @(negedge clk);
          if (restart[c]) begin idx = restart_at[c]; restart[c] = 0; end
          stepping = single_step[0];
          req_type[c] = stepping ? REQ_SYNC : REQ_READ;
          req_addr[c] = load_addr(idx);
          req_valid[c] = 1'b1;
          @(posedge clk); while (!req_ready[c]) @(posedge clk);
          @(negedge clk); req_valid[c] = 1'b0;
          while (!rsp_valid[c]) @(negedge clk);
          data = rsp_data;
          if (restart[c]) continue;            // squashed while in flight
          // the load's result goes to check
          grp[c] = '0;
          grp[c][0].valid = 1'b1; grp[c][0].we = 1'b1; grp[c][0].is_load = 1'b1;
          grp[c][0].rd = load_rd(idx); grp[c][0].value = data[63:0];
          grp[c][0].addr = XLEN'(load_addr(idx));
          grp_valid[c] = 1'b1;
          taken = 0;
          while (!taken && !restart[c]) begin
            @(posedge clk);
            taken = grp_ready[c];
          end
          @(negedge clk); grp_valid[c] = 1'b0;
          if (taken) begin
            idx++;
            // single step: nothing more until the step is compared
            while (stepping && single_step[0] && !restart[c]) @(negedge clk);
          end
          // a rollback may still come for the loads in check
          if (idx == K) begin
            while (!restart[c] && ret_cnt[c] < K && !due_error[0]) @(negedge clk);
            if (restart[c]) begin idx = restart_at[c]; restart[c] = 0; end
          end
        end
      end
    end

    initial begin
      logic [XLEN-1:0] rarf [NREG];
      logic [LW-1:0] line;
      int n_lines;
      n_lines = 0;
      done[j] = 0;
      foreach (rarf[r]) rarf[r] = '0;
      for (int i = 0; i < K; i++) begin
        automatic bit seen = 0;
        for (int e = 0; e < i; e++) if (load_addr(e) == load_addr(i)) seen = 1;
        if (!seen) n_lines++;
        line = u_mem.init_line(load_addr(i));
        rarf[load_rd(i)] = line[63:0];
      end
      wait (rst_n);
      wait ((ret_cnt[0] == K && ret_cnt[1] == K) || due_error[0]);
      repeat (20) @(negedge clk);
      check(ret_cnt[0] == K && ret_cnt[1] == K, $sformatf("strength %0d: all loads retired", j));
      for (int r = 0; r < NREG; r++) begin
        arf_raddr = '{REG_AW'(r), REG_AW'(r)};
        #1;
        check(arf_rdata[0] === rarf[r] && arf_rdata[1] === rarf[r], $sformatf("strength %0d: r%0d", j, r));
      end
      check(!due_error[0] && n_phase2[0] == 0, $sformatf("strength %0d: phase 1 always enough", j));
      check(n_recovered[0] == n_rollbacks[0], $sformatf("strength %0d: every recovery completes", j));
      check(n_phantom >= K, $sformatf("strength %0d: mute loads are phantom requests (%0d)", j, n_phantom));
      check(n_sync == int'(n_rollbacks[0]), $sformatf("strength %0d: one synchronizing request per recovery", j));
      if (STR[j] == PH_NULL)   check(n_rollbacks[0] == K, $sformatf("null: %0d recoveries, expected %0d", n_rollbacks[0], K));
      if (STR[j] == PH_SHARED) check(n_rollbacks[0] == n_lines, $sformatf("shared: %0d recoveries, expected %0d", n_rollbacks[0], n_lines));
      if (STR[j] == PH_GLOBAL) check(n_rollbacks[0] == 0, $sformatf("global: %0d recoveries, expected 0", n_rollbacks[0]));
      $display("strength %s: %0d loads, %0d input-incoherence recoveries, %0d synchronizing requests, %0d cycles",
               STR[j].name(), K, n_rollbacks[0], n_sync, cycle);
      done[j] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done.and() == 1'b1);
    check(g_cfg[1].n_rollbacks[0] <= g_cfg[0].n_rollbacks[0], "shared needs no more recoveries than null");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

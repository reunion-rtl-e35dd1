// tb_check_stage: one check stage whose partner is played by the testbench: the
// partner's fingerprints are this stage's own, delayed by DELAY cycles (both cores
// run the same stream), except where the test corrupts one to force a mismatch.
// Checked against an independent model: every fingerprint sent (parity by stride,
// serial CRC), every group retired and its order, the accept-to-retire latency, the
// serializing rules (drain before, nothing younger until it retires), single-step
// intervals that close only at a load, the close-only cycle for a serializing group
// arriving with an interval open, halting on a mismatch and recovery after flush.
module tb_check_stage;
  import reunion_pkg::*;
  localparam int unsigned DELAY = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, single_step, grp_valid, grp_ready;
  group_t grp, ret_grp;
  logic fp_tx_valid, fp_rx_valid, cmp_valid, cmp_match, cmp_mismatch, halted;
  logic ret_valid, retiring, ser_stall;
  logic [FP_W-1:0] fp_tx, fp_rx;
  logic [31:0] ivl_closed, ivl_retired;
  int checks = 0, failures = 0, cycle = 0;

  check_stage dut (.*);

  always #5 clk = ~clk;

  // ---- the partner: a delay line with optional corruption ----
  logic            dl_v [1:DELAY];
  logic [FP_W-1:0] dl_d [1:DELAY];
  bit corrupt_next = 0;
  initial for (int i = 1; i <= DELAY; i++) begin dl_v[i] = 1'b0; dl_d[i] = '0; end
  always @(posedge clk) begin
    for (int i = DELAY; i > 1; i--) begin dl_v[i] <= dl_v[i-1] && !flush; dl_d[i] <= dl_d[i-1]; end
    dl_v[1] <= fp_tx_valid && !flush && rst_n;
    dl_d[1] <= fp_tx ^ ((corrupt_next && fp_tx_valid) ? 16'h0100 : 16'h0);
    if (fp_tx_valid && corrupt_next) corrupt_next <= 0;
  end
  assign fp_rx_valid = dl_v[DELAY];
  assign fp_rx       = dl_d[DELAY];

  // ---- reference model ----
  function automatic logic [15:0] par(logic [GROUP_FP_BITS-1:0] d);
    logic [15:0] r = '0;
    for (int j = 0; j < 16; j++) for (int i = j; i < GROUP_FP_BITS; i += 16) r[j] ^= d[i];
    return r;
  endfunction
  function automatic logic [15:0] crc(logic [15:0] c, logic [15:0] d);
    for (int i = 15; i >= 0; i--) begin
      logic top = c[15] ^ d[i];
      c = c << 1;
      if (top) c = c ^ 16'h1021;
    end
    return c;
  endfunction
  function automatic bit has(group_t g, int what);
    for (int i = 0; i < RETIRE_W; i++)
      if (g[i].valid && ((what == 0 && g[i].serializing) || (what == 1 && g[i].is_load))) return 1;
    return 0;
  endfunction

  group_t      acc_q [$];
  int          acc_t [$];
  logic [15:0] fp_q  [$];
  logic [15:0] run = 16'hFFFF;
  int open = 0, n_ser = 0, n_close_only = 0, n_mm = 0, n_ret = 0, n_fp = 0, n_step_ivl = 0;
  int lat_seen = 0;
  bit ser_in = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (flush) begin
      acc_q.delete(); acc_t.delete(); fp_q.delete(); run = 16'hFFFF; open = 0; ser_in = 0;
    end else begin
      // fingerprints leaving towards the partner
      if (fp_tx_valid) begin
        n_fp++;
        checks++;
        if (fp_q.size() == 0 || fp_tx !== fp_q[0]) begin
          failures++; $display("FAIL fp_tx %h exp %h @%0d", fp_tx, fp_q.size() ? fp_q[0] : 16'h0, cycle);
        end
        if (fp_q.size()) void'(fp_q.pop_front());
      end
      // retirement
      if (ret_valid) begin
        n_ret++;
        checks++;
        if (acc_q.size() == 0 || ret_grp !== acc_q[0]) begin
          failures++; $display("FAIL retired group out of order @%0d", cycle);
        end
        if (acc_q.size()) begin
          if (has(acc_q[0], 0)) ser_in = 0;
          void'(acc_q.pop_front());
          void'(acc_t.pop_front());
        end
      end
      if (cmp_mismatch) n_mm++;
      // groups entering
      if (grp_valid && grp_ready) begin
        if (has(grp, 0)) begin
          n_ser++;
          checks++;
          if (acc_q.size() != 0 || open != 0) begin failures++; $display("FAIL serializing entered undrained"); end
          ser_in = 1;
        end else begin
          checks++;
          if (ser_in) begin failures++; $display("FAIL younger group entered past a serializing one"); end
        end
        acc_q.push_back(grp); acc_t.push_back(cycle);
        run = crc(run, par(group_fp_bits(grp)));
        open++;
        if (!single_step || has(grp, 1) || has(grp, 0)) begin
          if (single_step) n_step_ivl++;
          fp_q.push_back(run); run = 16'hFFFF; open = 0;
        end
      end else if (grp_valid && has(grp, 0) && open != 0 && !halted && !ser_in) begin
        n_close_only++;
        fp_q.push_back(run); run = 16'hFFFF; open = 0;
      end
    end
  end

  // accept-to-retire latency of an isolated group: 4 cycles plus the partner delay
  int lat_acc = -1;
  always @(posedge clk) if (rst_n) begin
    if (grp_valid && grp_ready && acc_q.size() == 0 && !single_step) lat_acc = cycle;
    if (ret_valid && lat_acc >= 0 && acc_t.size() != 0 && acc_t[0] == lat_acc) begin
      lat_seen++;
      checks++;
      if (cycle - lat_acc != 4 + DELAY) begin
        failures++; $display("FAIL latency %0d exp %0d", cycle - lat_acc, 4 + DELAY);
      end
      lat_acc = -1;
    end
  end

  function automatic group_t rnd_group(int ser_pct, int load_pct);
    group_t g;
    int n = $urandom_range(1, RETIRE_W);
    for (int i = 0; i < RETIRE_W; i++) begin
      g[i].valid = (i < n);
      g[i].we = $urandom_range(1);
      g[i].rd = REG_AW'($urandom);
      g[i].value = {32'($urandom), 32'($urandom)};
      g[i].addr = {32'($urandom), 32'($urandom)};
      g[i].is_store = ($urandom_range(4) == 0);
      g[i].is_load = (i < n) && ($urandom_range(99) < load_pct);
      g[i].serializing = 1'b0;
    end
    if ($urandom_range(99) < ser_pct) g[0].serializing = 1'b1;
    return g;
  endfunction

  task automatic run_groups(int n, int ser_pct, int load_pct, int stall_pct);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (halted) break;
      if (grp_valid && !grp_ready) begin k--; continue; end
      if ($urandom_range(99) < stall_pct) begin grp_valid = 1'b0; k--; continue; end
      grp = rnd_group(ser_pct, load_pct);
      grp_valid = 1'b1;
      @(posedge clk);
      while (!grp_ready && !halted) @(posedge clk);
    end
    @(negedge clk); grp_valid = 1'b0;
  endtask

  task automatic drain();
    int k = 0;
    while ((acc_q.size() != 0 || fp_q.size() != 0) && k < 500) begin @(negedge clk); k++; end
    repeat (DELAY + 6) @(negedge clk);
  endtask

  initial begin
    flush = 0; single_step = 0; grp_valid = 0; grp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // isolated groups (latency), then streams with stalls and serializing groups
    repeat (5) begin run_groups(1, 0, 0, 0); drain(); end
    run_groups(400, 3, 10, 30);
    drain();
    checks++; if (acc_q.size() != 0 || retiring) begin failures++; $display("FAIL not drained"); end
    // single step: one interval up to the first load; then a serializing group with
    // an interval open (close-only cycle)
    single_step = 1;
    run_groups(3, 0, 0, 0);
    @(negedge clk); grp = rnd_group(0, 0); grp[0].is_load = 1'b1; grp_valid = 1'b1;
    @(posedge clk); while (!grp_ready) @(posedge clk);
    @(negedge clk); grp_valid = 1'b0;
    run_groups(2, 0, 0, 0);
    @(negedge clk); grp = rnd_group(0, 0); grp[0].serializing = 1'b1; grp_valid = 1'b1;
    @(posedge clk); while (!grp_ready) @(posedge clk);
    @(negedge clk); grp_valid = 1'b0;
    drain();
    single_step = 0;
    // mismatch: the partner's next fingerprint is corrupted
    corrupt_next = 1;
    run_groups(30, 0, 0, 0);
    repeat (DELAY + 10) @(negedge clk);
    checks++; if (!halted || n_mm != 1) begin failures++; $display("FAIL no halt on mismatch (mm=%0d)", n_mm); end
    begin
      automatic int n_before = n_ret;
      repeat (10) @(negedge clk);
      checks++; if (n_ret != n_before || grp_ready) begin failures++; $display("FAIL activity while halted %0d %0d %b", n_ret, n_before, grp_ready); end
    end
    flush = 1; @(negedge clk); flush = 0;
    checks++; if (halted || retiring) begin failures++; $display("FAIL flush did not clear"); end
    run_groups(100, 2, 10, 20);
    drain();
    checks++; if (n_ser < 5 || n_close_only < 1 || lat_seen < 5 || n_step_ivl < 2 || n_fp < 300) begin
      failures++;
      $display("FAIL coverage ser=%0d close_only=%0d lat=%0d step_ivl=%0d fp=%0d",
               n_ser, n_close_only, lat_seen, n_step_ivl, n_fp);
    end
    $display("ser=%0d close_only=%0d mismatches=%0d retired=%0d fps=%0d", n_ser, n_close_only, n_mm, n_ret, n_fp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_shared_cache_ctrl: directed scenarios for the Reunion L2 controller on a small
// L2 (4 sets, 2 ways), with behavioural private caches answering probes and a
// behavioural memory. Expected data are worked out from the memory's address
// function and the values the test writes. Covered: miss fill, exact hit latency,
// invalidation on a vocal write, global phantom reads that fetch the owner's dirty
// data without changing the directory, shared and null phantom strengths, mute
// writebacks dropped, the synchronizing request (waits for both cores, flushes every
// private copy, the mute's discarded, one reply to both in the same cycle, vocal
// becomes owner), vocal writebacks, and victim eviction with writeback to memory.
module tb_shared_cache_ctrl;
  import reunion_pkg::*;
  localparam int unsigned NP = 4, NC = 8, AW = 26, LW = 512, SETS = 4, WAYS = 2, HL = 35;
  logic clk = 1'b0, rst_n = 1'b0;
  phantom_e strength;
  logic ready;
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
  int checks = 0, failures = 0, cycle = 0;
  int n_phantom = 0, n_sync = 0, n_drop = 0, n_miss = 0;

  shared_cache_ctrl #(.N_PAIRS(NP), .AW(AW), .LINE_W(LW), .SETS(SETS), .WAYS(WAYS), .HIT_LAT(HL)) dut (.*);
  mem_model #(.AW(AW), .LINE_W(LW), .LAT(20)) u_mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (ev_phantom) n_phantom++;
    if (ev_sync) n_sync++;
    if (ev_mute_drop) n_drop++;
    if (ev_miss) n_miss++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0d", what, cycle); end
  endtask

  // ---- private caches: what each core holds (0 absent, 1 shared, 2 modified) ----
  int                unsigned l1_state [NC][logic [AW-1:0]];
  logic [LW-1:0]     l1_data  [NC][logic [AW-1:0]];
  probe_e            prb_log_t [$];
  int                prb_log_c [$];

  initial begin prb_ack = 0; prb_dirty = 0; prb_data = '0; end
  always @(posedge clk) begin
    if (prb_valid && !prb_ack) begin
      automatic int c = prb_core;
      automatic logic [AW-1:0] a = prb_addr;
      automatic int st = l1_state[c].exists(a) ? l1_state[c][a] : 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      prb_log_t.push_back(prb_type); prb_log_c.push_back(c);
      prb_dirty <= (st == 2) || (c % 2 == 1);          // mutes return garbage
      prb_data  <= (c % 2 == 1) ? {16{32'hDEAD_BEEF}} : (l1_data[c].exists(a) ? l1_data[c][a] : '0);
      prb_ack   <= 1'b1;
      if (prb_type == PROBE_INV) l1_state[c][a] = 0;
      else if (prb_type == PROBE_DOWN && st == 2) l1_state[c][a] = 1;
      @(posedge clk);
      prb_ack <= 1'b0; prb_dirty <= 1'b0;
    end
  end

  // ---- requests ----
  logic [LW-1:0] got [NC];
  logic          got_excl [NC];
  int            got_lat [NC], got_at [NC];

  task automatic req(input int c, input req_e t, input logic [AW-1:0] a, input logic [LW-1:0] d = '0);
    int t0;
    @(negedge clk);
    req_valid[c] = 1'b1; req_type[c] = t; req_addr[c] = a; req_data[c] = d;
    @(posedge clk); while (!req_ready[c]) @(posedge clk);
    t0 = cycle;
    @(negedge clk); req_valid[c] = 1'b0;
    if (t == REQ_WB || t == REQ_EVICT) begin
      if (t == REQ_WB && c % 2 == 0) l1_state[c][a] = 0;
      if (t == REQ_EVICT) l1_state[c][a] = 0;
      repeat (3) @(negedge clk);
      return;
    end
    while (!rsp_valid[c]) @(negedge clk);
    got[c] = rsp_data; got_excl[c] = rsp_excl; got_at[c] = cycle; got_lat[c] = cycle - t0;
    if (c % 2 == 0) begin
      l1_state[c][a] = rsp_excl ? 2 : 1;
      l1_data[c][a]  = rsp_data;
    end
  endtask

  function automatic logic [LW-1:0] mline(logic [AW-1:0] a);
    return u_mem.init_line(a);
  endfunction

  localparam logic [AW-1:0] A = 26'h100, B = 26'h205, C = 26'h300, D = 26'h400, E = 26'h500;
  logic [LW-1:0] V1, V2, V3;

  initial begin
    strength = PH_GLOBAL;
    req_valid = '0; req_type = '0; req_addr = '0; req_data = '0;
    V1 = {16{32'h1111_0001}}; V2 = {16{32'h2222_0002}}; V3 = {16{32'h3333_0003}};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!ready) @(posedge clk);

    // 1. miss, fill from memory
    req(0, REQ_READ, A);
    check(got[0] == mline(A) && !got_excl[0], "miss returns memory data, shared");
    check(got_lat[0] > HL + 20, "miss costs memory plus L2 latency");
    // 2. hit latency
    req(4, REQ_READ, A);
    check(got[4] == mline(A), "hit data");
    check(got_lat[4] == HL, $sformatf("hit latency %0d", got_lat[4]));
    // 3. vocal write invalidates the other sharers
    prb_log_t.delete(); prb_log_c.delete();
    req(2, REQ_WRITE, A);
    check(got_excl[2] && got[2] == mline(A), "write grants ownership");
    check(prb_log_c.size() == 2 && prb_log_t[0] == PROBE_INV && prb_log_t[1] == PROBE_INV &&
          (l1_state[0][A] == 0) && (l1_state[4][A] == 0), "sharers 0 and 4 invalidated");
    l1_data[2][A] = V1;                               // core 2 writes privately
    // 4. global phantom read: owner's dirty data, no state change
    prb_log_t.delete(); prb_log_c.delete();
    req(1, REQ_READ, A);
    check(got[1] == V1 && got_excl[1], "global phantom sees owner's dirty data, write permission");
    check(prb_log_c.size() == 1 && prb_log_t[0] == PROBE_PEEK && prb_log_c[0] == 2, "peek at the owner");
    check(l1_state[2][A] == 2, "owner untouched by phantom");
    // the directory still names core 2 the owner: a vocal read downgrades it
    prb_log_t.delete(); prb_log_c.delete();
    req(4, REQ_READ, A);
    check(got[4] == V1 && prb_log_c.size() == 1 && prb_log_t[0] == PROBE_DOWN && prb_log_c[0] == 2,
          "vocal read downgrades owner");
    // 5. shared and null strengths
    req(2, REQ_WRITE, B);
    l1_data[2][B] = V2;
    strength = PH_SHARED;
    req(3, REQ_READ, B);
    check(got[3] == mline(B), "shared phantom reads L2, not the owner");
    req(3, REQ_READ, D);
    check(got[3] == '0, "shared phantom miss gives arbitrary (zero) data");
    strength = PH_NULL;
    req(3, REQ_READ, A);
    check(got[3] == '0 && got_excl[3], "null phantom");
    strength = PH_GLOBAL;
    begin
      automatic int r0 = n_reads;
      req(5, REQ_READ, E);
      check(got[5] == mline(E) && n_reads == r0 + 1, "global phantom miss reads memory");
    end
    // 6. mute writeback dropped
    req(1, REQ_WB, A, {16{32'hBAD0_BAD0}});
    check(n_drop == 1, "mute writeback dropped");
    req(6, REQ_READ, A);
    check(got[6] == V1, "mute data never reached L2");
    // 7. synchronizing request
    prb_log_t.delete(); prb_log_c.delete();
    fork
      req(0, REQ_SYNC, A);
      begin repeat (20) @(negedge clk); check(rsp_valid == '0 && n_sync == 0, "sync waits for the partner"); req(1, REQ_SYNC, A); end
    join
    check(got_at[0] == got_at[1] && got[0] == got[1] && got[0] == V1 && got_excl[0] && got_excl[1],
          "sync: one coherent reply to both in the same cycle");
    check(l1_state[4][A] == 0 && l1_state[6][A] == 0 && l1_state[2][A] == 0, "sync flushed vocal copies");
    begin
      automatic bit mute_inv = 0;
      foreach (prb_log_c[i]) if (prb_log_c[i] == 1 && prb_log_t[i] == PROBE_INV) mute_inv = 1;
      check(mute_inv, "sync flushed the mute copy");
    end
    check(n_sync == 1, "one sync event");
    // 8. vocal writeback, then another core reads it
    req(0, REQ_WB, A, V3);
    req(4, REQ_READ, A);
    check(got[4] == V3, "vocal writeback visible");
    // 9. eviction: A, C and 26'h104 share set 0 of a 2-way L2
    begin
      automatic int w0 = n_writes;
      automatic logic [AW-1:0] F = 26'h104;
      req(0, REQ_READ, C);
      req(0, REQ_READ, F);
      check(n_writes > w0, "dirty victim written back");
      check(u_mem.peek(A) == V3, "victim data in memory");
      req(6, REQ_READ, A);
      check(got[6] == V3, "refetch of victim");
    end
    check(n_phantom == 5 && n_miss >= 5, $sformatf("events phantom=%0d miss=%0d", n_phantom, n_miss));
    $display("phantom=%0d sync=%0d drops=%0d misses=%0d mem r/w=%0d/%0d", n_phantom, n_sync, n_drop, n_miss, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

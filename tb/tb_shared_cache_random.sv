// tb_shared_cache_random: random coherence test of the Reunion L2 controller.
//
// Eight cores (four pairs) issue random requests at the same time to 12 lines that
// map onto a small L2 (4 sets x 2 ways), so hits, misses, victim evictions, probes
// and races between them all happen. The four vocals behave as write-back L1s with
// MSI states: READ when the line is absent, WRITE (then store a new value) when it is
// not modified, WB of a modified line, EVICT of a shared one; they answer probes from
// their own state and data. The four mutes send READ and WRITE (phantom requests,
// global strength) and WB/EVICT carrying garbage.
//
// The testbench keeps the coherent image of memory: a line's value is the one the
// vocal that last wrote it stored, or the memory model's initial contents. Checked:
//  * every vocal READ and WRITE reply carries the image's value, with write
//    permission exactly for WRITE;
//  * every mute phantom reply carries the image's value too (global phantoms see
//    dirty data in a vocal L1);
//  * no mute garbage is ever written to memory;
//  * after the run, with the vocals' modified lines written back, a vocal reads every
//    line and gets the image's value.
// The vocal/mute rules are the document's; the MSI-style L1 model, the request mix
// and the sizes are this testbench's.
module tb_shared_cache_random;
  import reunion_pkg::*;
  localparam int unsigned NP = 4, NC = 8, AW = 26, LW = 512, SETS = 4, WAYS = 2, HL = 35;
  localparam int NLINES = 12, OPS = 150;
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
  int n_miss = 0, n_drop = 0, n_phantom = 0, n_probe = 0, n_done = 0;

  shared_cache_ctrl #(.N_PAIRS(NP), .AW(AW), .LINE_W(LW), .SETS(SETS), .WAYS(WAYS), .HIT_LAT(HL)) dut (.*);
  mem_model #(.AW(AW), .LINE_W(LW), .LAT(20)) u_mem (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0d", what, cycle); end
  endtask

  function automatic logic [AW-1:0] line_addr(int k);
    return AW'(26'h40 + k);                 // 12 consecutive lines over 4 sets
  endfunction

  // coherent image and vocal L1 state (0 invalid, 1 shared, 2 modified)
  logic [LW-1:0] img [logic [AW-1:0]];
  int unsigned   l1_state [NC][logic [AW-1:0]];
  logic [LW-1:0] l1_data  [NC][logic [AW-1:0]];

  function automatic logic [LW-1:0] image(logic [AW-1:0] a);
    return img.exists(a) ? img[a] : u_mem.init_line(a);
  endfunction
  function automatic int unsigned st(int c, logic [AW-1:0] a);
    return l1_state[c].exists(a) ? l1_state[c][a] : 0;
  endfunction
  function automatic logic [LW-1:0] garbage(int c);
    return {16{32'hBAD0_0000 | 32'(c)}};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (ev_miss) n_miss++;
    if (ev_mute_drop) n_drop++;
    if (ev_phantom) n_phantom++;
    if (mem_req_valid && mem_req_ready && mem_req_we) begin
      checks++;
      for (int c = 1; c < NC; c += 2)
        if (mem_req_data == garbage(c)) begin
          failures++; $display("FAIL mute %0d data written to memory @%0d", c, cycle);
        end
    end
  end

  // probes, answered by the vocal L1 models
  initial begin prb_ack = 0; prb_dirty = 0; prb_data = '0; end
  always @(posedge clk) begin
    if (prb_valid && !prb_ack) begin
      automatic int c = prb_core;
      automatic logic [AW-1:0] a = prb_addr;
      automatic int unsigned s = st(c, a);
      check(c % 2 == 0, "only vocals are probed outside synchronizing requests");
      n_probe++;
      prb_dirty <= (s == 2);
      prb_data  <= l1_data[c].exists(a) ? l1_data[c][a] : '0;
      prb_ack   <= 1'b1;
      if (prb_type == PROBE_INV) l1_state[c][a] = 0;
      else if (prb_type == PROBE_DOWN && s == 2) l1_state[c][a] = 1;
      @(posedge clk);
      prb_ack <= 1'b0; prb_dirty <= 1'b0;
    end
  end

  // one request; for READ/WRITE returns the reply
  task automatic req(input int c, input req_e t, input logic [AW-1:0] a, input logic [LW-1:0] d,
                     output logic [LW-1:0] r, output logic x);
    @(negedge clk);
    req_valid[c] = 1'b1; req_type[c] = t; req_addr[c] = a; req_data[c] = d;
    @(posedge clk); while (!req_ready[c]) @(posedge clk);
    @(negedge clk); req_valid[c] = 1'b0;
    if (t == REQ_WB || t == REQ_EVICT) return;
    while (!rsp_valid[c]) @(negedge clk);
    r = rsp_data; x = rsp_excl;
  endtask

  for (genvar c = 0; c < NC; c++) begin : g_core
    initial begin
      logic [LW-1:0] r, v;
      logic x;
      int unsigned s;
      req_valid[c] = 1'b0; req_type[c] = REQ_READ; req_addr[c] = '0; req_data[c] = '0;
      wait (rst_n && ready);
      repeat (c) @(negedge clk);
      for (int n = 0; n < OPS; n++) begin
        automatic logic [AW-1:0] a = line_addr($urandom_range(NLINES - 1));
        automatic int pick = $urandom_range(99);
        repeat ($urandom_range(0, 5)) @(negedge clk);
        s = st(c, a);
        if (c % 2 == 1) begin
          if (pick < 40)      begin req(c, REQ_READ,  a, '0, r, x); check(r == image(a), $sformatf("mute %0d phantom read %h", c, a)); end
          else if (pick < 70) begin req(c, REQ_WRITE, a, '0, r, x); check(r == image(a), $sformatf("mute %0d phantom write %h", c, a)); end
          else if (pick < 90) req(c, REQ_WB, a, garbage(c), r, x);
          else                req(c, REQ_EVICT, a, '0, r, x);
        end else if (s == 0 && pick < 50) begin
          req(c, REQ_READ, a, '0, r, x);
          check(r == image(a) && !x, $sformatf("vocal %0d read %h", c, a));
          l1_state[c][a] = 1; l1_data[c][a] = r;
        end else if (s != 2 && pick < 80) begin
          req(c, REQ_WRITE, a, '0, r, x);
          check(r == image(a) && x, $sformatf("vocal %0d write %h", c, a));
          v = {16{32'(c) << 24 | 32'(n) << 12 | 32'(a)}};
          l1_state[c][a] = 2; l1_data[c][a] = v; img[a] = v;   // the store
        end else if (s == 2) begin
          req(c, REQ_WB, a, l1_data[c][a], r, x);
          l1_state[c][a] = 0;
        end else if (s == 1) begin
          req(c, REQ_EVICT, a, '0, r, x);
          l1_state[c][a] = 0;
        end
      end
      // write back whatever is still modified
      for (int k = 0; k < NLINES; k++)
        if (c % 2 == 0 && st(c, line_addr(k)) == 2) begin
          req(c, REQ_WB, line_addr(k), l1_data[c][line_addr(k)], r, x);
          l1_state[c][line_addr(k)] = 0;
        end
      n_done++;
    end
  end

  initial begin
    logic [LW-1:0] r;
    logic x;
    strength = PH_GLOBAL;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_done == NC);
    repeat (50) @(negedge clk);
    for (int k = 0; k < NLINES; k++) begin
      req(0, REQ_READ, line_addr(k), '0, r, x);
      check(r == image(line_addr(k)), $sformatf("final read of line %h", line_addr(k)));
      req(0, REQ_EVICT, line_addr(k), '0, r, x);
    end
    check(n_miss > 20 && n_probe > 20 && n_drop > 20 && n_phantom > 100 && n_writes > 0,
          $sformatf("traffic: %0d misses, %0d probes, %0d mute drops, %0d phantoms, %0d memory writes",
                    n_miss, n_probe, n_drop, n_phantom, n_writes));
    $display("misses=%0d probes=%0d mute_drops=%0d phantoms=%0d mem_writes=%0d cycles=%0d",
             n_miss, n_probe, n_drop, n_phantom, n_writes, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

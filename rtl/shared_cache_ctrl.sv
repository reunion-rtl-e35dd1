// shared_cache_ctrl: shared L2 cache and its controller, extended with the vocal/mute
// semantics of redundant logical processor pairs.
//
// Cores 2p (vocal) and 2p+1 (mute) form logical pair p. The controller keeps an
// inclusive, set-associative L2 with a directory entry per line: sharers and an
// exclusive owner, both recorded per pair and meaning the pair's vocal L1 only. Mute
// caches never appear in the directory, so the coherence protocol runs as if the mute
// cores were absent. Requests are served one at a time:
//
//  * vocal READ / WRITE: ordinary MSI-style coherence. A READ downgrades a foreign
//    owner (PROBE_DOWN); a WRITE invalidates all other copies (PROBE_INV). Misses
//    evict a victim (invalidating its private copies, writing it back if dirty) and
//    fill from memory. Vocal WB writes the line into L2 if that vocal still owns it
//    (a stale writeback is ignored); EVICT drops the sharer bit.
//  * mute READ / WRITE become phantom requests: the reply grants write permission
//    in the mute hierarchy but nothing in the directory or L2 changes. Its strength
//    (input `strength`) is PH_NULL (arbitrary data, here zeros), PH_SHARED (L2 data
//    on a hit, zeros on a miss) or PH_GLOBAL (a dirty copy in the owning vocal L1 is
//    read with PROBE_PEEK; an L2 miss reads memory without allocating).
//  * mute WB / EVICT are accepted and dropped, so mute values never leave the pair.
//  * REQ_SYNC: accepted only when both cores of a pair have it pending (the vocal's
//    address is used). All private copies are flushed, the vocal's dirty data going
//    to L2 and the mute's discarded; the pair's vocal becomes the exclusive owner (a
//    coherent write transaction), and both cores are answered in the same cycle.
//
// Replies come on rsp_valid (one-cycle pulse, no back-pressure) no earlier than
// HIT_LAT cycles after the request was accepted (req_valid && req_ready). Probes use
// prb_valid ... prb_ack; memory uses mem_req_valid/mem_req_ready and mem_rsp_valid.
// WB and EVICT get no reply. After reset the directory is cleared one set per cycle
// (`ready` rises when done).
//
// From the document: the vocal/mute rules, ignoring mute evictions and writebacks,
// phantom requests and their three strengths, the paired synchronizing request with
// its flush and atomic reply, and the L2 size, associativity, line size and hit
// latency. This design's choices: one request at a time (the document's four banks
// are not modelled as independent), the MSI directory, round-robin arbitration,
// victim choice (an invalid way, else a global round-robin way), zeros as the
// "arbitrary" data and no allocation on phantom misses.
module shared_cache_ctrl
  import reunion_pkg::*;
#(
  parameter int unsigned N_PAIRS = 4,        // logical processor pairs
  parameter int unsigned AW      = 26,       // line address bits (3 GB, 64-byte lines)
  parameter int unsigned LINE_W  = 512,      // 64-byte lines
  parameter int unsigned SETS    = 32768,    // 16 MB / 64 B / 8 ways
  parameter int unsigned WAYS    = 8,
  parameter int unsigned HIT_LAT = 35        // cycles, L2 hit
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  phantom_e                          strength,
  output logic                              ready,
  // one request / reply port per core
  input  logic     [2*N_PAIRS-1:0]          req_valid,
  input  req_e     [2*N_PAIRS-1:0]          req_type,
  input  logic     [2*N_PAIRS-1:0][AW-1:0]  req_addr,
  input  logic     [2*N_PAIRS-1:0][LINE_W-1:0] req_data,
  output logic     [2*N_PAIRS-1:0]          req_ready,
  output logic     [2*N_PAIRS-1:0]          rsp_valid,
  output logic     [LINE_W-1:0]             rsp_data,
  output logic                              rsp_excl,
  // probes to private caches
  output logic                              prb_valid,
  output logic     [$clog2(2*N_PAIRS)-1:0]  prb_core,
  output probe_e                            prb_type,
  output logic     [AW-1:0]                 prb_addr,
  input  logic                              prb_ack,
  input  logic                              prb_dirty,
  input  logic     [LINE_W-1:0]             prb_data,
  // memory
  output logic                              mem_req_valid,
  output logic                              mem_req_we,
  output logic     [AW-1:0]                 mem_req_addr,
  output logic     [LINE_W-1:0]             mem_req_data,
  input  logic                              mem_req_ready,
  input  logic                              mem_rsp_valid,
  input  logic     [LINE_W-1:0]             mem_rsp_data,
  // event pulses
  output logic                              ev_phantom,
  output logic                              ev_sync,
  output logic                              ev_mute_drop,
  output logic                              ev_miss
);
  localparam int unsigned NC    = 2 * N_PAIRS;
  localparam int unsigned CW    = $clog2(NC);
  localparam int unsigned PW    = (N_PAIRS > 1) ? $clog2(N_PAIRS) : 1;
  localparam int unsigned SW    = $clog2(SETS);
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TW    = AW - SW;

  typedef struct packed {
    logic               valid;
    logic               dirty;
    logic [TW-1:0]      tag;
    logic [N_PAIRS-1:0] sharers;
    logic               own_v;
    logic [PW-1:0]      own;
  } dir_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_VICTIM_WB, S_FILL_REQ, S_FILL_WAIT,
    S_COHERE, S_PROBE, S_GRANT, S_REPLY
  } state_e;

  // Directory: one word per set holding all ways; data: one line per set and way.
  dir_t [WAYS-1:0]   dir_mem  [SETS];
  logic [LINE_W-1:0] data_mem [SETS*WAYS];
  dir_t [WAYS-1:0]   set_rd;       // the directory word of the current set
  logic [LINE_W-1:0] line_rd;      // the data line of the looked-up way

  state_e      state, after_probe;
  logic [SW-1:0] init_idx;
  logic [CW-1:0] rr, cur;
  req_e        cur_type;
  logic [AW-1:0] cur_addr;
  logic [LINE_W-1:0] cur_data;
  logic        cur_mute;
  logic [PW-1:0] cur_pair;
  logic [WW-1:0] way_q, repl, rr_way;
  dir_t        ent_q;
  logic [LINE_W-1:0] line_q, rsp_line;
  logic        rsp_excl_q, rsp_both;
  logic [N_PAIRS-1:0] prb_mask;
  logic        prb_mute;        // also flush the mute copy (synchronizing request)
  probe_e      prb_kind;
  logic [AW-1:0] prb_addr_q;
  logic        fill_alloc;      // fill installs into L2 (vocal) or not (phantom)
  logic [15:0] lat;

  logic [SW-1:0] cur_set;
  logic [TW-1:0] cur_tag;
  assign cur_set = cur_addr[SW-1:0];
  assign cur_tag = cur_addr[AW-1:SW];

  // ---------------- arbitration ----------------
  logic          pick_v;
  logic [CW-1:0] pick;
  always_comb begin
    pick_v = 1'b0; pick = '0;
    for (int k = 0; k < NC; k++) begin
      automatic logic [CW-1:0] c = CW'((32'(rr) + k) % NC);
      automatic logic elig = req_valid[c] &&
          ((req_type[c] != REQ_SYNC) ||
           (!c[0] && req_valid[c | CW'(1)] && req_type[c | CW'(1)] == REQ_SYNC));
      if (!pick_v && elig) begin
        pick_v = 1'b1; pick = c;
      end
    end
  end

  always_comb begin
    req_ready = '0;
    if (state == S_IDLE && pick_v) begin
      req_ready[pick] = 1'b1;
      if (req_type[pick] == REQ_SYNC) req_ready[pick | CW'(1)] = 1'b1;
    end
  end

  // ---------------- lookup ----------------
  logic          hit;
  logic [WW-1:0] hit_way, free_way;
  logic          free_v;
  assign set_rd  = dir_mem[cur_set];
  assign line_rd = data_mem[{cur_set, hit ? hit_way : repl}];
  always_comb begin
    hit = 1'b0; hit_way = '0; free_v = 1'b0; free_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (set_rd[w].valid && set_rd[w].tag == cur_tag && !hit) begin
        hit = 1'b1; hit_way = WW'(w);
      end
      if (!set_rd[w].valid && !free_v) begin
        free_v = 1'b1; free_way = WW'(w);
      end
    end
  end
  assign repl = free_v ? free_way : rr_way;

  // ---------------- probe selection ----------------
  logic          prb_pick_v;
  logic [PW-1:0] prb_pick;
  always_comb begin
    prb_pick_v = 1'b0; prb_pick = '0;
    for (int p = 0; p < N_PAIRS; p++)
      if (prb_mask[p] && !prb_pick_v) begin
        prb_pick_v = 1'b1; prb_pick = PW'(p);
      end
  end

  assign prb_valid = (state == S_PROBE) && (prb_pick_v || prb_mute);
  assign prb_type  = prb_kind;
  assign prb_addr  = prb_addr_q;
  assign prb_core  = prb_pick_v ? CW'({prb_pick, 1'b0}) : CW'({cur_pair, 1'b1});

  assign mem_req_valid = (state == S_VICTIM_WB) || (state == S_FILL_REQ);
  assign mem_req_we    = (state == S_VICTIM_WB);
  assign mem_req_addr  = (state == S_VICTIM_WB) ? {ent_q.tag, cur_set} : cur_addr;
  assign mem_req_data  = line_q;

  assign rsp_data = rsp_line;
  assign rsp_excl = rsp_excl_q;
  always_comb begin
    rsp_valid = '0;
    if (state == S_REPLY && 32'(lat) + 1 >= HIT_LAT) begin
      rsp_valid[cur] = 1'b1;
      if (rsp_both) rsp_valid[cur | CW'(1)] = 1'b1;
    end
  end
  assign ready = (state != S_INIT);

  logic [N_PAIRS-1:0] req_bit;
  assign req_bit = N_PAIRS'(1) << cur_pair;

  // New directory entry and line for the request being granted.
  dir_t              grant_e;
  logic [LINE_W-1:0] grant_l;
  dir_t [WAYS-1:0]   grant_set;
  always_comb begin
    grant_e = ent_q;
    grant_l = line_q;
    unique case (cur_type)
      REQ_READ: begin
        grant_e.sharers = grant_e.sharers | req_bit; grant_e.own_v = 1'b0;
      end
      REQ_WRITE, REQ_SYNC: begin
        grant_e.sharers = '0; grant_e.own_v = 1'b1; grant_e.own = cur_pair;
      end
      REQ_WB: begin
        // only the owner's data is taken: a writeback that lost a race with a
        // probe (the line was taken away before it arrived) is stale
        grant_e.sharers = grant_e.sharers & ~req_bit;
        if (grant_e.own_v && grant_e.own == cur_pair) begin
          grant_l = cur_data; grant_e.dirty = 1'b1; grant_e.own_v = 1'b0;
        end
      end
      default: begin  // REQ_EVICT
        grant_e.sharers = grant_e.sharers & ~req_bit;
        if (grant_e.own_v && grant_e.own == cur_pair) grant_e.own_v = 1'b0;
      end
    endcase
    grant_set = set_rd;
    grant_set[way_q] = grant_e;
  end

  // Array writes: clearing after reset, and the granted line.
  always_ff @(posedge clk) begin
    if (state == S_INIT) dir_mem[init_idx] <= '0;
    else if (state == S_GRANT) begin
      dir_mem[cur_set]           <= grant_set;
      data_mem[{cur_set, way_q}] <= grant_l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; init_idx <= '0; rr <= '0; rr_way <= '0; cur <= '0;
      cur_type <= REQ_READ; cur_addr <= '0; cur_data <= '0; cur_mute <= 1'b0;
      cur_pair <= '0; way_q <= '0; ent_q <= '0; line_q <= '0; rsp_line <= '0;
      rsp_excl_q <= 1'b0; rsp_both <= 1'b0; prb_mask <= '0; prb_mute <= 1'b0;
      prb_kind <= PROBE_INV; prb_addr_q <= '0; fill_alloc <= 1'b0; lat <= '0;
      after_probe <= S_GRANT;
      ev_phantom <= 1'b0; ev_sync <= 1'b0; ev_mute_drop <= 1'b0; ev_miss <= 1'b0;
    end else begin
      ev_phantom <= 1'b0; ev_sync <= 1'b0; ev_mute_drop <= 1'b0; ev_miss <= 1'b0;
      if (lat != 16'hFFFF) lat <= lat + 1'b1;
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (32'(init_idx) == SETS - 1) state <= S_IDLE;
        end

        S_IDLE: if (pick_v) begin
          cur      <= pick;
          cur_type <= req_type[pick];
          cur_addr <= req_addr[pick];
          cur_data <= req_data[pick];
          cur_mute <= pick[0];
          cur_pair <= PW'(pick >> 1);
          rr       <= CW'((32'(pick) + 1) % NC);
          lat      <= '0;
          rsp_both <= (req_type[pick] == REQ_SYNC);
          if (pick[0] && (req_type[pick] == REQ_WB || req_type[pick] == REQ_EVICT)) begin
            ev_mute_drop <= 1'b1;                      // mute values never leave
          end else if (pick[0] && strength == PH_NULL) begin
            ev_phantom <= 1'b1;
            rsp_line <= '0; rsp_excl_q <= 1'b1; state <= S_REPLY;
          end else begin
            state <= S_LOOKUP;
          end
          if (req_type[pick] == REQ_SYNC) ev_sync <= 1'b1;
        end

        S_LOOKUP: begin
          way_q  <= hit ? hit_way : repl;
          ent_q  <= set_rd[hit ? hit_way : repl];
          line_q <= line_rd;
          if (cur_mute) begin
            // phantom request: no coherence state changes anywhere
            ev_phantom <= 1'b1;
            rsp_excl_q <= 1'b1;
            if (hit) begin
              rsp_line <= line_rd;
              if (strength == PH_GLOBAL && set_rd[hit_way].own_v) begin
                prb_mask    <= N_PAIRS'(1) << set_rd[hit_way].own;
                prb_mute    <= 1'b0;
                prb_kind    <= PROBE_PEEK;
                prb_addr_q  <= cur_addr;
                after_probe <= S_REPLY;
                state       <= S_PROBE;
              end else state <= S_REPLY;
            end else if (strength == PH_GLOBAL) begin
              fill_alloc <= 1'b0; state <= S_FILL_REQ;
            end else begin
              rsp_line <= '0; state <= S_REPLY;
            end
          end else if (cur_type == REQ_WB || cur_type == REQ_EVICT) begin
            if (hit) begin
              ent_q <= set_rd[hit_way];
              state <= S_GRANT;
            end else state <= S_IDLE;
          end else if (hit) begin
            state <= S_COHERE;
          end else begin
            // miss: free the victim way (inclusion), then fill
            ev_miss    <= 1'b1;
            fill_alloc <= 1'b1;
            rr_way     <= free_v ? rr_way : rr_way + 1'b1;
            prb_mask   <= set_rd[repl].valid ?
                          (set_rd[repl].sharers |
                           (set_rd[repl].own_v ? N_PAIRS'(1) << set_rd[repl].own : '0)) : '0;
            prb_mute   <= 1'b0;
            prb_kind   <= PROBE_INV;
            prb_addr_q <= {set_rd[repl].tag, cur_set};
            after_probe <= S_VICTIM_WB;
            state      <= S_PROBE;
          end
        end

        S_PROBE: begin
          if (!prb_pick_v && !prb_mute) begin
            if (after_probe == S_VICTIM_WB && !(ent_q.valid && ent_q.dirty)) state <= S_FILL_REQ;
            else state <= after_probe;
          end else if (prb_ack) begin
            if (prb_pick_v) begin
              prb_mask[prb_pick] <= 1'b0;
              if (prb_kind == PROBE_PEEK) begin
                if (prb_dirty) rsp_line <= prb_data;
              end else begin
                if (prb_dirty) begin
                  line_q <= prb_data; ent_q.dirty <= 1'b1;
                end
                if (prb_kind == PROBE_INV) ent_q.sharers[prb_pick] <= 1'b0;
                else                       ent_q.sharers[prb_pick] <= 1'b1;
                if (ent_q.own_v && ent_q.own == prb_pick) ent_q.own_v <= 1'b0;
              end
            end else begin
              prb_mute <= 1'b0;        // the mute's copy is discarded
            end
          end
        end

        S_VICTIM_WB: if (mem_req_ready) state <= S_FILL_REQ;

        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;

        S_FILL_WAIT: if (mem_rsp_valid) begin
          lat <= '0;                  // the L2 access proper starts with the fill
          if (fill_alloc) begin
            line_q <= mem_rsp_data;
            ent_q  <= '{valid: 1'b1, dirty: 1'b0, tag: cur_tag, sharers: '0, own_v: 1'b0, own: '0};
            state  <= S_COHERE;
          end else begin
            rsp_line <= mem_rsp_data;
            state    <= S_REPLY;
          end
        end

        S_COHERE: begin
          prb_addr_q  <= cur_addr;
          after_probe <= S_GRANT;
          state       <= S_PROBE;
          prb_mute    <= 1'b0;
          unique case (cur_type)
            REQ_READ: begin
              prb_kind <= PROBE_DOWN;
              prb_mask <= (ent_q.own_v && ent_q.own != cur_pair) ? N_PAIRS'(1) << ent_q.own : '0;
            end
            REQ_WRITE: begin
              prb_kind <= PROBE_INV;
              prb_mask <= (ent_q.sharers | (ent_q.own_v ? N_PAIRS'(1) << ent_q.own : '0)) & ~req_bit;
            end
            default: begin  // REQ_SYNC: flush every private copy, the pair's included
              prb_kind <= PROBE_INV;
              prb_mask <= ent_q.sharers | (ent_q.own_v ? N_PAIRS'(1) << ent_q.own : '0);
              prb_mute <= 1'b1;
            end
          endcase
        end

        S_GRANT: begin
          rsp_line   <= grant_l;
          rsp_excl_q <= (cur_type != REQ_READ);
          state      <= (cur_type == REQ_WB || cur_type == REQ_EVICT) ? S_IDLE : S_REPLY;
        end

        S_REPLY: if (32'(lat) + 1 >= HIT_LAT) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

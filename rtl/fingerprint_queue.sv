// fingerprint_queue: FIFO of outstanding fingerprints.
//
// Each check stage keeps one queue of its own fingerprints and one of the partner's,
// so that fingerprints of several intervals can be in flight while the comparison
// latency elapses. Plain synchronous FIFO: push when `push` and not full, pop when
// `pop` and not empty, both in the same cycle allowed; the head is visible on `dout`
// while `!empty` (first-word fall-through). `flush` empties it (rollback). The queues
// themselves follow the document; their depth is not given. The default of 64
// matches the result buffer (at most one interval per buffered group), so that the
// queues never throttle the check stage even at a 40-cycle comparison latency.
module fingerprint_queue #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push && !flush) mem[wp] <= din;
endmodule

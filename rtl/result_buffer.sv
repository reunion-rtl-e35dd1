// result_buffer: circular buffer that holds retire groups while they are in check.
//
// Groups enter in program order when the check stage accepts them and leave in the
// same order when their fingerprint interval has compared equal; only then are their
// results written to the architectural register file and their stores released.
// `flush` discards everything (rollback: the uncompared instructions are squashed).
// Write at the tail, read the head combinationally (dout valid while !empty). The
// document names a circular buffer for this purpose; the depth is not given and is
// this design's choice: 64 groups of four, as many instructions as the 256-entry
// instruction window can hold, so that the buffer never limits retirement.
module result_buffer #(
  parameter type         T     = reunion_pkg::group_t,
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T              mem [DEPTH];
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

// fingerprint_gen: two-stage fingerprint generator of the check stage.
//
// Cycle 1: the M bits of a retire group go through the parity trees
// (parity_compactor) into a pipeline register. Cycle 2: the N-bit result is folded
// into a parallel CRC (crc_misr). When the group that closes a fingerprint interval
// reaches the CRC, the signature including it is presented on fp/fp_valid for one
// cycle, together with the tag that entered with `close`, and the CRC restarts from
// its seed for the next interval. So a fingerprint appears two cycles after the last
// group of its interval was presented. `close` may come without data (in_valid low):
// the open interval then ends with what it already holds. `flush` discards the open
// interval and anything in the pipeline (rollback). The two stages and their one-cycle
// spacing follow the document; the tag side channel is this design's own.
module fingerprint_gen #(
  parameter int unsigned M     = 536,
  parameter int unsigned N     = 16,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             in_valid,
  input  logic [M-1:0]     in_data,
  input  logic             close,
  input  logic [TAG_W-1:0] close_tag,
  output logic             fp_valid,
  output logic [N-1:0]     fp,
  output logic [TAG_W-1:0] fp_tag
);
  logic [N-1:0]     par, par_q;
  logic             v_q, close_q;
  logic [TAG_W-1:0] tag_q;
  logic [N-1:0]     sig, next;

  parity_compactor #(.M(M), .N(N)) u_par (.din(in_data), .dout(par));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_q <= '0; v_q <= 1'b0; close_q <= 1'b0; tag_q <= '0;
    end else begin
      par_q   <= par;
      v_q     <= in_valid && !flush;
      close_q <= close && !flush;
      tag_q   <= close_tag;
    end
  end

  crc_misr #(.W(N)) u_crc (
    .clk, .rst_n,
    .init (flush || close_q),
    .en   (v_q),
    .din  (par_q),
    .sig, .next
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_valid <= 1'b0; fp <= '0; fp_tag <= '0;
    end else begin
      fp_valid <= close_q && !flush;
      fp       <= v_q ? next : sig;
      fp_tag   <= tag_q;
    end
  end
endmodule

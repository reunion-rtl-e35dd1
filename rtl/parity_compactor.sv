// parity_compactor: space-compressing parity trees, the first stage of fingerprint
// generation.
//
// The state retired in one cycle (M bits, more than a CRC can absorb per clock) is
// reduced to N bits by N parity trees. Output bit j is the XOR of every input bit i
// with i mod N == j, so adjacent input bits land in different trees and any single
// flipped bit changes exactly one output bit. The use of parity trees in front of the
// CRC and the one-cycle reduction follow the document; the interleaved assignment of
// input bits to trees is this design's choice. Purely combinational; the register
// between this stage and the CRC sits in fingerprint_gen.
module parity_compactor #(
  parameter int unsigned M = 536,  // raw state bits per cycle
  parameter int unsigned N = 16    // compressed bits (CRC width)
) (
  input  logic [M-1:0] din,
  output logic [N-1:0] dout
);
  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < M; i++) dout[i % N] = dout[i % N] ^ din[i];
  end
endmodule

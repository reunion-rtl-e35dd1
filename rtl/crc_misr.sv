// crc_misr: time-compressing parallel CRC, the second stage of fingerprint generation.
//
// Each cycle with `en` high, W data bits are folded into the running W-bit signature
// as if they had been shifted through a serial CRC register most significant bit
// first (the parallel form unrolls those W serial steps). `init` reloads SEED, and
// has priority over `en`. `next` is the signature that the current inputs would give,
// so a fingerprint can be taken in the same cycle as its last data. The 16-bit width
// follows the document; the CCITT polynomial x^16+x^12+x^5+1 and the all-ones seed
// are this design's choices.
module crc_misr #(
  parameter int unsigned      W    = 16,
  parameter logic [W-1:0]     POLY = 16'h1021,
  parameter logic [W-1:0]     SEED = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] sig,
  output logic [W-1:0] next
);
  function automatic logic [W-1:0] crc_fold(logic [W-1:0] c, logic [W-1:0] d);
    logic fb;
    for (int b = W - 1; b >= 0; b--) begin
      fb = c[W-1] ^ d[b];
      c  = {c[W-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
    return c;
  endfunction

  assign next = crc_fold(sig, din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sig <= SEED;
    else if (init) sig <= SEED;
    else if (en)   sig <= next;
  end
endmodule

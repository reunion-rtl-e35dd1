// tb_parity_compactor: checks the parity trees against a reference that walks each
// tree's inputs with a stride of N, and checks that a single flipped input bit
// changes exactly one output bit (the one of its tree).
module tb_parity_compactor;
  localparam int unsigned M = 536, N = 16;
  logic clk = 1'b0;
  logic [M-1:0] din, din2;
  logic [N-1:0] dout, dout2;
  int checks = 0, failures = 0;

  parity_compactor #(.M(M), .N(N)) dut  (.din(din),  .dout(dout));
  parity_compactor #(.M(M), .N(N)) dut2 (.din(din2), .dout(dout2));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_par(logic [M-1:0] d);
    logic [N-1:0] r;
    for (int j = 0; j < N; j++) begin
      r[j] = 1'b0;
      for (int i = j; i < M; i += N) r[j] ^= d[i];
    end
    return r;
  endfunction

  initial begin
    din = '0; din2 = '0;
    #1;
    checks++; if (dout !== '0) failures++;
    for (int t = 0; t < 300; t++) begin
      int unsigned b;
      for (int w = 0; w < M; w += 32) din[w +: 32] = $urandom;
      b = $urandom_range(M - 1);
      din2 = din; din2[b] = ~din2[b];
      @(posedge clk); #1;
      checks++;
      if (dout !== ref_par(din)) begin
        failures++; $display("FAIL parity t=%0d got %h exp %h", t, dout, ref_par(din));
      end
      checks++;
      if ((dout ^ dout2) !== (N'(1) << (b % N))) begin
        failures++; $display("FAIL flip bit %0d diff %h", b, dout ^ dout2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fingerprint_gen: drives random groups and interval closes (with and without data
// in the closing cycle, and flushes) and checks each fingerprint against a reference
// built from a strided parity and a serial CRC-16/CCITT, its tag, and that it appears
// exactly two cycles after the close was presented.
module tb_fingerprint_gen;
  localparam int unsigned M = 536, N = 16, TAG_W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, in_valid, close, fp_valid;
  logic [M-1:0] in_data;
  logic [TAG_W-1:0] close_tag, fp_tag;
  logic [N-1:0] fp;
  int checks = 0, failures = 0, cycle = 0, n_fp = 0;

  typedef struct { int at; logic [N-1:0] fp; logic [TAG_W-1:0] tag; } exp_t;
  exp_t exp_q [$];

  fingerprint_gen #(.M(M), .N(N), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [N-1:0] par(logic [M-1:0] d);
    logic [N-1:0] r = '0;
    for (int j = 0; j < N; j++) for (int i = j; i < M; i += N) r[j] ^= d[i];
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

  logic [15:0] run;
  initial begin
    flush = 0; in_valid = 0; close = 0; in_data = '0; close_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run = 16'hFFFF;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3) != 0);
      close     = ($urandom_range(3) == 0);
      flush     = ($urandom_range(150) == 0);
      close_tag = TAG_W'($urandom);
      for (int w = 0; w < M; w += 32) in_data[w +: 32] = $urandom;
      if (flush) begin
        run = 16'hFFFF;
        // anything in flight is dropped
        while (exp_q.size() != 0 && exp_q[$].at > cycle) void'(exp_q.pop_back());
      end else begin
        if (in_valid) run = crc(run, par(in_data));
        if (close) begin
          exp_q.push_back('{at: cycle + 2, fp: run, tag: close_tag});
          run = 16'hFFFF;
        end
      end
    end
    @(negedge clk); in_valid = 0; close = 0; flush = 0;
    repeat (4) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d fingerprints missing", exp_q.size()); end
    checks++; if (n_fp < 300) begin failures++; $display("FAIL only %0d fingerprints", n_fp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fp_valid is sampled just after the edge that produced it
  always @(negedge clk) if (rst_n) begin
    if (fp_valid) begin
      n_fp++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected fingerprint @%0d", cycle); end
      else begin
        automatic exp_t e = exp_q.pop_front();
        if (e.at != cycle || e.fp !== fp || e.tag !== fp_tag) begin
          failures++;
          $display("FAIL fp @%0d exp @%0d %h/%h got %h/%h", cycle, e.at, e.fp, e.tag, fp, fp_tag);
        end
      end
    end else if (exp_q.size() != 0 && exp_q[0].at < cycle) begin
      checks++; failures++; $display("FAIL fingerprint late/missing @%0d", cycle);
      void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

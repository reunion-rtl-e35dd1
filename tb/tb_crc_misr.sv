// tb_crc_misr: checks the parallel CRC against the CRC-16/CCITT value
// of the ASCII string "12345678" (0xA12B with seed 0xFFFF), and against a serial
// one-bit-at-a-time Galois LFSR for random data, including init and hold cycles.
module tb_crc_misr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init, en;
  logic [15:0] din, sig, next, model;
  int checks = 0, failures = 0;

  crc_misr #(.W(16)) dut (.clk, .rst_n, .init, .en, .din, .sig, .next);

  always #5 clk = ~clk;

  function automatic logic [15:0] serial16(logic [15:0] c, logic [15:0] d);
    for (int i = 15; i >= 0; i--) begin
      logic top = c[15] ^ d[i];
      c = c << 1;
      if (top) c = c ^ 16'b0001_0000_0010_0001;
    end
    return c;
  endfunction

  initial begin
    init = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (sig !== 16'hFFFF) failures++;
    // "12345678" as four 16-bit words, first character in the high byte
    en = 1'b1;
    din = 16'h3132; @(negedge clk);
    din = 16'h3334; @(negedge clk);
    din = 16'h3536; @(negedge clk);
    din = 16'h3738; @(negedge clk);
    en = 1'b0;
    checks++;
    if (sig !== 16'hA12B) begin failures++; $display("FAIL check value %h", sig); end
    // random stream against the serial model
    init = 1'b1; @(negedge clk); init = 1'b0;
    model = 16'hFFFF;
    for (int t = 0; t < 500; t++) begin
      en  = ($urandom_range(3) != 0);
      din = 16'($urandom);
      init = ($urandom_range(40) == 0);
      #1;
      checks++;
      if (next !== serial16(sig, din)) begin failures++; $display("FAIL next t=%0d", t); end
      @(negedge clk);
      if (init) model = 16'hFFFF;
      else if (en) model = serial16(model, din);
      checks++;
      if (sig !== model) begin failures++; $display("FAIL sig t=%0d got %h exp %h", t, sig, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

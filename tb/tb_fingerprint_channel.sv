// tb_fingerprint_channel: random words in, checks that each leaves exactly LAT cycles
// later with its value, and that a flush drops everything in flight.
module tb_fingerprint_channel;
  localparam int unsigned W = 24, LAT = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, in_valid, out_valid;
  logic [W-1:0] in_data, out_data;
  logic         hv [$];
  logic [W-1:0] hd [$];
  int checks = 0, failures = 0, n_out = 0;

  fingerprint_channel #(.W(W), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    flush = 0; in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LAT; i++) begin hv.push_back(1'b0); hd.push_back('0); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) == 1);
      in_data  = W'($urandom);
      flush    = ($urandom_range(100) == 0);
      @(posedge clk);
      if (flush) begin
        foreach (hv[i]) hv[i] = 1'b0;
      end else begin
        hv.push_back(in_valid); hd.push_back(in_data);
        void'(hv.pop_front()); void'(hd.pop_front());
      end
      #1;
      checks++;
      if (out_valid !== hv[0] || (out_valid && out_data !== hd[0])) begin
        failures++; $display("FAIL t=%0d v=%b exp %b", t, out_valid, hv[0]);
      end
      if (out_valid) n_out++;
    end
    checks++; if (n_out < 500) failures++;
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

// tb_fingerprint_queue: random pushes, pops and flushes against a SystemVerilog queue
// model; checks head, empty, full, count, and that a push to a full queue is dropped.
module tb_fingerprint_queue;
  localparam int unsigned W = 24, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0;

  fingerprint_queue #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    flush = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) ||
          count !== ($clog2(DEPTH+1))'(model.size()) ||
          (model.size() != 0 && dout !== model[0])) begin
        failures++; $display("FAIL t=%0d size=%0d count=%0d", t, model.size(), count);
      end
      if (full) n_full++;
      push  = ($urandom_range(99) < ((t / 500) % 2 ? 70 : 35));
      pop   = ($urandom_range(99) < ((t / 500) % 2 ? 35 : 70));
      flush = ($urandom_range(199) == 0);
      din   = W'($urandom);
      @(posedge clk);
      if (flush) model.delete();
      else begin
        automatic bit can_pop  = model.size() != 0;
        automatic bit can_push = model.size() != DEPTH;
        if (pop && can_pop) void'(model.pop_front());
        if (push && can_push) model.push_back(din);
      end
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
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

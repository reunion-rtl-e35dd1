// tb_irq_sync: the interrupt must be taken by each core exactly once, when that
// core's retired-interval count reaches the vocal's closed-interval count at the time
// of the request, even though the mute lags the vocal by several cycles.
// Part 1 uses regular progress and checks each interrupt's landing point. Part 2
// drives random progress (the vocal closes and retires intervals at random, the mute
// follows at a random distance) and random requests, and checks take_v, take_m and
// pending in every cycle against a reference written from that rule.
module tb_irq_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic irq, take_v, take_m, pending;
  logic [31:0] vocal_closed, vocal_retired, mute_retired;
  int checks = 0, failures = 0;
  int tv_at [$], tm_at [$];
  int unsigned target;

  irq_sync dut (.*);

  always #5 clk = ~clk;

  // vocal retires one interval every 3 cycles and keeps 4 closed ahead; the mute
  // retires the same intervals 5 cycles later
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (take_v) tv_at.push_back(int'(vocal_retired));
    if (take_m) tm_at.push_back(int'(mute_retired));
  end
  bit part2 = 0;
  int unsigned rc = 0, rv = 0, rm = 0;   // part 2: closed, vocal retired, mute retired
  assign vocal_retired = part2 ? rv : 32'(cyc / 3);
  assign vocal_closed  = part2 ? rc : 32'(cyc / 3) + 4;
  assign mute_retired  = part2 ? rm : (cyc >= 15) ? 32'((cyc - 15) / 3) : 32'd0;

  // part 2 reference: what each core still has to take, and at which count
  bit ref_pv = 0, ref_pm = 0;
  int unsigned ref_t = 0;
  int n_taken = 0;
  always @(posedge clk) if (rst_n && part2) begin
    automatic bit exp_v = ref_pv && vocal_retired >= ref_t;
    automatic bit exp_m = ref_pm && mute_retired >= ref_t;
    checks++;
    if (take_v !== exp_v || take_m !== exp_m || pending !== (ref_pv || ref_pm)) begin
      failures++;
      $display("FAIL part 2 @%0d: take %b%b pending %b, expected %b%b %b", cyc, take_v, take_m,
               pending, exp_v, exp_m, ref_pv || ref_pm);
    end
    if (exp_v) n_taken++;
    if (irq && !ref_pv && !ref_pm) begin ref_pv = 1; ref_pm = 1; ref_t = vocal_closed; end
    else begin
      if (exp_v) ref_pv = 0;
      if (exp_m) ref_pm = 0;
    end
  end

  initial begin
    irq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5; n++) begin
      repeat (7 + n * 5) @(negedge clk);
      target = vocal_closed;
      irq = 1'b1; @(negedge clk); irq = 1'b0;
      // a second request while pending merges
      irq = 1'b1; @(negedge clk); irq = 1'b0;
      while (pending) @(negedge clk);
      checks++;
      if (tv_at.size() != 1 || tm_at.size() != 1 ||
          tv_at[0] != int'(target) || tm_at[0] != int'(target)) begin
        failures++;
        $display("FAIL irq %0d target %0d took v=%p m=%p", n, target, tv_at, tm_at);
      end
      tv_at.delete(); tm_at.delete();
    end
    // part 2: random progress and random requests
    @(negedge clk);
    rc = vocal_closed; rv = vocal_retired; rm = mute_retired;
    part2 = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (rc < rv + 6 && $urandom_range(99) < 40) rc++;
      if (rv < rc && $urandom_range(99) < 35) rv++;
      if (rm < rv && $urandom_range(99) < 35) rm++;
      irq = ($urandom_range(99) < 3);
    end
    irq = 0;
    checks++;
    if (n_taken < 20) begin failures++; $display("FAIL only %0d interrupts taken in part 2", n_taken); end
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

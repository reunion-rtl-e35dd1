// tb_reexec_ctrl: walks the re-execution protocol through its three outcomes:
// recovery in phase 1, recovery in phase 2 after a register-file copy, and the
// uncorrectable-error outcome. Checks that rollback waits for retirement to finish,
// that flush is a single-cycle pulse, that the copy visits registers 0..NR-1 once
// each in NR cycles, that phase 1 needs both cores' matches, the drain rule (equal
// retired-interval counts, or a timeout), and the counters.
module tb_reexec_ctrl;
  localparam int unsigned NR = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic match_v, match_m, mismatch_v, mismatch_m, retiring_v, retiring_m, halted_v, halted_m;
  logic [31:0] retired_v, retired_m;
  logic flush, single_step, copy_we, due_error;
  logic [4:0] copy_idx;
  logic [1:0] phase;
  logic [15:0] n_rollbacks, n_phase2, n_recovered;
  int checks = 0, failures = 0;
  int n_flush = 0, n_copy = 0;
  bit copy_seen [NR];

  reexec_ctrl #(.NR(NR)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (flush) n_flush++;
    if (copy_we) begin
      n_copy++;
      if (copy_seen[copy_idx]) begin failures++; $display("FAIL reg %0d copied twice", copy_idx); end
      copy_seen[copy_idx] = 1'b1;
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  task automatic wait_flush_then_step(input int max);
    int k = 0;
    while (!flush && k < max) begin @(negedge clk); k++; end
    check(flush, "flush pulse");
    @(negedge clk);
    check(!flush, "flush lasts one cycle");
  endtask

  initial begin
    {match_v, match_m, mismatch_v, mismatch_m} = '0;
    retiring_v = 1'b0; retiring_m = 1'b0; halted_v = 1'b0; halted_m = 1'b0;
    retired_v = 32'd5; retired_m = 32'd5;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(phase == 0 && !flush && !single_step && !due_error, "idle after reset");

    // ---- phase 1 success; rollback must wait while a core is retiring ----
    retiring_m = 1'b1;
    pulse(mismatch_v);
    repeat (3) begin check(!flush && phase == 1, "no flush while retiring"); @(negedge clk); end
    retiring_m = 1'b0; retired_m = 32'd4;        // the mute lags one interval
    repeat (3) begin check(!flush, "no flush while retired counts differ"); @(negedge clk); end
    retired_m = 32'd5;
    wait_flush_then_step(5);
    check(single_step && phase == 1 && !copy_we, "single step in phase 1");
    pulse(match_v);
    repeat (2) @(negedge clk);
    check(single_step && phase == 1, "one core's match is not enough");
    pulse(match_m);
    check(!single_step && phase == 0, "back to normal");
    check(n_rollbacks == 1 && n_recovered == 1 && n_phase2 == 0, "counters after phase 1");

    // ---- phase 2 success ----
    pulse(mismatch_m);
    wait_flush_then_step(5);
    pulse(mismatch_v);                         // single-step compare fails
    wait_flush_then_step(5);
    check(copy_we && copy_idx == 0 && phase == 2, "copy starts at r0");
    repeat (NR) @(negedge clk);
    check(!copy_we && single_step && phase == 2, "copy done, single step again");
    check(n_copy == NR, "NR copy cycles");
    foreach (copy_seen[i]) check(copy_seen[i], "every register copied");
    foreach (copy_seen[i]) copy_seen[i] = 1'b0;
    match_v = 1'b1; match_m = 1'b1; @(negedge clk); match_v = 1'b0; match_m = 1'b0;
    check(phase == 0 && !single_step, "phase 2 recovered");
    check(n_rollbacks == 2 && n_phase2 == 1 && n_recovered == 2, "counters after phase 2");

    // ---- uncorrectable; the first rollback only after the drain timeout ----
    retired_v = 32'd9;
    pulse(mismatch_v);
    begin
      automatic int t0 = $time;
      wait_flush_then_step(80);
      check(($time - t0) / 10 >= 64, "drain timeout");
    end
    retired_v = 32'd5;
    pulse(mismatch_m);
    wait_flush_then_step(5);
    repeat (NR) @(negedge clk);
    pulse(mismatch_v);
    check(due_error && phase == 3, "due error");
    pulse(match_v);
    repeat (5) @(negedge clk);
    check(due_error, "due error is sticky");
    halted_v = 1'b1; halted_m = 1'b1;
    check(n_flush == 5, "five rollbacks in all");

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

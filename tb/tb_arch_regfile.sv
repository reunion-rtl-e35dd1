// tb_arch_regfile: random retirement writes on all ports (including two slots to the
// same register, where the later slot must win) and copy-port writes (which take
// priority), checked register by register through the read port against a model.
module tb_arch_regfile;
  import reunion_pkg::*;
  localparam int unsigned NR = 32, W = 64, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] we;
  logic [P-1:0][4:0] waddr;
  logic [P-1:0][W-1:0] wdata;
  logic [4:0] raddr, copy_idx;
  logic [W-1:0] rdata, copy_data;
  logic copy_we;
  logic [W-1:0] model [NR];
  int checks = 0, failures = 0;

  arch_regfile #(.NR(NR), .W(W), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0; copy_we = 0; copy_idx = '0; copy_data = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        we[p] = $urandom_range(1);
        waddr[p] = 5'($urandom_range(7));   // few registers: many collisions
        wdata[p] = {32'($urandom), 32'($urandom)};
      end
      copy_we = ($urandom_range(9) == 0);
      copy_idx = 5'($urandom);
      copy_data = {32'($urandom), 32'($urandom)};
      raddr = 5'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL t=%0d r%0d", t, raddr); end
      @(posedge clk);
      if (copy_we) model[copy_idx] = copy_data;
      else for (int p = 0; p < P; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    @(negedge clk); we = '0; copy_we = 0;
    for (int r = 0; r < NR; r++) begin
      raddr = 5'(r); #1;
      checks++; if (rdata !== model[r]) begin failures++; $display("FAIL final r%0d", r); end
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

// arch_regfile: architectural register file that holds a core's safe state.
//
// Only instructions whose fingerprint interval compared equal are written here, so
// its contents are always safe state and rollback needs no action on it. It has
// RETIRE_W write ports for one checked retire group per cycle (a later slot wins
// when two slots of a group write the same register), a combinational read port,
// and a copy port used by the re-execution protocol's second phase: the vocal core's
// file is read at copy_idx and the mute core's file is written with copy_data, one
// register per cycle. The copy port has priority over retirement writes (the core
// is stopped while copying). Write-before-use of the retire ports, the port count
// and the reset to zero are this design's choices; the document requires only the
// copy mechanism and that the ARF is written at retirement after checking.
module arch_regfile
  import reunion_pkg::*;
#(
  parameter int unsigned NR = NREG,
  parameter int unsigned W  = XLEN,
  parameter int unsigned P  = RETIRE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [P-1:0]           we,
  input  logic [P-1:0][$clog2(NR)-1:0] waddr,
  input  logic [P-1:0][W-1:0]    wdata,
  input  logic [$clog2(NR)-1:0]  raddr,
  output logic [W-1:0]           rdata,
  input  logic                   copy_we,
  input  logic [$clog2(NR)-1:0]  copy_idx,
  input  logic [W-1:0]           copy_data
);
  logic [W-1:0] regs [NR];

  assign rdata = regs[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NR; i++) regs[i] <= '0;
    end else if (copy_we) begin
      regs[copy_idx] <= copy_data;
    end else begin
      for (int p = 0; p < P; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule

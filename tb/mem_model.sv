// mem_model: behavioural model of off-chip main memory for the testbenches.
//
// One request at a time: a request is taken when mem_req_valid is high and the model
// is idle (mem_req_ready); a read answers with mem_rsp_valid LAT cycles later. Lines
// never written read as init_line(addr), a fixed function of the address, so a test
// can predict them. It counts reads and writes.
module mem_model #(
  parameter int unsigned AW     = 26,
  parameter int unsigned LINE_W = 512,
  parameter int unsigned LAT    = 240     // 60 ns at 4 GHz
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req_valid,
  input  logic              mem_req_we,
  input  logic [AW-1:0]     mem_req_addr,
  input  logic [LINE_W-1:0] mem_req_data,
  output logic              mem_req_ready,
  output logic              mem_rsp_valid,
  output logic [LINE_W-1:0] mem_rsp_data,
  output int                n_reads,
  output int                n_writes
);
  logic [LINE_W-1:0] store [logic [AW-1:0]];
  int                busy;
  logic [AW-1:0]     raddr;

  function automatic logic [LINE_W-1:0] init_line(logic [AW-1:0] a);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = {a[15:0], 16'(i * 16'h1357)};
    return l;
  endfunction

  function automatic logic [LINE_W-1:0] peek(logic [AW-1:0] a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  assign mem_req_ready = (busy == 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; mem_rsp_valid <= 1'b0; mem_rsp_data <= '0; n_reads <= 0; n_writes <= 0;
      raddr <= '0;
    end else begin
      mem_rsp_valid <= 1'b0;
      if (busy == 0 && mem_req_valid) begin
        if (mem_req_we) begin
          store[mem_req_addr] = mem_req_data;
          n_writes <= n_writes + 1;
          busy <= 1;
        end else begin
          raddr <= mem_req_addr;
          n_reads <= n_reads + 1;
          busy <= (LAT > 1) ? int'(LAT) : 2;
        end
      end else if (busy == 1) begin
        busy <= 0;
      end else if (busy > 1) begin
        busy <= busy - 1;
        if (busy == 2) begin
          mem_rsp_valid <= 1'b1;
          mem_rsp_data  <= peek(raddr);
        end
      end
    end
  end
endmodule

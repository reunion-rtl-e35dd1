// fingerprint_channel: the link that carries a core's fingerprints to its partner.
//
// A fixed LAT-cycle pipeline: a word entering with in_valid leaves on out_valid LAT
// cycles later, one word per cycle. It stands for the wires (and any repeaters)
// between the two cores of a logical processor pair; its latency is part of the
// comparison latency. `flush` drops everything in flight (rollback). The channel
// follows the document; its depth is derived in reunion_top from the comparison
// latency, and the default here is that of a 10-cycle comparison latency.
module fingerprint_channel #(
  parameter int unsigned W   = 24,
  parameter int unsigned LAT = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  logic [LAT-1:0] v;
  logic [W-1:0]   d [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else if (flush) v <= '0;
    else begin
      v[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v[i] <= v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d[0] <= in_data;
    for (int i = 1; i < LAT; i++) d[i] <= d[i-1];
  end

  assign out_valid = v[LAT-1];
  assign out_data  = d[LAT-1];
endmodule

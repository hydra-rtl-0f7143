// xbar_to_noc: crossbar from the tile-processor buses to the NoC output
// channels.
//
// Every output channel can take its payload from any of the buses coming
// from the tile processor (full connectivity, as in the published design).
// The bus feeding each channel is chosen by the decoder instruction in
// effect (see flit_formatter). Purely combinational.
module xbar_to_noc #(
  parameter int unsigned NUM_CH  = 4,
  parameter int unsigned NUM_BUS = 10,
  parameter int unsigned DATA_W  = 16
) (
  input  logic [NUM_BUS-1:0][DATA_W-1:0]      bus_data,
  input  logic [NUM_CH-1:0][3:0]              sel,
  output logic [NUM_CH-1:0][DATA_W-1:0]       ch_data
);
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      ch_data[c] = (32'(sel[c]) < NUM_BUS) ? bus_data[sel[c]] : '0;
    end
  end
endmodule

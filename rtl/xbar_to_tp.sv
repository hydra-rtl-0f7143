// xbar_to_tp: crossbar from the NoC input channels to the buses to the tile
// processor.
//
// Every bus to the tile processor can take its data from any of the input
// channels (full connectivity, as in the published design). For each bus the
// tile processor gives the channel it wants to read (sel) and whether it
// reads (rd). The module returns the selected payload on each bus, tells per
// bus whether stream data was available, and forms the per-channel pop
// request; several buses that read one channel in the same cycle all see the
// same flit and the channel is popped once. Purely combinational.
module xbar_to_tp #(
  parameter int unsigned NUM_CH  = 4,
  parameter int unsigned NUM_BUS = 10,
  parameter int unsigned DATA_W  = 16
) (
  input  logic [NUM_CH-1:0][DATA_W-1:0]      ch_data,   // head payload per channel
  input  logic [NUM_CH-1:0]                  ch_avail,  // stream data at head
  input  logic [NUM_BUS-1:0]                 rd,
  input  logic [NUM_BUS-1:0][$clog2(NUM_CH)-1:0] sel,
  output logic [NUM_BUS-1:0][DATA_W-1:0]     bus_data,
  output logic [NUM_BUS-1:0]                 bus_ok,    // read can be served
  output logic [NUM_CH-1:0]                  ch_req     // channel is read
);
  always_comb begin
    ch_req = '0;
    for (int b = 0; b < NUM_BUS; b++) begin
      bus_data[b] = ch_data[sel[b]];
      bus_ok[b]   = ch_avail[sel[b]];
      if (rd[b]) ch_req[sel[b]] = 1'b1;
    end
  end
endmodule

// flow_control: reads the input channel buffers and controls the data path.
//
// Control messages and stream data arrive mixed on the same NoC channels.
// For every input channel this module keeps a flag that is set by the C flit
// of a message with a body (Configuration, DMA load, DMA retrieve) and
// cleared by a T flit or by a C flit of a bodiless command (Get status, Run,
// Wait, Reset, which have no T): while it is set, the channel carries a
// message. The flit at the head of each input buffer is routed as follows:
//  * a C flit goes to the channel's message context as soon as that can take
//    a command (c_ready); it interrupts the channel's previous message;
//  * an H, D or T flit, while the flag is set, goes to the channel's message
//    context when that accepts flits (f_ready);
//  * with the flag clear, a D flit is stream data for the tile processor,
//    offered through xbar_to_tp; a stray H or T flit is dropped.
// Every channel has its own message context, so no channel waits for
// another: control and data of different channels never block each other.
// The module also halts the tile processor: halt is high when it is not
// running, waits for a message, or asks for a transfer that cannot be done
// this cycle (input data missing, output buffer full). advance is the tile
// clock edge on which the TP moves on and its transfers take place.
module flow_control
  import hydra_pkg::*;
#(
  parameter int unsigned N_CH  = 4,
  parameter int unsigned N_BUS = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input channel buffers
  input  flit_t [N_CH-1:0]              head,
  input  logic  [N_CH-1:0]              head_valid,
  output logic  [N_CH-1:0]              pop,
  // message execution, one context per channel
  output logic  [N_CH-1:0]              msg_valid,
  output flit_t [N_CH-1:0]              msg_flit,
  input  logic  [N_CH-1:0]              c_ready,
  input  logic  [N_CH-1:0]              f_ready,
  // stream data to the TP
  output logic [N_CH-1:0]               stream_avail,
  input  logic [N_CH-1:0]               stream_req,    // from xbar_to_tp
  input  logic [N_BUS-1:0]              tp_rd,
  input  logic [N_BUS-1:0]              tp_rd_ok,      // from xbar_to_tp
  input  logic                          tp_send,
  input  logic                          tp_send_ok,    // from flit_formatter
  // TP program control
  input  logic                          tick,
  input  logic                          run,
  input  logic                          waiting,
  output logic                          stall,
  output logic                          halt,
  output logic                          advance,
  output logic [N_CH-1:0]               in_msg,
  output logic [N_CH-1:0]               dropped
);
  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      stream_avail[c] = head_valid[c] && !in_msg[c] && head[c].ftype == FLIT_D;
      dropped[c]      = head_valid[c] && !in_msg[c] &&
                        (head[c].ftype == FLIT_H || head[c].ftype == FLIT_T);
      msg_flit[c]     = head[c];
      if (head_valid[c] && head[c].ftype == FLIT_C)
        msg_valid[c] = c_ready[c];
      else
        msg_valid[c] = head_valid[c] && in_msg[c] && f_ready[c];
    end
  end

  // TP halting: a TP cycle only happens when all its transfers can be done
  assign stall   = ((tp_rd & ~tp_rd_ok) != '0) || (tp_send && !tp_send_ok);
  assign halt    = !run || waiting || stall;
  assign advance = tick && !halt;

  assign pop = msg_valid | dropped | (stream_req & {N_CH{advance}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_msg <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        if (msg_valid[c] && head[c].ftype == FLIT_C)
          in_msg[c] <= head[c].payload[2:0] inside {CMD_CFG, CMD_LOAD, CMD_RETR};
        else if (msg_valid[c] && head[c].ftype == FLIT_T)
          in_msg[c] <= 1'b0;
      end
    end
  end

  // stream reads only take D flits of channels outside a message
  a_stream_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                 ((stream_req & {N_CH{advance}}) & ~stream_avail) == '0)
    else $error("flow_control: stream pop without data");
endmodule

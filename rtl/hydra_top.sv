// hydra_top: the Hydra network interface between a circuit-switched NoC and
// a MONTIUM-style coarse-grained tile processor (TP).
//
// Data path, NoC to TP: NUM_CH input channel buffers (flit_fifo, four flits
// each) -> flow_control, which separates control messages from stream data
// -> xbar_to_tp, a crossbar onto the NUM_BUS buses to the TP.
// Data path, TP to NoC: NUM_BUS buses from the TP -> xbar_to_noc crossbar ->
// flit_formatter, which attaches flit types from a decoder instruction or
// takes flits from small ROMs, and also inserts the replies of the message
// execution -> NUM_CH output channel buffers.
// Control: msg_exec executes the message protocol (configuration, DMA load
// and retrieve, status, run, wait, reset), with one message context per
// channel so that DMA transfers on several channels run in parallel, each
// through its own TP memory port (tp_mem_*[ch]); flow_control halts the TP when it
// is not running, waits, or requests a transfer that cannot be performed;
// clock_divider derives the tile clock f_NoC / 2^n and gates it while the TP
// is halted.
// Clocking: everything runs on the NoC clock clk. The tile clock is given to
// the TP as tp_clk_en, a clock enable with one pulse per tile clock cycle;
// tp_tick is the ungated divider output, which clocks the TP's external
// (configuration and memory) interface. The TP presents its stream requests
// (tp_rd/tp_rd_ch for reading, tp_send/tp_instr for writing) and holds them
// until a tp_clk_en pulse, at which they take place; read data on
// tp_bus_out is valid in that cycle.
// NoC channels use a valid/ready handshake: a flit moves when both are high.
// The channel counts, bus count, flit size and buffer depth are the published
// design's; the single-clock structure and the handshakes are choices made
// here.
module hydra_top
  import hydra_pkg::*;
#(
  parameter int unsigned N_CH      = 4,
  parameter int unsigned N_BUS     = 10,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned NUM_INSTR = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // channels from the NoC
  input  logic  [N_CH-1:0]              noc_in_valid,
  input  flit_t [N_CH-1:0]              noc_in_flit,
  output logic  [N_CH-1:0]              noc_in_ready,
  // channels to the NoC
  output logic  [N_CH-1:0]              noc_out_valid,
  output flit_t [N_CH-1:0]              noc_out_flit,
  input  logic  [N_CH-1:0]              noc_out_ready,
  // tile clock and program control
  output logic                          tp_tick,
  output logic                          tp_clk_en,
  output logic                          tp_rst,
  output logic                          tp_halt,
  input  logic                          tp_done,
  // streaming interface of the TP
  input  logic  [N_BUS-1:0]             tp_rd,
  input  logic  [N_BUS-1:0][$clog2(N_CH)-1:0] tp_rd_ch,
  output logic  [N_BUS-1:0][DATA_W-1:0] tp_bus_out,
  input  logic                          tp_send,
  input  logic  [$clog2(NUM_INSTR)-1:0] tp_instr,
  input  logic  [N_BUS-1:0][DATA_W-1:0] tp_bus_in,
  // configuration and memory interface of the TP
  output logic                          tp_cfg_we,
  output logic [15:0]                   tp_cfg_addr,
  output logic [15:0]                   tp_cfg_wdata,
  output logic [N_CH-1:0]               tp_mem_we,
  output logic [N_CH-1:0]               tp_mem_re,
  output logic [N_CH-1:0][5:0]          tp_mem_sel,
  output logic [N_CH-1:0][MEM_AW-1:0]   tp_mem_addr,
  output logic [N_CH-1:0][DATA_W-1:0]   tp_mem_wdata,
  input  logic [N_CH-1:0][DATA_W-1:0]   tp_mem_rdata
);

  // input buffers
  flit_t [N_CH-1:0]       in_head;
  logic  [N_CH-1:0]       in_valid, in_full, in_pop;
  // output buffers
  flit_t [N_CH-1:0]       out_push_flit;
  logic  [N_CH-1:0]       out_push, out_full, out_valid;
  flit_t [N_CH-1:0]       out_head;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    flit_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .wr_en(noc_in_valid[c] && !in_full[c]), .wr_data(noc_in_flit[c]), .full(in_full[c]),
      .rd_en(in_pop[c]), .rd_data(in_head[c]), .rd_valid(in_valid[c]), .count());

    flit_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .wr_en(out_push[c]), .wr_data(out_push_flit[c]), .full(out_full[c]),
      .rd_en(noc_out_ready[c]), .rd_data(out_head[c]), .rd_valid(out_valid[c]), .count());

    assign noc_in_ready[c]  = !in_full[c];
    assign noc_out_valid[c] = out_valid[c];
    assign noc_out_flit[c]  = out_head[c];
  end

  // message execution <-> flow control
  logic  [N_CH-1:0] msg_valid, c_ready, f_ready;
  flit_t [N_CH-1:0] msg_flit;
  logic        run, waiting, stall, advance, tick;
  logic [N_CH-1:0] stream_avail, stream_req;
  logic [N_BUS-1:0] rd_ok;
  logic        send_ok;
  logic        hy_cfg_we;
  logic [15:0] hy_cfg_addr, hy_cfg_wdata;
  logic [2:0]  clkdiv_n;
  logic [N_CH-1:0] reply_valid, reply_ready;
  logic [N_CH-1:0][DATA_W-1:0] reply_data;
  logic [N_CH-1:0][DATA_W-1:0] in_payload;
  logic [N_CH-1:0][3:0]        fmt_bus_sel;
  logic [N_CH-1:0][DATA_W-1:0] fmt_bus_data;

  for (genvar c = 0; c < N_CH; c++) begin : g_pl
    assign in_payload[c] = in_head[c].payload;
  end

  flow_control #(.N_CH(N_CH), .N_BUS(N_BUS)) u_flow (
    .clk, .rst_n,
    .head(in_head), .head_valid(in_valid), .pop(in_pop),
    .msg_valid, .msg_flit, .c_ready, .f_ready,
    .stream_avail, .stream_req, .tp_rd, .tp_rd_ok(rd_ok),
    .tp_send, .tp_send_ok(send_ok),
    .tick, .run, .waiting, .stall, .halt(tp_halt), .advance, .in_msg(), .dropped());

  xbar_to_tp #(.NUM_CH(N_CH), .NUM_BUS(N_BUS), .DATA_W(DATA_W)) u_xbar_tp (
    .ch_data(in_payload), .ch_avail(stream_avail), .rd(tp_rd), .sel(tp_rd_ch),
    .bus_data(tp_bus_out), .bus_ok(rd_ok), .ch_req(stream_req));

  msg_exec #(.N(N_CH)) u_msg (
    .clk, .rst_n, .tick,
    .msg_valid, .msg_flit, .c_ready, .f_ready,
    .tp_cfg_we, .tp_cfg_addr, .tp_cfg_wdata,
    .tp_mem_we, .tp_mem_re, .tp_mem_sel, .tp_mem_addr, .tp_mem_wdata, .tp_mem_rdata,
    .tp_done, .tp_rst, .run, .waiting, .stall,
    .hy_cfg_we, .hy_cfg_addr, .hy_cfg_wdata, .clkdiv_n,
    .reply_valid, .reply_data, .reply_ready);

  xbar_to_noc #(.NUM_CH(N_CH), .NUM_BUS(N_BUS), .DATA_W(DATA_W)) u_xbar_noc (
    .bus_data(tp_bus_in), .sel(fmt_bus_sel), .ch_data(fmt_bus_data));

  flit_formatter #(.NUM_CH(N_CH), .NUM_INSTR(NUM_INSTR), .ROM_DEPTH(4)) u_fmt (
    .clk, .rst_n,
    .cfg_we(hy_cfg_we), .cfg_addr(hy_cfg_addr), .cfg_wdata(hy_cfg_wdata),
    .instr_sel(tp_instr), .send_req(tp_send), .advance, .send_ok,
    .bus_sel(fmt_bus_sel), .bus_data(fmt_bus_data),
    .reply_valid, .reply_data, .reply_ready,
    .fifo_full(out_full), .push(out_push), .push_flit(out_push_flit));

  clock_divider u_clkdiv (
    .clk, .rst_n, .n(clkdiv_n), .halt(tp_halt), .tick, .tp_clk_en);

  assign tp_tick = tick;
endmodule

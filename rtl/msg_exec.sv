// msg_exec: the message execution modules of the Hydra: configuration, DMA,
// program control and status, for all input channels.
//
// Messages follow the lightweight protocol of the design: a C flit carries
// the command code (payload[2:0]), H flits carry addresses, D flits data or
// parameters, and a T flit ends the message:
//   Configuration  C [H D+]+ T   TP or Hydra configuration, auto-increment
//   DMA load       C [H D+]+ T   write TP local memory, auto-increment
//   DMA retrieve   C [H D]+ T    read TP local memory, returned as D flits
//   Get status     C             one status word returned as a D flit
//   Run            C             start the TP program (run = 1)
//   Wait           C             halt the TP until the next message
//   Reset          C             reset the TP (tp_rst for one tile clock)
// Every input channel has its own message context (msg_channel) with its own
// memory port to the TP, so that DMA messages on L channels proceed in
// parallel, one word per tile clock each. Replies go out on the output
// channel with the number of the input channel of the message.
// The contexts share one configuration port: while several channels execute
// a Configuration message, the lowest-numbered one writes and the others
// wait. Addresses at or above 0xF000 go to the Hydra itself (hy_cfg_*, and
// the clock divider setting at 0xF200), the others to the TP (tp_cfg_*).
// Program control is shared: Run, Wait and Reset from any channel act at
// once; any C flit ends a Wait; the TP's done pulse (tp_done, sampled on
// tick) clears run. When Run and Reset arrive together, Reset wins.
// Status word: {run, waiting, stall, tp_rst, retrieve busy per channel
// [11:8], 2'b0, command still open on the asking channel (111 = none),
// clock divider n}. The commands, their codes and formats follow the
// original design; the per-channel reading of "a new command interrupts
// previous messages", the status layout, the reset length and the
// arbitration are choices made here.
module msg_exec
  import hydra_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       tick,
  // flits from the flow control, one per channel
  input  logic  [N-1:0]              msg_valid,
  input  flit_t [N-1:0]              msg_flit,
  output logic  [N-1:0]              c_ready,
  output logic  [N-1:0]              f_ready,
  // tile processor configuration port
  output logic                       tp_cfg_we,
  output logic [15:0]                tp_cfg_addr,
  output logic [15:0]                tp_cfg_wdata,
  // tile processor memory ports, one per channel
  output logic [N-1:0]               tp_mem_we,
  output logic [N-1:0]               tp_mem_re,
  output logic [N-1:0][5:0]          tp_mem_sel,
  output logic [N-1:0][MEM_AW-1:0]   tp_mem_addr,
  output logic [N-1:0][DATA_W-1:0]   tp_mem_wdata,
  input  logic [N-1:0][DATA_W-1:0]   tp_mem_rdata,
  // tile processor program control
  input  logic                       tp_done,
  output logic                       tp_rst,
  output logic                       run,
  output logic                       waiting,
  input  logic                       stall,
  // Hydra self-configuration
  output logic                       hy_cfg_we,
  output logic [15:0]                hy_cfg_addr,
  output logic [15:0]                hy_cfg_wdata,
  output logic [2:0]                 clkdiv_n,
  // replies, one per channel
  output logic [N-1:0]               reply_valid,
  output logic [N-1:0][DATA_W-1:0]   reply_data,
  input  logic [N-1:0]               reply_ready
);
  logic [N-1:0]              cfg_req, cfg_gnt, ch_cfg_we, retr_busy;
  logic [N-1:0][15:0]        ch_cfg_addr, ch_cfg_wdata;
  logic [15:0]               status;
  logic                      cfg_we;
  logic [15:0]               cfg_addr, cfg_wdata;
  logic [N-1:0]              c_take, c_run, c_wait, c_rst;

  always_comb begin
    status        = '0;
    status[15]    = run;
    status[14]    = waiting;
    status[13]    = stall;
    status[12]    = tp_rst;
    for (int c = 0; c < N && c < 4; c++) status[8 + c] = retr_busy[c];
    status[2:0]   = clkdiv_n;
  end

  for (genvar c = 0; c < N; c++) begin : g_ch
    msg_channel u_ch (
      .clk, .rst_n, .tick,
      .msg_valid(msg_valid[c]), .msg_flit(msg_flit[c]),
      .c_ready(c_ready[c]), .f_ready(f_ready[c]),
      .cfg_req(cfg_req[c]), .cfg_gnt(cfg_gnt[c]),
      .cfg_we(ch_cfg_we[c]), .cfg_addr(ch_cfg_addr[c]), .cfg_wdata(ch_cfg_wdata[c]),
      .mem_we(tp_mem_we[c]), .mem_re(tp_mem_re[c]), .mem_sel(tp_mem_sel[c]),
      .mem_addr(tp_mem_addr[c]), .mem_wdata(tp_mem_wdata[c]), .mem_rdata(tp_mem_rdata[c]),
      .status, .retr_busy(retr_busy[c]),
      .reply_valid(reply_valid[c]), .reply_data(reply_data[c]), .reply_ready(reply_ready[c]));

    assign c_take[c] = msg_valid[c] && msg_flit[c].ftype == FLIT_C;
    assign c_run[c]  = c_take[c] && msg_flit[c].payload[2:0] == CMD_RUN;
    assign c_wait[c] = c_take[c] && msg_flit[c].payload[2:0] == CMD_WAIT;
    assign c_rst[c]  = c_take[c] && msg_flit[c].payload[2:0] == CMD_RST;
  end

  // shared configuration port: lowest requesting channel
  always_comb begin
    cfg_gnt   = '0;
    cfg_we    = 1'b0;
    cfg_addr  = '0;
    cfg_wdata = '0;
    for (int c = N - 1; c >= 0; c--) begin
      if (cfg_req[c]) begin
        cfg_gnt   = '0;
        cfg_gnt[c] = 1'b1;
        cfg_we    = ch_cfg_we[c];
        cfg_addr  = ch_cfg_addr[c];
        cfg_wdata = ch_cfg_wdata[c];
      end
    end
  end

  assign tp_cfg_we    = cfg_we && cfg_addr < HYDRA_BASE;
  assign tp_cfg_addr  = cfg_addr;
  assign tp_cfg_wdata = cfg_wdata;
  assign hy_cfg_we    = cfg_we && cfg_addr >= HYDRA_BASE;
  assign hy_cfg_addr  = cfg_addr;
  assign hy_cfg_wdata = cfg_wdata;

  // program control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      waiting  <= 1'b0;
      tp_rst   <= 1'b0;
      clkdiv_n <= '0;
    end else begin
      if (tick && tp_rst) tp_rst <= 1'b0;
      if (tick && tp_done) run <= 1'b0;
      if (c_take != '0) waiting <= 1'b0;
      if (c_run != '0) run <= 1'b1;
      if (c_wait != '0) waiting <= 1'b1;
      if (c_rst != '0) begin
        tp_rst <= 1'b1;
        run    <= 1'b0;
      end
      if (hy_cfg_we && hy_cfg_addr == ADDR_CLKDIV) clkdiv_n <= hy_cfg_wdata[2:0];
    end
  end

  a_one_cfg_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                     (ch_cfg_we & ~cfg_gnt) == '0)
    else $error("msg_exec: configuration write without the port");
endmodule

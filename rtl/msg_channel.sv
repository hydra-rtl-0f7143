// msg_channel: the message context of one NoC input channel. It executes the
// Configuration, DMA load and DMA retrieve messages that arrive on its
// channel and sends their replies, so that every channel can carry its own
// DMA stream at the same time as the others.
//
// A C flit starts a new message on this channel and interrupts whatever the
// channel's previous message was still doing; the command code is in
// payload[2:0]. Then, flit by flit:
//   Configuration  H = configuration address; each D is handed to the shared
//                  configuration port (cfg_*) at the next address. Only the
//                  channel granted the port (cfg_gnt) takes D flits.
//   DMA load       H = entity (payload[15:10]) and offset (payload[9:0]);
//                  each D is written to that local memory at the next address.
//   DMA retrieve   H as for load; D = number of words to read back; the words
//                  are returned as replies.
//   Get status     the status word (status input, with the command still
//                  open on this channel, 111 if none, in bits 5:3) is
//                  returned as a reply.
// The program-control commands (Run, Wait, Reset) are decoded by msg_exec.
// A malformed message is not rejected: each flit is executed if it makes
// sense for the current command and ignored otherwise.
// Timing: H, D and T flits are accepted (f_ready) only in tick cycles, one per
// tile clock; the memory and configuration strobes are combinational on the
// accepted flit. A retrieve issues a read (mem_re) in a tick cycle, captures
// mem_rdata in the next tick cycle while it issues the next read, and so
// returns one word per tile clock while the reply is taken; mem_rdata must
// hold its value until the next read. C flits are taken whenever no reply is
// pending (c_ready). The reply register holds one flit until reply_ready.
// The flit-by-flit execution and auto-increment follow the original design;
// the H-flit split into entity and offset, the word count of a retrieve and
// the one-context-per-channel structure are choices made here.
module msg_channel
  import hydra_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic                 msg_valid,
  input  flit_t                msg_flit,
  output logic                 c_ready,
  output logic                 f_ready,
  // shared configuration port
  output logic                 cfg_req,
  input  logic                 cfg_gnt,
  output logic                 cfg_we,
  output logic [15:0]          cfg_addr,
  output logic [15:0]          cfg_wdata,
  // this channel's memory port of the tile processor
  output logic                 mem_we,
  output logic                 mem_re,
  output logic [5:0]           mem_sel,
  output logic [MEM_AW-1:0]    mem_addr,
  output logic [DATA_W-1:0]    mem_wdata,
  input  logic [DATA_W-1:0]    mem_rdata,
  // status
  input  logic [15:0]          status,
  output logic                 retr_busy,
  // reply
  output logic                 reply_valid,
  output logic [DATA_W-1:0]    reply_data,
  input  logic                 reply_ready
);
  cmd_e         cmd;
  logic [15:0]  addr;
  logic [5:0]   sel;
  logic [15:0]  retr_cnt;
  logic         rd_pend;
  logic         take_c, take_h, take_d, take_t, capture;

  assign retr_busy = (retr_cnt != 0) || rd_pend;
  assign cfg_req   = (cmd == CMD_CFG);
  assign c_ready   = !reply_valid;
  assign f_ready   = !reply_valid && !retr_busy && tick && (cmd != CMD_CFG || cfg_gnt);

  assign take_c = msg_valid && msg_flit.ftype == FLIT_C;
  assign take_h = msg_valid && msg_flit.ftype == FLIT_H;
  assign take_d = msg_valid && msg_flit.ftype == FLIT_D;
  assign take_t = msg_valid && msg_flit.ftype == FLIT_T;
  // read data of the previous tile cycle moves into the reply register
  assign capture = rd_pend && tick && (!reply_valid || reply_ready) && !take_c;

  always_comb begin
    cfg_we    = take_d && cmd == CMD_CFG;
    cfg_addr  = addr;
    cfg_wdata = msg_flit.payload;
    mem_we    = take_d && cmd == CMD_LOAD;
    mem_re    = tick && retr_cnt != 0 && (!rd_pend || capture) && !take_c;
    mem_sel   = sel;
    mem_addr  = addr[MEM_AW-1:0];
    mem_wdata = msg_flit.payload;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd         <= CMD_NONE;
      addr        <= '0;
      sel         <= '0;
      retr_cnt    <= '0;
      rd_pend     <= 1'b0;
      reply_valid <= 1'b0;
      reply_data  <= '0;
    end else begin
      if (reply_valid && reply_ready) reply_valid <= 1'b0;

      if (take_c) begin
        cmd      <= cmd_e'(msg_flit.payload[2:0]);
        addr     <= '0;
        sel      <= '0;
        retr_cnt <= '0;
        rd_pend  <= 1'b0;
        if (cmd_e'(msg_flit.payload[2:0]) == CMD_STATUS) begin
          reply_valid <= 1'b1;
          reply_data  <= {status[15:6], cmd, status[2:0]};
        end
      end

      if (take_h) begin
        unique case (cmd)
          CMD_CFG: addr <= msg_flit.payload;
          CMD_LOAD, CMD_RETR: begin
            sel  <= msg_flit.payload[15:10];
            addr <= {6'b0, msg_flit.payload[9:0]};
          end
          default: ;
        endcase
      end

      if (take_d) begin
        unique case (cmd)
          CMD_CFG:  addr <= addr + 1'b1;
          CMD_LOAD: addr <= {6'b0, addr[MEM_AW-1:0] + 1'b1};
          CMD_RETR: retr_cnt <= msg_flit.payload;
          default: ;
        endcase
      end

      if (take_t) cmd <= CMD_NONE;

      if (capture) begin
        rd_pend     <= 1'b0;
        reply_valid <= 1'b1;
        reply_data  <= mem_rdata;
      end
      if (mem_re) begin
        rd_pend  <= 1'b1;
        retr_cnt <= retr_cnt - 1'b1;
        addr     <= {6'b0, addr[MEM_AW-1:0] + 1'b1};
      end
    end
  end

  a_flit_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 msg_valid && msg_flit.ftype != FLIT_C |-> f_ready)
    else $error("msg_channel: flit offered while not ready");
  a_c_ready: assert property (@(posedge clk) disable iff (!rst_n)
                              take_c |-> c_ready)
    else $error("msg_channel: command offered while a reply is pending");
endmodule

// tb_msg_exec: sends whole messages of the protocol to the message execution
// and checks what it does: configuration writes with auto-increment to the
// TP and to the Hydra space (and the clock divider setting), two channels
// configuring at once through the shared port, DMA load and retrieve on one
// channel and on four channels in parallel (data, order, reply channel, and
// the rate of one word per tile clock on every channel), status replies,
// run / wait / reset / done, and a retrieve interrupted by a new command.
// The tile clock is a tick every other NoC cycle.
module tb_msg_exec;
  timeunit 1ns; timeprecision 100ps;
  import hydra_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0, tick = 0;
  logic  [NC-1:0] msg_valid, c_ready, f_ready;
  flit_t [NC-1:0] msg_flit;
  logic tp_cfg_we, tp_done, tp_rst, run, waiting, stall;
  logic [15:0] tp_cfg_addr, tp_cfg_wdata;
  logic [NC-1:0] tp_mem_we, tp_mem_re;
  logic [NC-1:0][5:0] tp_mem_sel;
  logic [NC-1:0][9:0] tp_mem_addr;
  logic [NC-1:0][15:0] tp_mem_wdata, tp_mem_rdata;
  logic hy_cfg_we;
  logic [15:0] hy_cfg_addr, hy_cfg_wdata;
  logic [2:0] clkdiv_n;
  logic [NC-1:0] reply_valid, reply_ready;
  logic [NC-1:0][15:0] reply_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  msg_exec #(.N(NC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // tile clock: tick in every other NoC cycle
  always @(posedge clk) tick <= rst_n ? ~tick : 1'b0;

  // TP models: configuration registers and local memories
  localparam int NUM_MEM_TB = 10;
  logic [15:0] tp_cfg [int];
  logic [15:0] hy_cfg [int];
  logic [15:0] mem [NUM_MEM_TB][1024];
  always @(posedge clk) if (rst_n) begin
    if (tp_cfg_we) tp_cfg[int'(tp_cfg_addr)] = tp_cfg_wdata;
    if (hy_cfg_we) hy_cfg[int'(hy_cfg_addr)] = hy_cfg_wdata;
    for (int c = 0; c < NC; c++) begin
      if (tp_mem_we[c] && tick) mem[tp_mem_sel[c]][tp_mem_addr[c]] <= tp_mem_wdata[c];
      if (tp_mem_re[c] && tick) tp_mem_rdata[c] <= mem[tp_mem_sel[c]][tp_mem_addr[c]];
    end
  end

  // reply sinks, one per channel
  logic [15:0] replies [NC][$];
  int          rep_first [NC], rep_last [NC];
  always @(posedge clk) if (rst_n) for (int c = 0; c < NC; c++)
    if (reply_valid[c] && reply_ready[c]) begin
      if (replies[c].size() == 0) rep_first[c] = cyc;
      rep_last[c] = cyc;
      replies[c].push_back(reply_data[c]);
    end
  assign reply_ready = reply_valid;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // per-channel message queues, offered flit by flit
  flit_t q [NC][$];
  always_comb for (int c = 0; c < NC; c++) begin
    msg_flit[c]  = q[c].size() != 0 ? q[c][0] : '0;
    msg_valid[c] = q[c].size() != 0 &&
                   ((msg_flit[c].ftype == FLIT_C) ? c_ready[c] : f_ready[c]);
  end
  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] mv;
    mv = msg_valid;
    #0.2;
    for (int c = 0; c < NC; c++) if (mv[c]) void'(q[c].pop_front());
  end

  function automatic flit_t mk(input flit_type_e t, input logic [15:0] p);
    flit_t f; f.ftype = t; f.payload = p; return f;
  endfunction

  task automatic put(input int c, input flit_type_e t, input logic [15:0] p);
    q[c].push_back(mk(t, p));
  endtask

  task automatic drain();
    while (q[0].size() + q[1].size() + q[2].size() + q[3].size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  task automatic clear_replies();
    for (int c = 0; c < NC; c++) replies[c].delete();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    tp_done = 0; stall = 0; tp_mem_rdata = '0;
    for (int m = 0; m < NUM_MEM_TB; m++) for (int a = 0; a < 1024; a++) mem[m][a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run && !waiting, "idle after reset");

    // Configuration on channel 0: TP space at 0x0000 and 0x0100, Hydra space, n;
    // at the same time channel 2 configures TP addresses 0x0200...
    put(0, FLIT_C, 16'(CMD_CFG));
    put(0, FLIT_H, 16'h0000);
    put(0, FLIT_D, 16'hA000); put(0, FLIT_D, 16'hA001); put(0, FLIT_D, 16'hA002);
    put(0, FLIT_H, 16'h0100);
    put(0, FLIT_D, 16'hA100);
    put(0, FLIT_H, 16'hF000);
    put(0, FLIT_D, 16'h8123); put(0, FLIT_D, 16'h8456);
    put(0, FLIT_H, ADDR_CLKDIV);
    put(0, FLIT_D, 16'h0003);
    put(0, FLIT_T, 16'h0);
    put(2, FLIT_C, 16'(CMD_CFG));
    put(2, FLIT_H, 16'h0200);
    for (int i = 0; i < 4; i++) put(2, FLIT_D, 16'hC000 + 16'(i));
    put(2, FLIT_T, 16'h0);
    drain();
    check(tp_cfg.exists(0) && tp_cfg[0] == 16'hA000, "cfg 0");
    check(tp_cfg.exists(2) && tp_cfg[2] == 16'hA002, "cfg auto-increment");
    check(tp_cfg.exists(256) && tp_cfg[256] == 16'hA100, "cfg second H");
    check(!tp_cfg.exists(3), "no extra cfg write");
    check(hy_cfg.exists(16'hF001) && hy_cfg[16'hF001] == 16'h8456, "hydra cfg");
    check(!tp_cfg.exists(16'hF000), "hydra space not written to TP");
    check(clkdiv_n == 3'd3, "clock divider setting");
    for (int i = 0; i < 4; i++)
      check(tp_cfg.exists(16'h200 + i) && tp_cfg[16'h200 + i] == 16'hC000 + 16'(i), "second channel's configuration");

    // DMA load on channel 1: memory 3 at 0x10 and memory 7 at 0x3FE (wraps)
    put(1, FLIT_C, 16'(CMD_LOAD));
    put(1, FLIT_H, {6'd3, 10'h010});
    for (int i = 0; i < 8; i++) put(1, FLIT_D, 16'h3000 + 16'(i));
    put(1, FLIT_H, {6'd7, 10'h3FE});
    for (int i = 0; i < 3; i++) put(1, FLIT_D, 16'h7000 + 16'(i));
    put(1, FLIT_T, 16'h0);
    drain();
    for (int i = 0; i < 8; i++) check(mem[3][16 + i] == 16'h3000 + 16'(i), "dma load mem3");
    check(mem[7][1022] == 16'h7000 && mem[7][1023] == 16'h7001 && mem[7][0] == 16'h7002, "dma load wrap");

    // DMA retrieve on channel 2: 5 words of mem3 from 0x12, then 2 of mem7 from 0x3FF
    put(2, FLIT_C, 16'(CMD_RETR));
    put(2, FLIT_H, {6'd3, 10'h012});
    put(2, FLIT_D, 16'd5);
    put(2, FLIT_H, {6'd7, 10'h3FF});
    put(2, FLIT_D, 16'd2);
    put(2, FLIT_T, 16'h0);
    drain();
    repeat (10) @(negedge clk);
    check(replies[2].size() == 7, $sformatf("retrieve count %0d", replies[2].size()));
    for (int i = 0; i < 5 && i < replies[2].size(); i++)
      check(replies[2][i] == 16'h3002 + 16'(i), "retrieve data mem3");
    if (replies[2].size() == 7) check(replies[2][5] == 16'h7001 && replies[2][6] == 16'h7002, "retrieve data mem7");
    clear_replies();

    // parallel DMA: four channels load four memories at once, then retrieve them
    t0 = cyc;
    for (int c = 0; c < NC; c++) begin
      put(c, FLIT_C, 16'(CMD_LOAD));
      put(c, FLIT_H, {6'(c), 10'h100});
      for (int i = 0; i < 32; i++) put(c, FLIT_D, 16'(c * 1000 + i));
      put(c, FLIT_T, 0);
    end
    while (q[0].size() + q[1].size() + q[2].size() + q[3].size() != 0) @(negedge clk);
    // 35 flits per channel at one per tile clock (2 NoC cycles), all channels together
    check(cyc - t0 <= 2 * 35 + 4, $sformatf("parallel load took %0d cycles", cyc - t0));
    repeat (4) @(negedge clk);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < 32; i++) check(mem[c][256 + i] == 16'(c * 1000 + i), "parallel load data");
    for (int c = 0; c < NC; c++) begin
      put(c, FLIT_C, 16'(CMD_RETR));
      put(c, FLIT_H, {6'(c), 10'h100});
      put(c, FLIT_D, 16'd32);
      put(c, FLIT_T, 0);
    end
    drain();
    repeat (80) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(replies[c].size() == 32, "parallel retrieve count");
      for (int i = 0; i < 32 && i < replies[c].size(); i++)
        check(replies[c][i] == 16'(c * 1000 + i), "parallel retrieve data");
      check(rep_last[c] - rep_first[c] <= 2 * 31 + 1,
            $sformatf("retrieve rate one word per tile clock (%0d)", rep_last[c] - rep_first[c]));
    end
    clear_replies();

    // Run, status, done
    put(0, FLIT_C, 16'(CMD_RUN));
    drain();
    check(run && !waiting, "run");
    put(3, FLIT_C, 16'(CMD_STATUS));
    drain();
    check(replies[3].size() == 1, "status reply on the asking channel");
    if (replies[3].size() == 1)
      check(replies[3][0][15] == 1 && replies[3][0][2:0] == 3'd3 && replies[3][0][5:3] == CMD_NONE, "status word");
    clear_replies();
    // Wait halts until the next message, from any channel
    put(0, FLIT_C, 16'(CMD_WAIT));
    drain();
    check(waiting, "wait");
    put(1, FLIT_C, 16'(CMD_CFG));
    drain();
    check(!waiting && run, "wait ends with next message");
    // done interrupt stops the program
    while (!tick) @(negedge clk);
    tp_done = 1; @(negedge clk); tp_done = 0;
    check(!run, "done clears run");
    // reset
    put(0, FLIT_C, 16'(CMD_RUN));
    put(0, FLIT_C, 16'(CMD_RST));
    while (!tp_rst) @(negedge clk);
    check(!run, "reset stops the program");
    repeat (4) @(negedge clk);
    check(!tp_rst, "reset released after a tile clock");

    // a retrieve interrupted by a new command on its channel stops early
    put(1, FLIT_C, 16'(CMD_RETR));
    put(1, FLIT_H, {6'd3, 10'h010});
    put(1, FLIT_D, 16'd100);
    while (q[1].size() != 0) @(negedge clk);
    repeat (8) @(negedge clk);
    put(1, FLIT_C, 16'(CMD_RUN));
    drain();
    repeat (20) @(negedge clk);
    check(replies[1].size() > 0 && replies[1].size() < 10, $sformatf("interrupted retrieve %0d", replies[1].size()));
    check(dut.g_ch[1].u_ch.retr_busy == 0, "retrieve engine idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

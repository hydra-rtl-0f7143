// tb_hydra_top: end-to-end test of the Hydra at its default sizes (4 NoC
// channels each way, 10 buses each way, 4-flit buffers, 16 decoder
// instructions), with a behavioural tile processor and a NoC driver/sink.
//
// Sequence:
//  1. Configuration message on channel 0: TP registers (program selection,
//     block length), Hydra decoder instructions and ROM flits, and the clock
//     divider (n = 1).
//  2. DMA load of a block into TP memory 2 on channel 1.
//  3. Run: the TP program (block mode) writes mem5[i] = mem2[i] + 1 and
//     signals done; the TP is halted before Run and after done.
//  4. DMA retrieve of mem5 on channel 2, checked on output channel 2.
//  5. Get status on channel 3.
//  6. A configuration message on channel 3 interrupted by a new command on
//     the same channel: the rest of the interrupted message is not executed.
//     Then all four channels load four memories and retrieve them in
//     parallel, in about the time one channel takes for one block.
//  7. Clock divider switched to n = 0 and the TP reconfigured to its
//     streaming program: it reads channels 0 and 1 through the crossbar,
//     sends their sums as D flits on channel 0, and every fourth sample an H
//     flit from the ROM on channel 1 and a D flit with the sample index on
//     channel 3 (a different decoder instruction). The NoC inputs have gaps
//     (stall on empty input) and the NoC outputs apply back-pressure (stall
//     on full output). A stray H flit on channel 0 is dropped. A Wait
//     message halts the TP in the middle until the next message.
//  8. Reset message.
// Each mechanism is counted and a failure is counted for one that never
// happened. The one-tile-cycle latency through the data path is checked on
// stream flits: a flit written at a tile clock edge is at the NoC output in
// the next cycle.
module tb_hydra_top;
  timeunit 1ns; timeprecision 100ps;
  import hydra_pkg::*;
  localparam int NC = 4, NB = 10, NI = 16;
  localparam int BLK = 16;       // block length
  localparam int NS  = 40;       // streaming samples

  logic clk = 0, rst_n = 0;
  logic  [NC-1:0]  noc_in_valid, noc_in_ready, noc_out_valid, noc_out_ready;
  flit_t [NC-1:0]  noc_in_flit, noc_out_flit;
  logic tp_tick, tp_clk_en, tp_rst, tp_halt, tp_done;
  logic [NB-1:0] tp_rd;
  logic [NB-1:0][1:0] tp_rd_ch;
  logic [NB-1:0][15:0] tp_bus_out, tp_bus_in;
  logic tp_send;
  logic [3:0] tp_instr;
  logic tp_cfg_we;
  logic [15:0] tp_cfg_addr, tp_cfg_wdata;
  logic [NC-1:0] tp_mem_we, tp_mem_re;
  logic [NC-1:0][15:0] tp_mem_wdata, tp_mem_rdata;
  logic [NC-1:0][5:0] tp_mem_sel;
  logic [NC-1:0][9:0] tp_mem_addr;
  int checks = 0, failures = 0;

  hydra_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t mk(input flit_type_e t, input logic [15:0] p);
    flit_t f; f.ftype = t; f.payload = p; return f;
  endfunction

  // ------------------------------------------------------------------
  // behavioural tile processor
  // ------------------------------------------------------------------
  logic [15:0] tp_cfg [256];
  logic [15:0] mem [10][1024];
  int          pc;
  logic        done_r;
  logic [15:0] res, res_idx;
  logic        has_res;
  int          n_in, n_out;
  int          tp_resets = 0;

  assign tp_done = done_r;
  always @(posedge clk) begin
    if (tp_tick) begin
      if (tp_cfg_we && tp_cfg_addr < 256) tp_cfg[tp_cfg_addr[7:0]] <= tp_cfg_wdata;
      for (int c = 0; c < NC; c++) begin
        if (tp_mem_we[c]) mem[tp_mem_sel[c]][tp_mem_addr[c]] <= tp_mem_wdata[c];
        if (tp_mem_re[c]) tp_mem_rdata[c] <= mem[tp_mem_sel[c]][tp_mem_addr[c]];
      end
      done_r <= 1'b0;
      if (tp_rst && rst_n) begin
        pc <= 0; has_res <= 0; n_in <= 0; n_out <= 0; tp_resets <= tp_resets + 1;
      end
    end
    if (tp_clk_en && !tp_rst) begin
      if (tp_cfg[0] == 0) begin
        // block program
        mem[5][pc] <= mem[2][pc] + 16'd1;
        pc <= pc + 1;
        if (pc == int'(tp_cfg[1]) - 1) begin done_r <= 1'b1; pc <= 0; end
      end else begin
        // streaming program
        if (tp_send) n_out <= n_out + 1;
        if (tp_rd[0]) begin
          res <= tp_bus_out[0] + tp_bus_out[3];
          res_idx <= 16'(n_in);
          has_res <= 1'b1;
          n_in <= n_in + 1;
        end else if (tp_send) has_res <= 1'b0;
        if (tp_send && n_out == NS - 1) done_r <= 1'b1;
      end
    end
  end

  always_comb begin
    tp_rd = '0; tp_rd_ch = '0; tp_send = 0; tp_instr = 0; tp_bus_in = '0;
    if (tp_cfg[0] == 1) begin
      tp_rd[0] = n_in < NS; tp_rd_ch[0] = 2'd0;
      tp_rd[3] = n_in < NS; tp_rd_ch[3] = 2'd1;
      tp_send  = has_res;
      tp_instr = (res_idx % 4 == 3) ? 4'd2 : 4'd1;
      tp_bus_in[0] = res;
      tp_bus_in[5] = res_idx;
    end
  end

  // ------------------------------------------------------------------
  // NoC side: input queues, output sink
  // ------------------------------------------------------------------
  flit_t inq [NC][$];
  flit_t outq [NC][$];
  logic [NC-1:0] gap, stream_bp;
  bit   backpressure = 0, gaps = 0;

  always_comb for (int c = 0; c < NC; c++) begin
    noc_in_valid[c] = inq[c].size() != 0 && !gap[c];
    noc_in_flit[c]  = inq[c].size() != 0 ? inq[c][0] : '0;
  end
  assign noc_out_ready = ~stream_bp;

  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      gap[c]       = gaps && ($urandom % 3 == 0);
      stream_bp[c] = backpressure && ($urandom % 3 != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] ip, op;
    flit_t [NC-1:0] of;
    ip = noc_in_valid & noc_in_ready;
    op = noc_out_valid & noc_out_ready;
    of = noc_out_flit;
    #0.2;
    for (int c = 0; c < NC; c++) begin
      if (ip[c]) void'(inq[c].pop_front());
      if (op[c]) outq[c].push_back(of[c]);
    end
  end

  // ------------------------------------------------------------------
  // mechanism counters
  // ------------------------------------------------------------------
  int n_stall_empty = 0, n_stall_full = 0, n_wait_halt = 0, n_idle_halt = 0;
  int n_in_full = 0, n_rom = 0, n_instr2 = 0, n_lat_ok = 0, n_lat_bad = 0;
  int n_reply_conflict = 0;
  logic lat_expect = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (tp_tick && dut.run && (tp_rd & ~dut.rd_ok) != '0) n_stall_empty++;
    if (tp_tick && dut.run && tp_send && !dut.send_ok) n_stall_full++;
    if (tp_tick && dut.waiting) n_wait_halt++;
    if (tp_tick && !dut.run) n_idle_halt++;
    if ((noc_in_valid & ~noc_in_ready) != '0) n_in_full++;
    if (tp_clk_en && tp_send && tp_instr == 2) n_instr2++;
    for (int c = 0; c < NC; c++)
      if (dut.reply_valid[c] && tp_send && dut.u_fmt.cur[c].en) n_reply_conflict++;
  end
  // latency: a stream flit written into an empty channel-0 buffer appears at
  // the output in the next cycle
  always @(posedge clk) begin
    lat_expect <= rst_n && tp_clk_en && tp_send && dut.g_ch[0].u_out_fifo.count == 0;
    if (lat_expect) begin
      if (noc_out_valid[0]) n_lat_ok++; else n_lat_bad++;
    end
  end

  // measure the tile clock period
  int tick_last, tick_per;
  int ret_first = -1, ret_last = 0;
  always @(posedge clk) if (rst_n && noc_out_valid[2] && noc_out_ready[2] && noc_out_flit[2].ftype == FLIT_D && dut.u_msg.g_ch[2].u_ch.cmd != CMD_STATUS) begin
    if (ret_first < 0) ret_first = cyc;
    ret_last = cyc;
  end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (tp_tick) begin tick_per = cyc - tick_last; tick_last = cyc; end
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_drained(input int c);
    while (inq[c].size() != 0) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_entry_t e;
    int base;
    logic [15:0] status;
    for (int i = 0; i < 256; i++) tp_cfg[i] = 0;
    for (int m = 0; m < 10; m++) for (int a = 0; a < 1024; a++) mem[m][a] = 0;
    pc = 0; done_r = 0; has_res = 0; res = 0; res_idx = 0; n_in = 0; n_out = 0;
    tp_mem_rdata = '0; gap = 0; stream_bp = 0; tick_last = 0; tick_per = 0;
    repeat (3) @(negedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---- 1. configuration ------------------------------------------
    inq[0].push_back(mk(FLIT_C, 16'(CMD_CFG)));
    inq[0].push_back(mk(FLIT_H, 16'h0000));
    inq[0].push_back(mk(FLIT_D, 16'd0));          // program: block
    inq[0].push_back(mk(FLIT_D, 16'(BLK)));       // block length
    // instruction 1: channel 0 D flit from bus 0
    e = '0; e.en = 1; e.ftype = FLIT_D; e.bus_sel = 0;
    inq[0].push_back(mk(FLIT_H, ADDR_INSTR + 16'(1*NC + 0)));
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    // instruction 2: ch0 as above, ch1 H flit from ROM entry 1, ch3 D flit from bus 5
    inq[0].push_back(mk(FLIT_H, ADDR_INSTR + 16'(2*NC + 0)));
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    e = '0; e.en = 1; e.from_rom = 1; e.rom_idx = 1; e.ftype = FLIT_H;
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    inq[0].push_back(mk(FLIT_D, 16'h0000));
    e = '0; e.en = 1; e.ftype = FLIT_D; e.bus_sel = 5;
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    inq[0].push_back(mk(FLIT_H, ADDR_ROM + 16'(1*4 + 1)));
    inq[0].push_back(mk(FLIT_D, 16'hBEEF));
    inq[0].push_back(mk(FLIT_H, ADDR_CLKDIV));
    inq[0].push_back(mk(FLIT_D, 16'd1));
    inq[0].push_back(mk(FLIT_T, 16'h0));
    wait_drained(0);
    wait_cycles(10);
    check(tp_cfg[1] == 16'(BLK), "TP configured");
    check(dut.u_fmt.rom[5] == 16'hBEEF, "ROM configured");
    check(dut.clkdiv_n == 1, "divider set");
    wait_cycles(4);
    check(tick_per == 2, $sformatf("tile clock = NoC/2 (%0d)", tick_per));

    // ---- 2. DMA load -----------------------------------------------
    inq[1].push_back(mk(FLIT_C, 16'(CMD_LOAD)));
    inq[1].push_back(mk(FLIT_H, {6'd2, 10'h000}));
    for (int i = 0; i < BLK; i++) inq[1].push_back(mk(FLIT_D, 16'h1000 + 16'(i * 3)));
    inq[1].push_back(mk(FLIT_T, 16'h0));
    wait_drained(1);
    wait_cycles(10);
    for (int i = 0; i < BLK; i++) check(mem[2][i] == 16'h1000 + 16'(i * 3), "DMA load");
    check(mem[5][0] == 0, "TP halted before Run");

    // ---- 3. run block program --------------------------------------
    inq[0].push_back(mk(FLIT_C, 16'(CMD_RUN)));
    base = cyc;
    while (!dut.run) @(negedge clk);
    while (dut.run && cyc - base < 1000) @(negedge clk);
    check(!dut.run, "done ends the run");
    for (int i = 0; i < BLK; i++) check(mem[5][i] == 16'h1001 + 16'(i * 3), "block result");

    // ---- 4. DMA retrieve -------------------------------------------
    inq[2].push_back(mk(FLIT_C, 16'(CMD_RETR)));
    inq[2].push_back(mk(FLIT_H, {6'd5, 10'h000}));
    inq[2].push_back(mk(FLIT_D, 16'(BLK)));
    inq[2].push_back(mk(FLIT_T, 16'h0));
    base = cyc;
    while (outq[2].size() < BLK && cyc - base < 2000) @(negedge clk);
    check(outq[2].size() == BLK, "retrieve count");
    check(ret_last - ret_first <= 2 * (BLK - 1) + 1, $sformatf("retrieve rate one word per tile cycle (%0d cycles)", ret_last - ret_first));
    for (int i = 0; i < BLK && i < outq[2].size(); i++)
      check(outq[2][i].ftype == FLIT_D && outq[2][i].payload == 16'h1001 + 16'(i * 3), "retrieve data");
    outq[2].delete();

    // ---- 5. status -------------------------------------------------
    inq[3].push_back(mk(FLIT_C, 16'(CMD_STATUS)));
    base = cyc;
    while (outq[3].size() == 0 && cyc - base < 200) @(negedge clk);
    check(outq[3].size() == 1, "status reply");
    if (outq[3].size() == 1) begin
      status = outq[3][0].payload;
      check(status[15] == 0 && status[2:0] == 3'd1, "status: stopped, n = 1");
    end
    outq[3].delete();

    // ---- 6. interrupted configuration ------------------------------
    inq[3].push_back(mk(FLIT_C, 16'(CMD_CFG)));
    inq[3].push_back(mk(FLIT_H, 16'h0040));
    inq[3].push_back(mk(FLIT_D, 16'h4400));
    inq[3].push_back(mk(FLIT_D, 16'h4401));
    inq[3].push_back(mk(FLIT_C, 16'(CMD_CFG)));   // interrupts the message above
    inq[3].push_back(mk(FLIT_D, 16'h4402));       // body without a header: ignored
    inq[3].push_back(mk(FLIT_H, 16'h0080));
    inq[3].push_back(mk(FLIT_D, 16'h8800));
    inq[3].push_back(mk(FLIT_T, 16'h0));
    wait_drained(3);
    wait_cycles(20);
    check(tp_cfg[16'h40] == 16'h4400 && tp_cfg[16'h41] == 16'h4401, "interrupted message written so far");
    check(tp_cfg[16'h42] == 0, "interrupted message not continued");
    check(tp_cfg[16'h80] == 16'h8800, "interrupting message executed");

    // ---- 6b. parallel DMA on all four channels ---------------------
    for (int c = 0; c < NC; c++) begin
      inq[c].push_back(mk(FLIT_C, 16'(CMD_LOAD)));
      inq[c].push_back(mk(FLIT_H, {6'(6 + c), 10'h000}));
      for (int i = 0; i < BLK; i++) inq[c].push_back(mk(FLIT_D, 16'(c * 256 + i)));
      inq[c].push_back(mk(FLIT_T, 16'h0));
    end
    base = cyc;
    while (inq[0].size() + inq[1].size() + inq[2].size() + inq[3].size() != 0) @(negedge clk);
    // BLK + 3 flits per channel, one per tile clock (2 cycles), all channels at once
    check(cyc - base <= 2 * (BLK + 3) + 8, $sformatf("parallel load in %0d cycles", cyc - base));
    wait_cycles(10);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < BLK; i++) check(mem[6 + c][i] == 16'(c * 256 + i), "parallel load data");
    for (int c = 0; c < NC; c++) begin
      inq[c].push_back(mk(FLIT_C, 16'(CMD_RETR)));
      inq[c].push_back(mk(FLIT_H, {6'(6 + c), 10'h000}));
      inq[c].push_back(mk(FLIT_D, 16'(BLK)));
      inq[c].push_back(mk(FLIT_T, 16'h0));
    end
    base = cyc;
    while ((outq[0].size() < BLK || outq[1].size() < BLK || outq[2].size() < BLK ||
            outq[3].size() < BLK) && cyc - base < 2000) @(negedge clk);
    check(cyc - base <= 2 * (BLK + 4) + 8, $sformatf("parallel retrieve in %0d cycles", cyc - base));
    for (int c = 0; c < NC; c++) begin
      check(outq[c].size() == BLK, "parallel retrieve count");
      for (int i = 0; i < BLK && i < outq[c].size(); i++)
        check(outq[c][i].payload == 16'(c * 256 + i), "parallel retrieve data");
      outq[c].delete();
    end

    // ---- 7. streaming ----------------------------------------------
    inq[0].push_back(mk(FLIT_C, 16'(CMD_CFG)));
    inq[0].push_back(mk(FLIT_H, ADDR_CLKDIV));
    inq[0].push_back(mk(FLIT_D, 16'd0));
    inq[0].push_back(mk(FLIT_H, 16'h0000));
    inq[0].push_back(mk(FLIT_D, 16'd1));          // program: streaming
    inq[0].push_back(mk(FLIT_T, 16'h0));
    inq[0].push_back(mk(FLIT_C, 16'(CMD_RUN)));
    inq[0].push_back(mk(FLIT_H, 16'hDEAD));       // stray header, dropped
    wait_drained(0);
    wait_cycles(6);
    check(tick_per == 1, "tile clock = NoC clock");
    gaps = 1; backpressure = 1;
    for (int i = 0; i < NS; i++) begin
      inq[0].push_back(mk(FLIT_D, 16'(100 + i)));
      inq[1].push_back(mk(FLIT_D, 16'(7 * i)));
    end
    // wait in the middle
    while (n_out < NS / 2) @(negedge clk);
    inq[2].push_back(mk(FLIT_C, 16'(CMD_WAIT)));
    while (!dut.waiting) @(negedge clk);
    base = n_out;
    wait_cycles(30);
    check(n_out == base, "no progress while waiting");
    inq[2].push_back(mk(FLIT_C, 16'(CMD_STATUS)));
    base = cyc;
    while (dut.run && cyc - base < 5000) @(negedge clk);
    check(!dut.run, "stream program finished");
    backpressure = 0;
    wait_cycles(20);
    check(outq[0].size() == NS, $sformatf("stream flits %0d", outq[0].size()));
    for (int i = 0; i < NS && i < outq[0].size(); i++)
      check(outq[0][i].ftype == FLIT_D && outq[0][i].payload == 16'(100 + i + 7 * i), $sformatf("stream data %0d: %h %h", i, outq[0][i].ftype, outq[0][i].payload));
    check(outq[1].size() == NS / 4, "ROM flits");
    for (int i = 0; i < outq[1].size(); i++) begin
      check(outq[1][i].ftype == FLIT_H && outq[1][i].payload == 16'hBEEF, "ROM flit");
      n_rom++;
    end
    check(outq[3].size() == NS / 4, "instruction 2 flits");
    for (int i = 0; i < outq[3].size(); i++)
      check(outq[3][i].ftype == FLIT_D && outq[3][i].payload == 16'(4 * i + 3), "instruction 2 data");
    check(outq[2].size() == 1 && outq[2][0].payload[15:14] == 2'b11, "status shows running and waiting");

    // ---- 8. reset --------------------------------------------------
    inq[1].push_back(mk(FLIT_C, 16'(CMD_RST)));
    wait_drained(1);
    wait_cycles(5);
    check(tp_resets == 1, $sformatf("TP reset once (%0d)", tp_resets));
    check(!tp_rst, "reset released");

    // ---- mechanisms ------------------------------------------------
    $display("stall_empty=%0d stall_full=%0d wait_halt=%0d idle_halt=%0d in_full=%0d rom=%0d instr2=%0d lat_ok=%0d lat_bad=%0d reply_conflict=%0d",
             n_stall_empty, n_stall_full, n_wait_halt, n_idle_halt, n_in_full, n_rom, n_instr2, n_lat_ok, n_lat_bad, n_reply_conflict);
    check(n_stall_empty > 0, "stall on empty input happened");
    check(n_stall_full > 0, "stall on full output happened");
    check(n_wait_halt > 0, "wait halt happened");
    check(n_idle_halt > 0, "halt before run happened");
    check(n_in_full > 0, "input back-pressure happened");
    check(n_rom > 0, "ROM flits sent");
    check(n_instr2 > 0, "instruction switch happened");
    check(n_lat_ok > 0 && n_lat_bad == 0, "one-cycle data path latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

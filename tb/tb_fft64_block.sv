// tb_fft64_block: the HiperLAN/2 64-point FFT in block mode with four
// parallel channels, run on the full-size interface at the fastest tile
// clock (n = 0, tile clock = NoC clock).
//
// One OFDM symbol lasts 4 us, that is 400 cycles at 100 MHz. In block mode
// the 64 complex input samples (128 words) are loaded by DMA, the TP
// computes, and the 128 result words are retrieved. With the words spread
// over L = 4 channels the transfers need about 4*64/4 = 64 cycles, and a
// radix-2 FFT-64 on the TP takes (64/2 + 2) * log2(64) = 204 cycles.
//
// The manager (this testbench) sends four DMA loads of 32 words, one per
// channel, then Run; when the TP signals done it sends four DMA retrieves
// of 32 words. The TP is a behavioural stand-in: after Run it spends 204
// tile cycles and writes a known function of the inputs (out = in xor 0x5A5A,
// reversed within each block) to memories 4..7, then pulses done. The test
// checks the data on all four output channels and that the whole symbol,
// from the first C flit to the last retrieved word, takes at most 400
// cycles, with the two transfer phases each close to 2N/L cycles.
module tb_fft64_block;
  timeunit 1ns; timeprecision 100ps;
  import hydra_pkg::*;
  localparam int NC = 4, NB = 10;
  localparam int N = 64;               // FFT points
  localparam int WORDS = 2 * N;        // complex samples as 16-bit words
  localparam int PER_CH = WORDS / NC;  // words per channel
  localparam int T_COMP = (N / 2 + 2) * 6;
  localparam int SYMBOL = 400;         // cycles per symbol at 100 MHz

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
  int cyc = 0;

  hydra_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t mk(input flit_type_e t, input logic [15:0] p);
    flit_t f; f.ftype = t; f.payload = p; return f;
  endfunction

  // no streaming in this workload
  assign tp_rd = '0, tp_rd_ch = '0, tp_send = 1'b0, tp_instr = '0, tp_bus_in = '0;

  // behavioural TP: memories 0..7, a fixed-length compute phase
  logic [15:0] mem [8][1024];
  int          busy;
  logic        done_r;
  assign tp_done = done_r;
  always @(posedge clk) begin
    if (tp_tick) begin
      for (int c = 0; c < NC; c++) begin
        if (tp_mem_we[c]) mem[tp_mem_sel[c][2:0]][tp_mem_addr[c]] <= tp_mem_wdata[c];
        if (tp_mem_re[c]) tp_mem_rdata[c] <= mem[tp_mem_sel[c][2:0]][tp_mem_addr[c]];
      end
      done_r <= 1'b0;
    end
    if (tp_clk_en && !tp_rst) begin
      busy <= busy + 1;
      if (busy == T_COMP - 1) begin
        for (int c = 0; c < NC; c++)
          for (int i = 0; i < PER_CH; i++)
            mem[4 + c][i] <= mem[c][PER_CH - 1 - i] ^ 16'h5A5A;
        done_r <= 1'b1;
        busy   <= 0;
      end
    end
  end

  // NoC side: the manager's queues and an always-ready sink
  flit_t inq [NC][$];
  flit_t outq [NC][$];
  int    last_out = 0;
  always_comb for (int c = 0; c < NC; c++) begin
    noc_in_valid[c] = inq[c].size() != 0;
    noc_in_flit[c]  = inq[c].size() != 0 ? inq[c][0] : '0;
  end
  assign noc_out_ready = '1;
  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] ip, op;
    flit_t [NC-1:0] of;
    ip = noc_in_valid & noc_in_ready;
    op = noc_out_valid;
    of = noc_out_flit;
    #0.2;
    for (int c = 0; c < NC; c++) begin
      if (ip[c]) void'(inq[c].pop_front());
      if (op[c]) begin outq[c].push_back(of[c]); last_out = cyc; end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x [NC][PER_CH];
    int t_start, t_loaded, t_done, t_end;
    for (int m = 0; m < 8; m++) for (int a = 0; a < 1024; a++) mem[m][a] = '0;
    busy = 0; done_r = 0; tp_mem_rdata = '0;
    for (int c = 0; c < NC; c++) for (int i = 0; i < PER_CH; i++) x[c][i] = 16'($urandom);
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    check(dut.clkdiv_n == 0, "tile clock = NoC clock after reset");

    // load the symbol over four channels, then Run
    t_start = cyc;
    for (int c = 0; c < NC; c++) begin
      inq[c].push_back(mk(FLIT_C, 16'(CMD_LOAD)));
      inq[c].push_back(mk(FLIT_H, {6'(c), 10'h000}));
      for (int i = 0; i < PER_CH; i++) inq[c].push_back(mk(FLIT_D, x[c][i]));
      inq[c].push_back(mk(FLIT_T, 16'h0));
    end
    inq[0].push_back(mk(FLIT_C, 16'(CMD_RUN)));
    while (inq[1].size() + inq[2].size() + inq[3].size() != 0) @(negedge clk);
    t_loaded = cyc;
    while (!tp_done) @(negedge clk);
    t_done = cyc;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < PER_CH; i++) check(mem[c][i] == x[c][i], "loaded data");

    // retrieve the result over four channels
    for (int c = 0; c < NC; c++) begin
      inq[c].push_back(mk(FLIT_C, 16'(CMD_RETR)));
      inq[c].push_back(mk(FLIT_H, {6'(4 + c), 10'h000}));
      inq[c].push_back(mk(FLIT_D, 16'(PER_CH)));
      inq[c].push_back(mk(FLIT_T, 16'h0));
    end
    while ((outq[0].size() < PER_CH || outq[1].size() < PER_CH ||
            outq[2].size() < PER_CH || outq[3].size() < PER_CH) && cyc - t_done < 1000)
      @(negedge clk);
    t_end = last_out;
    for (int c = 0; c < NC; c++) begin
      check(outq[c].size() == PER_CH, $sformatf("retrieved %0d words on channel %0d", outq[c].size(), c));
      for (int i = 0; i < PER_CH && i < outq[c].size(); i++)
        check(outq[c][i].ftype == FLIT_D && outq[c][i].payload == (x[c][PER_CH - 1 - i] ^ 16'h5A5A), "result data");
    end
    $display("load %0d cycles, compute %0d cycles, retrieve %0d cycles, symbol %0d of %0d cycles",
             t_loaded - t_start, t_done - t_loaded, t_end - t_done, t_end - t_start, SYMBOL);
    check(t_loaded - t_start <= PER_CH + 8, "load close to 2N/L cycles");
    check(t_end - t_done <= PER_CH + 8, "retrieve close to 2N/L cycles");
    check(t_done - t_loaded >= T_COMP, "compute phase length");
    check(t_end - t_start <= SYMBOL, "one symbol within 4 us at 100 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

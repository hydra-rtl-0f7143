// tb_rake_stream: a UMTS RAKE-receiver style streaming workload on the
// full-size interface, with the tile clock slowed to f_NoC / 8 (n = 3).
//
// The manager configures the divider and one decoder instruction, starts the
// TP, and then streams on all four input channels at once: finger samples
// (real part on channel 0, imaginary part on channel 1) and a complex
// scrambling code (real on channel 2, imaginary on channel 3). The TP model
// reads one complex finger sample every other tile cycle, takes a new code
// with every fourth sample and uses it for four samples, and after four such
// groups (16 samples) sends the accumulated complex sum (real on output
// channel 0, imaginary on output channel 1, one decoder instruction).
// Its arithmetic is a stand-in: products truncated to 16 bits.
//
// Checks: the tile clock period is 8 NoC cycles; every result matches a
// reference computed here; and with the NoC keeping the buffers filled the
// TP never stalls, so each result takes 32 tile cycles (2 per sample).
module tb_rake_stream;
  timeunit 1ns; timeprecision 100ps;
  import hydra_pkg::*;
  localparam int NC = 4, NB = 10;
  localparam int NRES = 12;            // results
  localparam int NSMP = 16 * NRES;     // finger samples
  localparam int NCODE = NSMP / 4;     // scrambling codes

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
  assign tp_mem_rdata = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t mk(input flit_type_e t, input logic [15:0] p);
    flit_t f; f.ftype = t; f.payload = p; return f;
  endfunction

  // ------------------------------------------------------------------
  // behavioural TP running the RAKE loop
  // ------------------------------------------------------------------
  int          phase;       // 0: read a sample, 1: process it
  int          n_smp, n_res, n_tiles, n_stall;
  logic [15:0] cr, ci, sr, si, acc_r, acc_i;
  logic        send_pend, done_r;
  logic        running;
  assign tp_done = done_r;

  always_comb begin
    tp_rd = '0; tp_rd_ch = '0; tp_send = 1'b0; tp_instr = 4'd1; tp_bus_in = '0;
    if (running && phase == 0 && n_smp < NSMP) begin
      tp_rd[0] = 1'b1; tp_rd_ch[0] = 2'd0;
      tp_rd[1] = 1'b1; tp_rd_ch[1] = 2'd1;
      if (n_smp % 4 == 0) begin
        tp_rd[2] = 1'b1; tp_rd_ch[2] = 2'd2;
        tp_rd[3] = 1'b1; tp_rd_ch[3] = 2'd3;
      end
    end
    if (running && send_pend) begin
      tp_send = 1'b1;
      tp_bus_in[0] = acc_r;
      tp_bus_in[1] = acc_i;
    end
  end

  always @(posedge clk) begin
    if (tp_tick) done_r <= 1'b0;
    if (tp_tick && running && dut.run && !tp_clk_en) n_stall <= n_stall + 1;
    if (tp_tick && tp_rst) begin
      phase <= 0; n_smp <= 0; n_res <= 0; send_pend <= 0; acc_r <= 0; acc_i <= 0;
    end else if (tp_clk_en && running) begin
      n_tiles <= n_tiles + 1;
      if (tp_send) begin
        send_pend <= 1'b0;
        n_res <= n_res + 1;
        if (n_res == NRES - 1) done_r <= 1'b1;
      end
      if (phase == 0 && n_smp < NSMP) begin
        sr <= tp_bus_out[0];
        si <= tp_bus_out[1];
        if (n_smp % 4 == 0) begin cr <= tp_bus_out[2]; ci <= tp_bus_out[3]; end
        phase <= 1;
      end else if (phase == 1) begin
        // acc += s * c (complex), 16-bit truncated; a new sum every 16 samples
        acc_r <= (n_smp % 16 == 0 ? 16'd0 : acc_r) + 16'(sr * cr - si * ci);
        acc_i <= (n_smp % 16 == 0 ? 16'd0 : acc_i) + 16'(sr * ci + si * cr);
        phase <= 0;
        n_smp <= n_smp + 1;
        if (n_smp % 16 == 15) send_pend <= 1'b1;
      end
    end
  end
  // ------------------------------------------------------------------
  // NoC side
  // ------------------------------------------------------------------
  flit_t inq [NC][$];
  flit_t outq [NC][$];
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
      if (op[c]) outq[c].push_back(of[c]);
    end
  end

  int tick_last = 0, tick_per = 0;
  always @(posedge clk) if (tp_tick) begin tick_per = cyc - tick_last; tick_last = cyc; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_entry_t e;
    logic [15:0] xr [NSMP], xi [NSMP], kr [NCODE], ki [NCODE];
    logic [15:0] er, ei;
    int t0, tiles0;
    running = 0; phase = 0; n_smp = 0; n_res = 0; n_tiles = 0; n_stall = 0;
    send_pend = 0; done_r = 0; acc_r = 0; acc_i = 0; sr = 0; si = 0; cr = 0; ci = 0;
    for (int i = 0; i < NSMP; i++) begin xr[i] = 16'($urandom); xi[i] = 16'($urandom); end
    for (int i = 0; i < NCODE; i++) begin
      kr[i] = ($urandom % 2) ? 16'd1 : 16'hFFFF;  // +-1 codes
      ki[i] = ($urandom % 2) ? 16'd1 : 16'hFFFF;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;

    // configuration: n = 3; instruction 1 = D flits from bus 0 on channel 0
    // and from bus 1 on channel 1
    inq[0].push_back(mk(FLIT_C, 16'(CMD_CFG)));
    inq[0].push_back(mk(FLIT_H, ADDR_CLKDIV));
    inq[0].push_back(mk(FLIT_D, 16'd3));
    inq[0].push_back(mk(FLIT_H, ADDR_INSTR + 16'(1 * NC)));
    e = '0; e.en = 1; e.ftype = FLIT_D; e.bus_sel = 0;
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    e.bus_sel = 1;
    inq[0].push_back(mk(FLIT_D, 16'(e)));
    inq[0].push_back(mk(FLIT_T, 16'h0));
    inq[0].push_back(mk(FLIT_C, 16'(CMD_RUN)));
    while (inq[0].size() != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    check(tick_per == 8, $sformatf("tile clock = NoC / 8 (%0d)", tick_per));
    check(dut.run, "program started");

    // stream all four channels
    for (int i = 0; i < NSMP; i++) begin
      inq[0].push_back(mk(FLIT_D, xr[i]));
      inq[1].push_back(mk(FLIT_D, xi[i]));
    end
    for (int i = 0; i < NCODE; i++) begin
      inq[2].push_back(mk(FLIT_D, kr[i]));
      inq[3].push_back(mk(FLIT_D, ki[i]));
    end
    @(negedge clk);
    while (!tp_tick) @(negedge clk);
    @(negedge clk);
    running = 1;
    t0 = cyc; tiles0 = n_tiles;
    while (dut.run && cyc - t0 < 90000) @(negedge clk);
    check(!dut.run, "program finished");
    repeat (20) @(negedge clk);

    // reference
    check(outq[0].size() == NRES && outq[1].size() == NRES, $sformatf("results %0d %0d", outq[0].size(), outq[1].size()));
    er = 0; ei = 0;
    for (int i = 0; i < NSMP; i++) begin
      if (i % 16 == 0) begin er = 0; ei = 0; end
      er = er + 16'(xr[i] * kr[i / 4] - xi[i] * ki[i / 4]);
      ei = ei + 16'(xr[i] * ki[i / 4] + xi[i] * kr[i / 4]);
      if (i % 16 == 15) begin
        if (outq[0].size() > i / 16 && outq[1].size() > i / 16)
          check(outq[0][i / 16].payload == er && outq[1][i / 16].payload == ei,
                $sformatf("result %0d: %h %h vs %h %h", i / 16, outq[0][i / 16].payload, outq[1][i / 16].payload, er, ei));
      end
    end
    $display("tile cycles %0d for %0d samples, stalls %0d", n_tiles - tiles0, NSMP, n_stall);
    check(n_stall == 0, "no stall while the NoC keeps up");
    check(n_tiles - tiles0 <= 2 * NSMP + 2, "two tile cycles per sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flow_control: drives the heads of four input buffers from per-channel
// queues and checks how flits are routed: C flits to the channel's message
// context, message flits while the channel's flag is set (and held while the
// context is not ready), the flag rules for commands with and without a
// body, dropping of stray H/T flits, stream D flits offered to the TP, and
// the halt / advance rules.
module tb_flow_control;
  timeunit 1ns; timeprecision 100ps;
  import hydra_pkg::*;
  localparam int NC = 4, NB = 10;
  logic clk = 0, rst_n = 0;
  flit_t [NC-1:0] head;
  logic [NC-1:0] head_valid, pop;
  logic [NC-1:0] msg_valid, c_ready, f_ready;
  flit_t [NC-1:0] msg_flit;
  logic [NC-1:0] stream_avail, stream_req, in_msg, dropped;
  logic [NB-1:0] tp_rd, tp_rd_ok;
  logic tp_send, tp_send_ok, tick, run, waiting, stall, halt, advance;
  int checks = 0, failures = 0;

  flow_control #(.N_CH(NC), .N_BUS(NB)) dut (.*);
  always #5 clk = ~clk;

  flit_t q [NC][$];
  flit_t got [NC][$];      // flits seen by each message context
  int n_drop = 0, n_stream = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t mk(input flit_type_e t, input logic [15:0] p);
    flit_t f; f.ftype = t; f.payload = p; return f;
  endfunction

  always_comb for (int c = 0; c < NC; c++) begin
    head_valid[c] = q[c].size() != 0;
    head[c] = head_valid[c] ? q[c][0] : '0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consume popped flits just after the clock edge
  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] p, mv, sr, dr;
    p = pop; mv = msg_valid; sr = stream_req & {NC{advance}}; dr = dropped;
    #0.2;
    for (int c = 0; c < NC; c++) if (p[c]) begin
      if (mv[c]) got[c].push_back(q[c][0]);
      else if (sr[c]) n_stream++;
      else if (dr[c]) n_drop++;
      void'(q[c].pop_front());
    end
  end

  assign tp_rd_ok = '1;
  // the TP reads channel 1 whenever it has stream data
  assign stream_req = {2'b00, stream_avail[1], 1'b0};

  initial begin
    c_ready = '1; f_ready = '1; tp_rd = 0; tp_send = 0; tp_send_ok = 1; tick = 1; run = 1; waiting = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // channel 2: a configuration message; channel 1: stray H, then stream data
    q[2] = '{mk(FLIT_C, 16'(CMD_CFG)), mk(FLIT_H, 16'h0010), mk(FLIT_D, 16'h1111), mk(FLIT_T, 0)};
    q[1] = '{mk(FLIT_H, 16'h0abc), mk(FLIT_D, 16'h5555), mk(FLIT_D, 16'h6666)};
    @(posedge clk); #1;
    check(got[2].size() == 1 && got[2][0].ftype == FLIT_C, "C taken from ch2");
    check(in_msg[2] == 1, "ch2 in message");
    check(n_drop == 1, "stray H dropped");
    @(posedge clk); #1;
    check(n_stream == 1, "stream data read in parallel with the message");
    repeat (3) @(posedge clk); #1;
    check(got[2].size() == 4 && got[2][3].ftype == FLIT_T, "whole message delivered");
    check(in_msg[2] == 0, "T ends message");
    check(n_stream == 2, "stream data on ch1");
    // f_ready low holds message flits; C flits still pass
    f_ready[3] = 0;
    q[3] = '{mk(FLIT_C, 16'(CMD_LOAD)), mk(FLIT_H, 16'h0400), mk(FLIT_D, 16'h2222)};
    q[0] = '{mk(FLIT_C, 16'(CMD_RETR)), mk(FLIT_H, 16'h0000), mk(FLIT_D, 16'h0002), mk(FLIT_T, 0)};
    repeat (3) @(posedge clk); #1;
    check(got[3].size() == 1 && q[3].size() == 2, "message flits held while not ready");
    check(got[0].size() == 3, "other channel not blocked");
    f_ready[3] = 1;
    repeat (2) @(posedge clk); #1;
    check(got[3].size() == 3, "held flits delivered when ready");
    check(in_msg[3] == 1 && in_msg[0] == 0, "flags");
    // a bodiless command ends the message on its channel
    q[3] = '{mk(FLIT_C, 16'(CMD_STATUS)), mk(FLIT_D, 16'h7777)};
    c_ready[3] = 0;
    repeat (2) @(posedge clk); #1;
    check(got[3].size() == 3, "C held while context busy");
    c_ready[3] = 1;
    @(posedge clk); #1;
    check(got[3].size() == 4 && in_msg[3] == 0, "bodiless command clears the flag");
    check(stream_avail[3] == 1, "following D flit is stream data");
    // halt rules
    run = 0; #1; check(halt && !advance, "halt when not running");
    run = 1; #1; check(!halt && advance, "advance when running");
    waiting = 1; #1; check(halt, "halt when waiting");
    waiting = 0; tp_send = 1; tp_send_ok = 0; #1; check(stall && halt, "stall on full output");
    tp_send_ok = 1; tp_rd = 10'b1; #1; check(!stall, "no stall");
    tick = 0; #1; check(!advance, "advance only on tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flit_formatter: configures decoder instructions and ROM entries through
// the configuration port, then checks streaming sends (types, bus and ROM
// payloads, per-channel enables), reply insertion as D flits with priority
// over stream data, and send_ok when a buffer is full or taken by a reply.
module tb_flit_formatter;
  import hydra_pkg::*;
  localparam int NC = 4, NI = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [15:0] cfg_addr, cfg_wdata;
  logic [3:0] instr_sel;
  logic send_req, advance, send_ok;
  logic [NC-1:0][3:0] bus_sel;
  logic [NC-1:0][15:0] bus_data;
  logic [NC-1:0] reply_valid, reply_ready;
  logic [NC-1:0][15:0] reply_data;
  logic [NC-1:0] fifo_full, push;
  flit_t [NC-1:0] push_flit;
  int checks = 0, failures = 0;

  dec_entry_t model_instr [NI][NC];
  logic [15:0] model_rom [NC][4];

  flit_formatter #(.NUM_CH(NC), .NUM_INSTR(NI), .ROM_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cfg_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // bus model: the payload on the bus feeding channel c is a function of its select
  function automatic logic [15:0] busval(input logic [3:0] s);
    return 16'hB000 | 16'(s);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int c = 0; c < NC; c++) bus_data[c] = busval(bus_sel[c]);

  initial begin
    dec_entry_t e;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; instr_sel = 0; send_req = 0; advance = 0;
    reply_valid = 0; reply_data = 0; fifo_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program all instructions and ROMs with random contents
    for (int i = 0; i < NI; i++)
      for (int c = 0; c < NC; c++) begin
        e = dec_entry_t'(16'($urandom));
        e.rsvd = '0;
        e.bus_sel = 4'($urandom % 10);
        model_instr[i][c] = e;
        cfg_write(ADDR_INSTR + 16'(i*NC + c), 16'(e));
      end
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < 4; r++) begin
        model_rom[c][r] = 16'($urandom);
        cfg_write(ADDR_ROM + 16'(c*4 + r), model_rom[c][r]);
      end
    // writes outside the ranges are ignored
    cfg_write(ADDR_CLKDIV, 16'hFFFF);
    // random stimulus
    for (int t = 0; t < 2000; t++) begin
      logic exp_ok;
      @(negedge clk);
      instr_sel   = 4'($urandom);
      send_req    = 1'($urandom);
      for (int c = 0; c < NC; c++) begin
        reply_valid[c] = ($urandom % 6) == 0;
        reply_data[c]  = 16'($urandom);
      end
      fifo_full   = ($urandom % 3 == 0) ? 4'($urandom) : '0;
      #1;
      exp_ok = 1;
      for (int c = 0; c < NC; c++)
        if (model_instr[instr_sel][c].en && (fifo_full[c] || reply_valid[c]))
          exp_ok = 0;
      check(send_ok == exp_ok, "send_ok");
      check(reply_ready == (reply_valid & ~fifo_full), "reply_ready");
      advance = send_req && exp_ok && ($urandom % 4 != 0);
      #1;
      for (int c = 0; c < NC; c++) begin
        dec_entry_t m;
        m = model_instr[instr_sel][c];
        if (reply_valid[c] && !fifo_full[c]) begin
          check(push[c] && push_flit[c].ftype == FLIT_D && push_flit[c].payload == reply_data[c], "reply flit");
        end else if (send_req && advance && m.en) begin
          check(push[c], "stream push");
          check(push_flit[c].ftype == m.ftype, "stream type");
          check(push_flit[c].payload == (m.from_rom ? model_rom[c][m.rom_idx] : busval(m.bus_sel)),
                $sformatf("stream payload ch%0d", c));
        end else begin
          check(!push[c], "no push");
        end
      end
      @(posedge clk);
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

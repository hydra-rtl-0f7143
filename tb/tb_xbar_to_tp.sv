// tb_xbar_to_tp: random channel selections and read requests; bus data,
// bus_ok and the per-channel read requests are compared with a model.
module tb_xbar_to_tp;
  localparam int NC = 4, NB = 10, DW = 16;
  logic [NC-1:0][DW-1:0] ch_data;
  logic [NC-1:0] ch_avail, ch_req, exp_req;
  logic [NB-1:0] rd, bus_ok;
  logic [NB-1:0][1:0] sel;
  logic [NB-1:0][DW-1:0] bus_data;
  int checks = 0, failures = 0;

  xbar_to_tp #(.NUM_CH(NC), .NUM_BUS(NB), .DATA_W(DW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int c = 0; c < NC; c++) ch_data[c] = DW'($urandom);
      ch_avail = NC'($urandom);
      rd = NB'($urandom);
      for (int b = 0; b < NB; b++) sel[b] = 2'($urandom);
      #1;
      exp_req = '0;
      for (int b = 0; b < NB; b++) begin
        check(bus_data[b] == ch_data[sel[b]], "bus data");
        check(bus_ok[b] == ch_avail[sel[b]], "bus ok");
        if (rd[b]) exp_req[sel[b]] = 1'b1;
      end
      check(ch_req == exp_req, "channel request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_xbar_to_noc: random bus selections per output channel, including
// selections beyond the last bus (which give zero).
module tb_xbar_to_noc;
  localparam int NC = 4, NB = 10, DW = 16;
  logic [NB-1:0][DW-1:0] bus_data;
  logic [NC-1:0][3:0] sel;
  logic [NC-1:0][DW-1:0] ch_data;
  int checks = 0, failures = 0;

  xbar_to_noc #(.NUM_CH(NC), .NUM_BUS(NB), .DATA_W(DW)) dut (.*);

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
      for (int b = 0; b < NB; b++) bus_data[b] = DW'($urandom);
      for (int c = 0; c < NC; c++) sel[c] = 4'($urandom);
      #1;
      for (int c = 0; c < NC; c++)
        check(ch_data[c] == ((sel[c] < NB) ? bus_data[sel[c]] : '0), "channel data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

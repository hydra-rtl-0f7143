// tb_clock_divider: checks that tick comes every 2^n NoC cycles for n = 0..4,
// that n above 4 behaves as 4, and that halt suppresses tp_clk_en.
module tb_clock_divider;
  logic clk = 0, rst_n = 0;
  logic [2:0] n;
  logic halt, tick, tp_clk_en;
  int checks = 0, failures = 0;

  clock_divider dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, period;
    n = 0; halt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int nn = 0; nn <= 5; nn++) begin
      n = 3'(nn);
      // let the new setting take effect
      repeat (40) @(posedge clk);
      last = -1;
      for (int cyc = 0; cyc < 200; cyc++) begin
        @(negedge clk);
        halt = (cyc % 7) < 3;
        #1;
        check(tp_clk_en == (tick && !halt), "gating");
        if (tick) begin
          if (last >= 0) begin
            period = cyc - last;
            check(period == (1 << ((nn > 4) ? 4 : nn)), $sformatf("period n=%0d got %0d", nn, period));
          end
          last = cyc;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flit_fifo: self-checking test of the channel buffer. Random pushes and
// pops are compared against a queue model: head data, valid, full and count
// are checked every cycle, including push+pop when full.
module tb_flit_fifo;
  localparam int W = 18, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, rd_valid;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int full_seen = 0;

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == 3'(model.size()), "count");
      check(rd_valid == (model.size() != 0), "rd_valid");
      check(full == (model.size() == D), "full");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      if (full) full_seen++;
      wr_data = W'($urandom);
      rd_en   = ($urandom % 3) == 0 ? 1'b1 : (i % 400 > 200);
      wr_en   = ($urandom % 2) == 0 && !(full && !rd_en);
      @(posedge clk);
      #1;
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(full_seen > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

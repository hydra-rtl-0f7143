// clock_divider: derives the tile-processor clock from the NoC clock.
//
// The tile processor runs at f_NoC / 2^n with n in 0..4, as in the published
// design. Here the derived clock is expressed as a one-cycle enable pulse,
// tick, issued every 2^n NoC cycles by a free-running 4-bit counter, so that
// all of the interface stays in the NoC clock domain. tp_clk_en is the tick
// gated by halt: when the interface halts the tile processor (not running,
// waiting, or a transfer that cannot be performed) its clock is stopped, which
// is the energy-saving mechanism of the design. A change of n takes effect at
// the next tick. Values of n above 4 are clamped to 4 (a choice made here).
module clock_divider (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] n,
  input  logic       halt,
  output logic       tick,
  output logic       tp_clk_en
);
  logic [3:0] cnt;
  logic [3:0] mask;
  logic [2:0] n_cur;

  always_comb begin
    unique case (n_cur)
      3'd0:    mask = 4'b0000;
      3'd1:    mask = 4'b0001;
      3'd2:    mask = 4'b0011;
      3'd3:    mask = 4'b0111;
      default: mask = 4'b1111;
    endcase
  end

  assign tick      = ((cnt & mask) == mask);
  assign tp_clk_en = tick && !halt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      n_cur <= '0;
    end else if (tick) begin
      cnt   <= '0;
      n_cur <= (n > 3'd4) ? 3'd4 : n;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end
endmodule

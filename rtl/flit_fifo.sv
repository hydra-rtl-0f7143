// flit_fifo: first-in first-out buffer for one NoC channel.
//
// Each NoC channel, in each direction, has its own buffer so that the flows
// of two channels never interfere; the default depth of four flits follows
// the published design. The buffer is a circular array with read and write
// pointers and an occupancy counter. The head flit is visible on rd_data
// whenever rd_valid is high (first-word fall-through); a push and a pop may
// happen in the same cycle, also when full. Push when full and pop when empty
// are ignored. All logic is clocked by the NoC clock; the tile-processor side
// uses clock-enable qualified strobes (see clock_divider).
module flit_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign rd_valid = (count != 0);
  assign full     = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd    = rd_en && rd_valid;
  assign do_wr    = wr_en && (!full || do_rd);
  assign rd_data  = mem[rptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  // The surrounding logic never pushes into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("flit_fifo: push while full");
endmodule

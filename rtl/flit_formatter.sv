// flit_formatter: gives outgoing flits their format and writes them into the
// output channel buffers.
//
// Two sources feed the output buffers:
//  * Replies of the message execution (DMA retrieve data and status words),
//    one reply port per channel, are always sent as D flits, on the channel
//    the message came in on. They have priority over stream data.
//  * In streaming mode the tile processor selects a decoder instruction
//    (instr_sel) and raises send_req. The instruction holds one dec_entry_t
//    per output channel: whether the channel sends, the flit type to attach,
//    and whether the payload comes from a TP bus (through xbar_to_noc, whose
//    select lines this module drives) or from one of the four entries of the
//    channel's configurable ROM. The flits of all enabled channels are
//    written together in the cycle advance is high.
// send_ok is low when an enabled channel's buffer is full or that channel is
// taken by a reply in the same cycle; the flow control then halts the TP.
// The decoder instructions and ROMs are written through the Hydra part of the
// configuration address space (cfg_*), one 16-bit word per entry, and reset
// to zero (no channel enabled). Four ROM flits per channel and one instruction
// entry per channel follow the published design; the number of instructions
// (NUM_INSTR), the entry layout and the address map are choices made here.
module flit_formatter
  import hydra_pkg::*;
#(
  parameter int unsigned NUM_CH    = 4,
  parameter int unsigned NUM_INSTR = 16,
  parameter int unsigned ROM_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Hydra configuration writes
  input  logic                          cfg_we,
  input  logic [15:0]                   cfg_addr,
  input  logic [15:0]                   cfg_wdata,
  // streaming send from the TP
  input  logic [$clog2(NUM_INSTR)-1:0]  instr_sel,
  input  logic                          send_req,
  input  logic                          advance,
  output logic                          send_ok,
  output logic [NUM_CH-1:0][3:0]        bus_sel,
  input  logic [NUM_CH-1:0][DATA_W-1:0] bus_data,
  // replies of the message execution
  input  logic [NUM_CH-1:0]             reply_valid,
  input  logic [NUM_CH-1:0][DATA_W-1:0] reply_data,
  output logic [NUM_CH-1:0]             reply_ready,
  // output channel buffers
  input  logic [NUM_CH-1:0]             fifo_full,
  output logic [NUM_CH-1:0]             push,
  output flit_t [NUM_CH-1:0]            push_flit
);
  localparam int unsigned CW = $clog2(NUM_CH);
  localparam int unsigned RW = $clog2(ROM_DEPTH);

  dec_entry_t        instr_mem [NUM_INSTR*NUM_CH];
  logic [DATA_W-1:0] rom       [NUM_CH*ROM_DEPTH];
  dec_entry_t        cur       [NUM_CH];

  // configuration writes
  logic [15:0] instr_off, rom_off;
  assign instr_off = cfg_addr - ADDR_INSTR;
  assign rom_off   = cfg_addr - ADDR_ROM;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_INSTR*NUM_CH; i++) instr_mem[i] <= '0;
      for (int i = 0; i < NUM_CH*ROM_DEPTH; i++) rom[i] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr >= ADDR_INSTR && 32'(instr_off) < NUM_INSTR*NUM_CH)
        instr_mem[instr_off[$clog2(NUM_INSTR*NUM_CH)-1:0]] <= dec_entry_t'(cfg_wdata);
      else if (cfg_addr >= ADDR_ROM && 32'(rom_off) < NUM_CH*ROM_DEPTH)
        rom[rom_off[$clog2(NUM_CH*ROM_DEPTH)-1:0]] <= cfg_wdata;
    end
  end

  // decode the selected instruction
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      cur[c]     = instr_mem[{instr_sel, CW'(c)}];
      bus_sel[c] = cur[c].bus_sel;
    end
  end

  assign reply_ready = reply_valid & ~fifo_full;

  always_comb begin
    send_ok   = 1'b1;
    push      = '0;
    push_flit = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      if (cur[c].en && (fifo_full[c] || reply_valid[c]))
        send_ok = 1'b0;
    end
    for (int c = 0; c < NUM_CH; c++) begin
      if (reply_ready[c]) begin
        push[c]      = 1'b1;
        push_flit[c] = '{ftype: FLIT_D, payload: reply_data[c]};
      end else if (send_req && advance && cur[c].en) begin
        push[c]              = 1'b1;
        push_flit[c].ftype   = cur[c].ftype;
        push_flit[c].payload = cur[c].from_rom ? rom[{CW'(c), cur[c].rom_idx[RW-1:0]}]
                                               : bus_data[c];
      end
    end
  end

  // a stream flit is only written when every enabled channel can take it
  a_send_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              (send_req && advance) |-> send_ok)
    else $error("flit_formatter: send without room");
endmodule

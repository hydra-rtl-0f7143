// hydra_pkg: types and constants shared by the Hydra network interface.
//
// A flit is 18 bits: a 2-bit type (header H, tail T, data D, command C) and
// a 16-bit payload. The flit width, the four flit types and the 3-bit command
// codes of the message protocol follow the published design. The numeric
// code of each flit type, the position of the command code in the payload,
// the split of a DMA header into entity and offset, and the Hydra-internal
// configuration address map are this implementation's choices.
package hydra_pkg;

  localparam int unsigned DATA_W   = 16;  // flit payload width
  localparam int unsigned MEM_AW   = 10;  // 1024-word local memories

  // Flit type field (encoding chosen here, in the order the types are listed).
  typedef enum logic [1:0] {
    FLIT_H = 2'b00,
    FLIT_T = 2'b01,
    FLIT_D = 2'b10,
    FLIT_C = 2'b11
  } flit_type_e;

  typedef struct packed {
    flit_type_e          ftype;
    logic [DATA_W-1:0]   payload;
  } flit_t;

  // Message protocol commands, carried in payload[2:0] of a C flit.
  typedef enum logic [2:0] {
    CMD_CFG    = 3'b000,
    CMD_LOAD   = 3'b001,
    CMD_RETR   = 3'b010,
    CMD_STATUS = 3'b011,
    CMD_RUN    = 3'b100,
    CMD_WAIT   = 3'b101,
    CMD_RST    = 3'b110,
    CMD_NONE   = 3'b111
  } cmd_e;

  // One entry of a decoder instruction: how one outgoing channel is fed.
  typedef struct packed {
    logic        en;        // channel sends a flit for this instruction
    logic        from_rom;  // payload from the channel's ROM, else from a bus
    logic [1:0]  rom_idx;   // ROM entry
    flit_type_e  ftype;     // flit type to attach
    logic [5:0]  rsvd;
    logic [3:0]  bus_sel;   // TP bus feeding the channel
  } dec_entry_t;

  // Hydra configuration space (addresses at and above HYDRA_BASE).
  localparam logic [15:0] HYDRA_BASE = 16'hF000;
  localparam logic [15:0] ADDR_INSTR = 16'hF000;  // + instr*NUM_CH + ch
  localparam logic [15:0] ADDR_ROM   = 16'hF100;  // + ch*4 + entry
  localparam logic [15:0] ADDR_CLKDIV = 16'hF200; // clock divider n

endpackage

// atm_ctrl_pkg: sizes and types shared by the ATM switch-node controller.
//
// The controller stores one header per packet held in the four switch chips of a
// 16x16 node: 256 headers, each 5 routing bits and 16 timestamp bits (21 bits).
// Headers live in 16 register modules of 16 register units; the slot address of a
// packet is {module, unit}, 8 bits. These numbers follow the document. The fill
// level exchanged between layers is 4 bits per node (64 input flow-control bits
// for 16 downstream nodes, 4 output bits), read from the controller's block diagram.
package atm_ctrl_pkg;

  localparam int unsigned N_PORTS  = 16;   // inputs and outputs of the node
  localparam int unsigned N_MOD    = 16;   // register modules
  localparam int unsigned N_UNIT   = 16;   // register units per module
  localparam int unsigned N_SLOTS  = N_MOD * N_UNIT;  // 256 stored packets
  localparam int unsigned ADDR_W   = 8;    // slot address width
  localparam int unsigned RT_W     = 5;    // routing bits per header
  localparam int unsigned TS_W     = 16;   // timestamp bits per header
  localparam int unsigned BUS_W    = 16;   // data bus into one register module
  localparam int unsigned HDR_W    = 16;   // header bits per input (256 / 16)
  localparam int unsigned LVL_W    = 4;    // fill level width
  localparam int unsigned SEL_W    = 4;    // timestamp bit select lines

  typedef logic [ADDR_W-1:0] slot_addr_t;
  typedef logic [RT_W-1:0]   route_t;
  typedef logic [TS_W-1:0]   tstamp_t;
  typedef logic [LVL_W-1:0]  level_t;

  // Layer type of the node: the same chip serves routing and distribution layers.
  typedef enum logic {
    LAYER_ROUTING      = 1'b0,
    LAYER_DISTRIBUTION = 1'b1
  } layer_e;

  // Fill level of a node holding `occupancy` packets: occupancy/16, saturated to 15
  // so that 15 means full.
  function automatic level_t fill_level(input logic [ADDR_W:0] occupancy);
    logic [ADDR_W:0] q;
    q = occupancy >> 4;
    return (q > 15) ? level_t'(15) : level_t'(q);
  endfunction

endpackage

// routing_filter: drives the 16 data buses of the register modules.
//
// For each of the 16 inputs, a multiplexer puts the routing bits of the arriving
// header on the bus in the first load clock of a cell cycle (phase 0) and the
// packet's 16-bit timestamp in the second (phase 1), as the document describes.
// This design's own choices: the 16 header bits of input i feed bus i; the 5
// routing bits are taken from header bits [ROUTE_LSB+4:ROUTE_LSB] and placed in bus
// bits [4:0] with the rest zero; the timestamp is the one the controller assigns to
// the current cell cycle, the same for all inputs. Purely combinational.
module routing_filter
  import atm_ctrl_pkg::*;
#(
  parameter int unsigned ROUTE_LSB = 0
) (
  input  logic [N_PORTS-1:0][HDR_W-1:0] header,
  input  tstamp_t                       timestamp,
  input  logic                          phase,     // 0: routing bits, 1: timestamp
  output logic [N_PORTS-1:0][BUS_W-1:0] bus
);
  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      if (phase) bus[i] = BUS_W'(timestamp);
      else       bus[i] = BUS_W'(header[i][ROUTE_LSB +: RT_W]);
    end
  end
endmodule

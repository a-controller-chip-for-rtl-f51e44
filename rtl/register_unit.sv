// register_unit: storage for one packet header inside the controller's register file.
//
// Holds 5 routing bits and 16 timestamp bits. Each word read line, ANDed with the
// unit's column enable, loads one of the two registers from the 16-bit data bus:
// the routing bits in the first clock of a cell cycle, the timestamp in the next.
// A 5-bit comparator checks the stored routing bits against the routing bus; when
// they match, or when the node sits in a distribution layer, the 16-to-1 multiplexer
// steered by the 4 select lines puts timestamp bit `sel` on `ts_bit`, so the
// timestamp leaves one bit per clock. Otherwise `ts_bit` is 0. All of this follows
// the document. Two choices are this design's own: the document's D latches are
// written as edge-triggered registers with load enables, and the output is also
// gated by `occupied`, the slot's valid bit from the address file, so that an empty
// slot never takes part in a search. The routing bits sit in data bus bits [4:0].
// Timing: loads on the rising clock edge; `ts_bit` is combinational in `sel`,
// `route_bus`, `dist_mode` and `occupied`.
module register_unit
  import atm_ctrl_pkg::*;
(
  input  logic              clk,
  input  logic              col_en,      // column enable of this unit
  input  logic              wl_route,    // word read line: load routing bits
  input  logic              wl_ts,       // word read line: load timestamp
  input  logic [BUS_W-1:0]  data_bus,
  input  route_t            route_bus,   // routing value of the current search
  input  logic              dist_mode,   // 1: distribution layer, ignore routing
  input  logic              occupied,    // slot holds a packet
  input  logic [SEL_W-1:0]  sel,         // timestamp bit to present
  output logic              ts_bit       // to the comparator
);
  route_t  route_q;
  tstamp_t ts_q;
  logic    match;

  always_ff @(posedge clk) begin
    if (col_en && wl_route) route_q <= data_bus[RT_W-1:0];
    if (col_en && wl_ts)    ts_q    <= data_bus[TS_W-1:0];
  end

  assign match  = dist_mode || (route_q == route_bus);
  assign ts_bit = occupied && match && ts_q[sel];
endmodule

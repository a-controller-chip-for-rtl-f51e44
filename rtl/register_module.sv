// register_module: sixteen register units that share one data bus from the routing
// filter, the routing bus and the timestamp select lines.
//
// The module's two word read lines (routing, timestamp) run along all sixteen
// units; a one-hot column enable picks the unit that loads. During a search every
// unit presents one timestamp bit, so the module hands 16 bits per clock to the
// comparator. The grouping of 16 units per module and 16 modules follows the
// document; the one-hot column enable is this design's reading of its register
// unit diagram. Timing: loads on the rising edge, `ts_bits` combinational.
module register_module
  import atm_ctrl_pkg::*;
(
  input  logic              clk,
  input  logic [N_UNIT-1:0] col_en,     // one-hot: unit that loads
  input  logic              wl_route,
  input  logic              wl_ts,
  input  logic [BUS_W-1:0]  data_bus,
  input  route_t            route_bus,
  input  logic              dist_mode,
  input  logic [N_UNIT-1:0] occupied,
  input  logic [SEL_W-1:0]  sel,
  output logic [N_UNIT-1:0] ts_bits
);
  for (genvar u = 0; u < N_UNIT; u++) begin : g_unit
    register_unit u_unit (
      .clk       (clk),
      .col_en    (col_en[u]),
      .wl_route  (wl_route),
      .wl_ts     (wl_ts),
      .data_bus  (data_bus),
      .route_bus (route_bus),
      .dist_mode (dist_mode),
      .occupied  (occupied[u]),
      .sel       (sel),
      .ts_bit    (ts_bits[u])
    );
  end
endmodule

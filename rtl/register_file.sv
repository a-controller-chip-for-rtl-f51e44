// register_file: the 256 packet headers of the controller and their readout.
//
// A routing filter feeds 16 register modules of 16 register units each. Input i
// writes module i: when `load` is high and `wr_en[i]` is set, the unit picked by
// `wr_unit[i]` loads the routing bits (phase 0) or the timestamp (phase 1) from
// bus i. During a search every unit whose stored routing bits equal `route_bus`
// (or every unit, in a distribution layer) and whose slot is occupied shows its
// timestamp bit `sel` on `ts_bits[{module,unit}]`; the others show 0. Together the
// units behave as a content-addressable memory whose match lines gate a
// bit-serial timestamp readout, which is the document's scheme; the input-to-module
// mapping is this design's choice. Timing: loads on the rising edge; `ts_bits`
// is combinational.
module register_file
  import atm_ctrl_pkg::*;
(
  input  logic                          clk,
  input  logic                          load,       // write strobe for this clock
  input  logic                          phase,      // 0: routing bits, 1: timestamp
  input  logic [N_PORTS-1:0]            wr_en,      // input i writes module i
  input  logic [N_PORTS-1:0][3:0]       wr_unit,    // unit written in module i
  input  logic [N_PORTS-1:0][HDR_W-1:0] header,
  input  tstamp_t                       timestamp,
  input  route_t                        route_bus,
  input  logic                          dist_mode,
  input  logic [N_SLOTS-1:0]            occupied,
  input  logic [SEL_W-1:0]              sel,
  output logic [N_SLOTS-1:0]            ts_bits
);
  logic [N_PORTS-1:0][BUS_W-1:0] bus;

  routing_filter u_filter (
    .header    (header),
    .timestamp (timestamp),
    .phase     (phase),
    .bus       (bus)
  );

  for (genvar m = 0; m < N_MOD; m++) begin : g_mod
    logic [N_UNIT-1:0] col_en;
    assign col_en = (load && wr_en[m]) ? (N_UNIT'(1) << wr_unit[m]) : '0;

    register_module u_mod (
      .clk       (clk),
      .col_en    (col_en),
      .wl_route  (!phase),
      .wl_ts     (phase),
      .data_bus  (bus[m]),
      .route_bus (route_bus),
      .dist_mode (dist_mode),
      .occupied  (occupied[m*N_UNIT +: N_UNIT]),
      .sel       (sel),
      .ts_bits   (ts_bits[m*N_UNIT +: N_UNIT])
    );
  end
endmodule

// flow_control_unit: exchanges fill levels with the neighbouring layers of the
// switch fabric.
//
// Towards the previous layer it reports how full this node is, as a 4-bit level
// from empty (0) to full (15): the number of stored packets divided by 16,
// saturated. From the 16 nodes of the next layer it receives 16 such levels (64
// bits) and turns them into back-pressure: output j may send only while node j is
// not full. In a distribution layer packets go to the emptiest available node of
// the next layer, so the unit also names, among the outputs not yet served in this
// cell cycle (`served`) that may send, the one whose downstream level is lowest
// (lowest index on a tie). The 4-bit level and the 64/4 pin counts come from the
// document's block diagram; the coding of the level and the full threshold are
// this design's choice. Timing: `fc_out` is registered; the rest is combinational.
module flow_control_unit
  import atm_ctrl_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADDR_W:0]      occupancy,
  input  level_t [N_PORTS-1:0] fc_in,       // levels of the next layer's nodes
  input  logic [N_PORTS-1:0]   served,
  output level_t               fc_out,      // level of this node
  output logic [N_PORTS-1:0]   may_send,
  output logic                 pick_valid,
  output logic [3:0]           pick          // emptiest open output not yet served
);
  localparam level_t FULL = level_t'(15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fc_out <= '0;
    else        fc_out <= fill_level(occupancy);
  end

  always_comb begin
    level_t best;
    pick_valid = 1'b0;
    pick       = '0;
    best       = FULL;
    for (int j = 0; j < N_PORTS; j++) begin
      may_send[j] = (fc_in[j] != FULL);
      if (may_send[j] && !served[j] && (!pick_valid || fc_in[j] < best)) begin
        pick_valid = 1'b1;
        pick       = 4'(j);
        best       = fc_in[j];
      end
    end
  end
endmodule

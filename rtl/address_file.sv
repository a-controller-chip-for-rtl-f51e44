// address_file: the "available register index" of the controller. It keeps one
// valid bit per header slot and hands free slots to arriving cells.
//
// The document says only that this block keeps track of which slots are valid and
// that it takes 16 cell-arrival signals. The rest is this design's own: input i
// stores into register module i (the module fed by bus i of the routing filter),
// so for every arriving input the block offers the lowest free unit of module i
// on `alloc_unit[i]` and says on `alloc_ok[i]` whether one exists (a cell finding
// its module full is refused). `commit` marks the offered slots valid. `free_en`
// clears the slot of a departing packet. `occupancy` counts valid slots.
// Timing: offers are combinational on the current valid bits; commit and free act
// on the rising edge; reset empties the store.
module address_file
  import atm_ctrl_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_PORTS-1:0]        arrive,      // cell arrival signals
  input  logic                      commit,      // take the offered slots
  input  logic                      free_en,
  input  slot_addr_t                free_addr,
  output logic [N_PORTS-1:0]        alloc_ok,
  output logic [N_PORTS-1:0][3:0]   alloc_unit,
  output logic [N_SLOTS-1:0]        valid,
  output logic [ADDR_W:0]           occupancy
);
  logic [N_SLOTS-1:0] valid_q;

  always_comb begin
    for (int m = 0; m < N_PORTS; m++) begin
      alloc_ok[m]   = 1'b0;
      alloc_unit[m] = '0;
      for (int u = N_UNIT - 1; u >= 0; u--) begin
        if (!valid_q[m*N_UNIT + u]) begin
          alloc_ok[m]   = arrive[m];
          alloc_unit[m] = 4'(u);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      logic [N_SLOTS-1:0] nxt;
      nxt = valid_q;
      if (free_en) nxt[free_addr] = 1'b0;
      if (commit)
        for (int m = 0; m < N_PORTS; m++)
          if (alloc_ok[m]) nxt[m*N_UNIT + int'(alloc_unit[m])] = 1'b1;
      valid_q <= nxt;
    end
  end

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < N_SLOTS; s++) occupancy += (ADDR_W+1)'(valid_q[s]);
  end

  assign valid = valid_q;

  // Only a stored packet can leave.
  assert property (@(posedge clk) disable iff (!rst_n) free_en |-> valid_q[free_addr]);
endmodule

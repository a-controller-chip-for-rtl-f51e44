// atm_ctrl_top: controller chip of a 16x16 ATM switching node built from one
// controller and four bit-sliced switch chips.
//
// The switch chips hold up to 256 packets; the controller holds their headers and
// tells the switch chips where to store each arriving cell and which stored packet
// leaves on which output. Each cell cycle runs in three parts:
//   1. Store. On `cell_start` the arrival signals and the 16-bit headers of the 16
//      inputs are captured. The address file offers, for every arriving input i, a
//      free slot in register module i; the slots are reported on `store_ok` /
//      `store_addr` with `store_valid`. The register file then loads the routing
//      bits (first clock) and the cell cycle's timestamp (second clock).
//   2. Select. For each output the controller searches the register file for the
//      oldest packet. In a routing layer (`dist_mode` = 0) output j is served by
//      packets whose routing bits equal j, in order j = 0..15, skipping outputs whose
//      next-layer node reports full. In a distribution layer (`dist_mode` = 1) any
//      packet may leave on any output; outputs are served emptiest next-layer node
//      first. A search puts the output on the routing bus, starts the comparator
//      and steps the register file's select lines through the 16 timestamp bits,
//      most significant first; the comparator may finish early once a single
//      candidate is left.
//   3. Send. A search that finds a packet pulses `dep_valid` with the slot on
//      `addr_bus` and the output on `dest_bus`, and frees the slot.
// `ready` is high while waiting for the next `cell_start`.
//
// From the document: the four parts (flow control unit, address file, register
// file, comparator), 256 headers of 5 routing and 16 timestamp bits, two-clock
// header load, bit-serial oldest-first search, 8-bit address and destination buses,
// 64 input and 4 output flow-control pins, the layer pin. This design's own: the
// sequencing above, the input-to-module mapping, the capture of headers at
// `cell_start`, and the timestamp, which is the complement of a 15-bit cell-cycle
// counter with the top bit forced to 1 (older cells get larger values, and no
// stored timestamp is zero). A cell cycle takes at most 324 clocks: three to
// store, 20 per output (one to pick the output, at most 19 to search) and one to
// return to idle; one 53-byte cell at 155 Mb/s lasts 424 clocks of 155 MHz.
module atm_ctrl_top
  import atm_ctrl_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dist_mode,    // layer pin: 1 = distribution layer
  input  logic                          cell_start,
  input  logic [N_PORTS-1:0]            cell_arrive,
  input  logic [N_PORTS-1:0][HDR_W-1:0] header,
  input  level_t [N_PORTS-1:0]          fc_in,        // 64 input flow-control bits
  output level_t                        fc_out,       // 4 output flow-control bits
  output logic                          ready,
  output logic                          store_valid,
  output logic [N_PORTS-1:0]            store_ok,
  output slot_addr_t [N_PORTS-1:0]      store_addr,
  output logic                          dep_valid,
  output slot_addr_t                    addr_bus,
  output logic [7:0]                    dest_bus
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_RT, S_LOAD_TS, S_PICK, S_SEARCH
  } state_e;

  state_e                        state_q;
  logic [N_PORTS-1:0]            arr_q;
  logic [N_PORTS-1:0][HDR_W-1:0] hdr_q;
  logic [TS_W-2:0]               cycle_cnt_q;
  logic [4:0]                    out_idx_q;    // routing layer: next output to try
  logic [3:0]                    cur_out_q;
  logic [N_PORTS-1:0]            served_q;
  logic [4:0]                    bit_cnt_q;    // timestamp bits issued

  // Address file
  logic [N_PORTS-1:0]      alloc_ok;
  logic [N_PORTS-1:0][3:0] alloc_unit;
  logic [N_SLOTS-1:0]      valid;
  logic [ADDR_W:0]         occupancy;
  logic                    commit, free_en;

  // Flow control
  logic [N_PORTS-1:0] may_send;
  logic               pick_valid;
  logic [3:0]         pick;

  // Register file and comparator
  logic                 rf_load, rf_phase;
  logic [SEL_W-1:0]     sel;
  logic [N_SLOTS-1:0]   ts_bits;
  logic                 cmp_start, cmp_bit_valid;
  logic                 cmp_busy, cmp_done, cmp_found, cmp_tie;
  slot_addr_t           cmp_addr;
  logic [N_SLOTS-1:0]   cmp_survivors;
  tstamp_t              timestamp;

  assign timestamp = {1'b1, ~cycle_cnt_q};

  address_file u_addr (
    .clk        (clk),
    .rst_n      (rst_n),
    .arrive     (arr_q),
    .commit     (commit),
    .free_en    (free_en),
    .free_addr  (cmp_addr),
    .alloc_ok   (alloc_ok),
    .alloc_unit (alloc_unit),
    .valid      (valid),
    .occupancy  (occupancy)
  );

  flow_control_unit u_fc (
    .clk        (clk),
    .rst_n      (rst_n),
    .occupancy  (occupancy),
    .fc_in      (fc_in),
    .served     (served_q),
    .fc_out     (fc_out),
    .may_send   (may_send),
    .pick_valid (pick_valid),
    .pick       (pick)
  );

  register_file u_rf (
    .clk       (clk),
    .load      (rf_load),
    .phase     (rf_phase),
    .wr_en     (alloc_ok),
    .wr_unit   (alloc_unit),
    .header    (hdr_q),
    .timestamp (timestamp),
    .route_bus (route_t'(cur_out_q)),
    .dist_mode (dist_mode),
    .occupied  (valid),
    .sel       (sel),
    .ts_bits   (ts_bits)
  );

  oldest_comparator u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cmp_start),
    .bit_valid (cmp_bit_valid),
    .bits      (ts_bits),
    .busy      (cmp_busy),
    .done      (cmp_done),
    .found     (cmp_found),
    .tie       (cmp_tie),
    .addr      (cmp_addr),
    .survivors (cmp_survivors)
  );

  // Strobes decoded from the state.
  always_comb begin
    rf_load       = (state_q == S_LOAD_RT) || (state_q == S_LOAD_TS);
    rf_phase      = (state_q == S_LOAD_TS);
    commit        = (state_q == S_LOAD_TS);
    cmp_bit_valid = (state_q == S_SEARCH) && (bit_cnt_q < 5'(TS_W));
    sel           = SEL_W'(TS_W - 1) - bit_cnt_q[SEL_W-1:0];
    free_en       = (state_q == S_SEARCH) && cmp_done && cmp_found;
    cmp_start     = 1'b0;
    if (state_q == S_PICK) begin
      if (dist_mode) cmp_start = pick_valid;
      else           cmp_start = (out_idx_q < 5'(N_PORTS)) && may_send[out_idx_q[3:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      arr_q       <= '0;
      hdr_q       <= '0;
      cycle_cnt_q <= '0;
      out_idx_q   <= '0;
      cur_out_q   <= '0;
      served_q    <= '0;
      bit_cnt_q   <= '0;
      store_valid <= 1'b0;
      store_ok    <= '0;
      store_addr  <= '0;
      dep_valid   <= 1'b0;
      addr_bus    <= '0;
      dest_bus    <= '0;
    end else begin
      store_valid <= 1'b0;
      dep_valid   <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cell_start) begin
          arr_q   <= cell_arrive;
          hdr_q   <= header;
          state_q <= S_LOAD_RT;
        end
        S_LOAD_RT: begin
          store_valid <= 1'b1;
          store_ok    <= alloc_ok;
          for (int i = 0; i < N_PORTS; i++)
            store_addr[i] <= slot_addr_t'({4'(i), alloc_unit[i]});
          state_q <= S_LOAD_TS;
        end
        S_LOAD_TS: begin
          cycle_cnt_q <= cycle_cnt_q + 1'b1;
          out_idx_q   <= '0;
          served_q    <= '0;
          state_q     <= S_PICK;
        end
        S_PICK: begin
          bit_cnt_q <= '0;
          if (dist_mode) begin
            if (pick_valid) begin
              cur_out_q       <= pick;
              served_q[pick]  <= 1'b1;
              state_q         <= S_SEARCH;
            end else begin
              state_q <= S_IDLE;
            end
          end else if (out_idx_q >= 5'(N_PORTS)) begin
            state_q <= S_IDLE;
          end else begin
            out_idx_q <= out_idx_q + 1'b1;
            if (may_send[out_idx_q[3:0]]) begin
              cur_out_q <= out_idx_q[3:0];
              state_q   <= S_SEARCH;
            end
          end
        end
        S_SEARCH: begin
          if (cmp_bit_valid) bit_cnt_q <= bit_cnt_q + 1'b1;
          if (cmp_done) begin
            if (cmp_found) begin
              dep_valid <= 1'b1;
              addr_bus  <= cmp_addr;
              dest_bus  <= 8'(cur_out_q);
            end
            state_q <= S_PICK;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ready = (state_q == S_IDLE);

  // The comparator must be idle whenever a search starts.
  assert property (@(posedge clk) disable iff (!rst_n) cmp_start |-> !cmp_busy);
endmodule

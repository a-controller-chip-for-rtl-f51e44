// tb_atm_ctrl_top: end-to-end test of the switch-node controller at its full size
// (256 slots, 16 inputs and outputs, 16-bit timestamps).
//
// Each cell cycle the test offers random cells on the 16 inputs and random
// next-layer fill levels, pulses cell_start and checks, against a reference model
// written here: the slot given to every arriving cell (lowest free unit of the
// input's register module, refused when that module is full), then every departure
// in order: slot on addr_bus and output on dest_bus. The model serves outputs 0..15
// in a routing layer, skipping full next-layer nodes, with the oldest packet whose
// routing bits name the output; in a distribution layer it serves the open outputs
// emptiest first, each with the oldest packet of all. Oldest is the earliest cell
// cycle, lowest slot on a tie. It also checks the reported fill level and that a
// cell cycle fits in 424 clocks, the length of one 53-byte cell at 155 Mb/s with a
// 155 MHz controller clock.
//
// Phases: light routing-layer traffic; heavy back-pressure until modules fill and
// cells are refused; distribution layer; drain. The test counts how often each
// mechanism happened (back-pressure skip, refusal, early end of a search, tie
// between equal timestamps, search that found nothing, skipped all-zero bit
// position, distribution pick, full fill level) and fails for one that never did.
module tb_atm_ctrl_top;
  import atm_ctrl_pkg::*;

  localparam int CELL_CLOCKS = 424;   // 53*8 bits at 155 Mb/s, in 155 MHz clocks

  logic clk = 0, rst_n = 0;
  logic dist_mode, cell_start, ready, store_valid, dep_valid;
  logic [15:0] cell_arrive, store_ok;
  logic [15:0][15:0] header;
  level_t [15:0] fc_in;
  level_t fc_out;
  slot_addr_t [15:0] store_addr;
  slot_addr_t addr_bus;
  logic [7:0] dest_bus;

  atm_ctrl_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // reference model
  bit          m_valid [256];
  logic [4:0]  m_route [256];
  int          m_birth [256];
  int          exp_addr [$];
  int          exp_dest [$];
  int          cell_no = 0;
  logic [15:0]       arr_keep;
  logic [15:0][15:0] hdr_keep;
  // mechanism counters
  int n_backpressure = 0, n_refused = 0, n_early = 0, n_tie = 0, n_empty = 0;
  int max_clocks = 0;
  int n_skip = 0, n_dist = 0, n_full_level = 0, n_dep = 0, n_store = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cmp.busy && dut.u_cmp.in_v && !dut.u_cmp.and_any && dut.u_cmp.count_q != 0) n_skip++;
    if (dut.u_cmp.done) begin
      if (!dut.u_cmp.found) n_empty++;
      else if (dut.u_cmp.tie) n_tie++;
      if (dut.u_cmp.count_q < 16) n_early++;
    end
  end

  function automatic int oldest(input bit use_route, input int route);
    int best = -1;
    for (int s = 0; s < 256; s++)
      if (m_valid[s] && (!use_route || int'(m_route[s]) == route))
        if (best < 0 || m_birth[s] < m_birth[best]) best = s;
    return best;
  endfunction

  // Store check and prediction of the cell cycle's departures.
  task automatic store_and_predict();
    for (int i = 0; i < 16; i++) begin
      int u = -1;
      for (int v = 15; v >= 0; v--) if (!m_valid[i*16+v]) u = v;
      checks++;
      if (store_ok[i] !== (arr_keep[i] && u >= 0) ||
          (store_ok[i] && store_addr[i] !== 8'(i*16+u))) begin
        failures++;
        $display("FAIL cell %0d input %0d store ok=%0d addr=%0d exp u=%0d", cell_no, i, store_ok[i], store_addr[i], u);
      end
      if (arr_keep[i] && u < 0) n_refused++;
      if (arr_keep[i] && u >= 0) begin
        m_valid[i*16+u] = 1; m_route[i*16+u] = hdr_keep[i][4:0]; m_birth[i*16+u] = cell_no;
        n_store++;
      end
    end
    if (!dist_mode) begin
      for (int j = 0; j < 16; j++) begin
        if (fc_in[j] == 4'hF) begin
          if (oldest(1, j) >= 0) n_backpressure++;
          continue;
        end
        begin
          int s = oldest(1, j);
          if (s >= 0) begin exp_addr.push_back(s); exp_dest.push_back(j); m_valid[s] = 0; end
        end
      end
    end else begin
      bit served [16];
      for (int j = 0; j < 16; j++) served[j] = 0;
      forever begin
        int pj = -1;
        for (int j = 0; j < 16; j++)
          if (fc_in[j] != 4'hF && !served[j] && (pj < 0 || fc_in[j] < fc_in[pj])) pj = j;
        if (pj < 0) break;
        served[pj] = 1;
        n_dist++;
        begin
          int s = oldest(0, 0);
          if (s >= 0) begin exp_addr.push_back(s); exp_dest.push_back(pj); m_valid[s] = 0; end
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n && dep_valid) begin
    checks++;
    n_dep++;
    if (exp_addr.size() == 0) begin
      failures++;
      $display("FAIL unexpected departure addr=%0d dest=%0d", addr_bus, dest_bus);
    end else begin
      int ea, ed;
      ea = exp_addr.pop_front();
      ed = exp_dest.pop_front();
      if (addr_bus !== 8'(ea) || dest_bus !== 8'(ed)) begin
        failures++;
        $display("FAIL cell %0d departure addr=%0d dest=%0d exp addr=%0d dest=%0d", cell_no, addr_bus, dest_bus, ea, ed);
      end
    end
  end

  task automatic run_cell(input int p_arrive, input int p_full, input bit dmode);
    int clocks;
    int occ, lvl;
    @(negedge clk);
    dist_mode = dmode;
    for (int i = 0; i < 16; i++) begin
      cell_arrive[i] = ($urandom_range(0, 99) < p_arrive);
      header[i] = {11'($urandom), 5'($urandom_range(0, 15))};
      fc_in[i] = ($urandom_range(0, 99) < p_full) ? 4'hF : 4'($urandom_range(0, 14));
    end
    arr_keep = cell_arrive;
    hdr_keep = header;
    cell_start = 1;
    @(negedge clk);
    cell_start = 0;
    cell_arrive = $urandom;            // inputs only matter at cell_start
    for (int i = 0; i < 16; i++) header[i] = $urandom;
    clocks = 1;
    while (!store_valid) begin @(negedge clk); clocks++; end
    cell_arrive = '0;
    store_and_predict();
    while (!ready && clocks < 2 * CELL_CLOCKS) begin @(negedge clk); clocks++; end
    if (clocks > max_clocks) max_clocks = clocks;
    checks++;
    if (clocks > CELL_CLOCKS || exp_addr.size() != 0) begin
      failures++;
      $display("FAIL cell %0d took %0d clocks, %0d departures missing", cell_no, clocks, exp_addr.size());
      exp_addr.delete(); exp_dest.delete();
    end
    occ = 0;
    for (int s = 0; s < 256; s++) occ += int'(m_valid[s]);
    lvl = (occ / 16 > 15) ? 15 : occ / 16;
    if (lvl == 15) n_full_level++;
    checks++;
    if (fc_out !== 4'(lvl)) begin
      failures++;
      $display("FAIL cell %0d fill level %0d exp %0d (occupancy %0d)", cell_no, fc_out, lvl, occ);
    end
    cell_no++;
  endtask

  initial begin
    for (int s = 0; s < 256; s++) m_valid[s] = 0;
    dist_mode = 0; cell_start = 0; cell_arrive = 0; header = '0; fc_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60) run_cell(50, 20, 0);    // routing layer, light load
    repeat (25) run_cell(90, 95, 0);    // heavy back-pressure: modules fill up
    repeat (60) run_cell(60, 30, 1);
    repeat (10) run_cell(100, 0, 1);   // distribution layer, every output open    // distribution layer
    repeat (30) run_cell(0, 0, 0);      // drain
    checks += 9;
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure skip"); end
    if (n_refused == 0)      begin failures++; $display("FAIL no refused cell"); end
    if (n_early == 0)        begin failures++; $display("FAIL no early search end"); end
    if (n_tie == 0)          begin failures++; $display("FAIL no tie"); end
    if (n_empty == 0)        begin failures++; $display("FAIL no empty search"); end
    if (n_skip == 0)         begin failures++; $display("FAIL no skipped bit position"); end
    if (n_dist == 0)         begin failures++; $display("FAIL no distribution pick"); end
    if (n_full_level == 0)   begin failures++; $display("FAIL fill level never full"); end
    if (n_dep == 0)          begin failures++; $display("FAIL no departure"); end
    $display("cells=%0d stored=%0d departures=%0d backpressure=%0d refused=%0d early=%0d ties=%0d empty=%0d skips=%0d dist=%0d full=%0d max_cell_clocks=%0d",
             cell_no, n_store, n_dep, n_backpressure, n_refused, n_early, n_tie, n_empty, n_skip, n_dist, n_full_level, max_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

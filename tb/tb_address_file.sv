// tb_address_file: random arrivals, commits and frees against a model of the 256
// valid bits. Checks the offered unit (lowest free in the input's module), the
// refusal of a cell whose module is full, the valid vector and the occupancy.
module tb_address_file;
  import atm_ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] arrive, alloc_ok;
  logic commit, free_en;
  slot_addr_t free_addr;
  logic [15:0][3:0] alloc_unit;
  logic [255:0] valid;
  logic [8:0] occupancy;
  int checks = 0, failures = 0, n_full = 0;
  logic [255:0] model;

  address_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    arrive = 0; commit = 0; free_en = 0; free_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      arrive = 16'($urandom);
      commit = $urandom_range(0, 1);
      // free a random valid slot now and then, fewer than arrivals early on
      free_en = 0;
      if ($urandom_range(0, 99) < (k < 1000 ? 20 : 95)) begin
        int s;
        s = $urandom_range(0, 255);
        if (model[s]) begin free_en = 1; free_addr = 8'(s); end
      end
      #1;
      for (int m = 0; m < 16; m++) begin
        int u;
        logic ok;
        ok = 0; u = 0;
        for (int v = 15; v >= 0; v--) if (!model[m*16+v]) begin ok = 1; u = v; end
        if (arrive[m] && !ok) n_full++;
        checks++;
        if (alloc_ok[m] !== (arrive[m] && ok) || (alloc_ok[m] && alloc_unit[m] !== 4'(u))) begin
          failures++;
          $display("FAIL module %0d ok=%0d unit=%0d exp ok=%0d unit=%0d", m, alloc_ok[m], alloc_unit[m], ok, u);
        end
      end
      @(posedge clk);
      if (free_en) model[free_addr] = 0;
      if (commit) for (int m = 0; m < 16; m++) if (alloc_ok[m]) model[m*16 + int'(alloc_unit[m])] = 1;
      #1;
      checks++;
      if (valid !== model || occupancy !== 9'($countones(model))) begin
        failures++;
        $display("FAIL valid vector or occupancy %0d", occupancy);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL module never full"); end
    $display("refusals=%0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

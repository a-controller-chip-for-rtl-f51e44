// tb_register_module: writes a different header into each of the 16 units through
// the shared bus and column enables, then checks the 16 timestamp bits the module
// presents for every select value and several routing-bus values.
module tb_register_module;
  import atm_ctrl_pkg::*;
  logic clk = 0;
  logic [15:0] col_en, occupied, ts_bits;
  logic wl_route, wl_ts, dist_mode;
  logic [15:0] data_bus;
  route_t route_bus;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  logic [4:0]  rt [16];
  logic [15:0] ts [16];

  register_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_en = 0; wl_route = 0; wl_ts = 0; dist_mode = 0; occupied = '1;
    data_bus = 0; route_bus = 0; sel = 0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int u = 0; u < 16; u++) begin
        rt[u] = 5'($urandom_range(0, 3));
        ts[u] = 16'($urandom);
        @(negedge clk);
        col_en = 16'(1) << u; wl_route = 1; data_bus = {11'b0, rt[u]};
        @(negedge clk);
        wl_route = 0; wl_ts = 1; data_bus = ts[u];
        @(negedge clk);
        col_en = 0; wl_ts = 0;
      end
      occupied = 16'($urandom);
      for (int m = 0; m < 2; m++) begin
        dist_mode = m[0];
        for (int r = 0; r < 4; r++) begin
          route_bus = 5'(r);
          for (int b = 0; b < 16; b++) begin
            logic [15:0] exp;
            sel = 4'(b);
            #1;
            for (int u = 0; u < 16; u++)
              exp[u] = occupied[u] && (dist_mode || rt[u] == 5'(r)) && ts[u][b];
            checks++;
            if (ts_bits !== exp) begin
              failures++;
              $display("FAIL route=%0d sel=%0d got %h exp %h", r, b, ts_bits, exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

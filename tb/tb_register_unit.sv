// tb_register_unit: loads routing bits and a timestamp over the data bus with the
// two word read lines, then reads the timestamp back one bit per select value with
// a matching routing bus, a mismatching one, in a distribution layer and with the
// slot marked empty. Also checks that a unit without column enable does not load.
module tb_register_unit;
  import atm_ctrl_pkg::*;
  logic clk = 0;
  logic col_en, wl_route, wl_ts, dist_mode, occupied, ts_bit;
  logic [15:0] data_bus;
  route_t route_bus;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  register_unit dut (.*);

  always #5 clk = ~clk;

  task automatic write(input logic rt, input logic [15:0] d, input logic en);
    @(negedge clk);
    col_en = en; wl_route = rt; wl_ts = !rt; data_bus = d;
    @(negedge clk);
    col_en = 0; wl_route = 0; wl_ts = 0; data_bus = $urandom;
  endtask

  task automatic read_all(input logic [4:0] rt, input logic [15:0] ts, input logic expect_out);
    for (int b = 0; b < 16; b++) begin
      sel = 4'(b);
      #1;
      checks++;
      if (ts_bit !== (expect_out & ts[b])) begin
        failures++;
        $display("FAIL route=%0d ts=%h bit %0d got %0d", rt, ts, b, ts_bit);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] rt;
    logic [15:0] ts;
    col_en = 0; wl_route = 0; wl_ts = 0; dist_mode = 0; occupied = 1;
    data_bus = 0; route_bus = 0; sel = 0;
    for (int k = 0; k < 20; k++) begin
      rt = 5'($urandom);
      ts = 16'($urandom);
      write(1'b1, {11'($urandom), rt}, 1'b1);
      write(1'b0, ts, 1'b1);
      // A write without column enable must leave the contents alone.
      write(1'b0, ~ts, 1'b0);
      write(1'b1, {11'b0, ~rt}, 1'b0);
      dist_mode = 0; occupied = 1;
      route_bus = rt;        read_all(rt, ts, 1'b1);
      route_bus = rt ^ 5'd1; read_all(rt, ts, 1'b0);
      dist_mode = 1;         read_all(rt, ts, 1'b1);
      occupied = 0;          read_all(rt, ts, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flow_control_unit: checks the reported fill level (occupancy/16, saturating
// at 15, one clock late), back-pressure from full next-layer nodes, and the choice
// of the emptiest open output not yet served.
module tb_flow_control_unit;
  import atm_ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [8:0] occupancy;
  level_t [15:0] fc_in;
  logic [15:0] served, may_send;
  level_t fc_out;
  logic pick_valid;
  logic [3:0] pick;
  int checks = 0, failures = 0;

  flow_control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    occupancy = 0; fc_in = '0; served = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      int exp_lvl, bestv, besti;
      @(negedge clk);
      occupancy = 9'($urandom_range(0, 256));
      for (int j = 0; j < 16; j++) fc_in[j] = ($urandom_range(0, 3) == 0) ? 4'hF : 4'($urandom_range(0, 15));
      served = 16'($urandom) & 16'($urandom);
      @(negedge clk);
      exp_lvl = occupancy / 16;
      if (exp_lvl > 15) exp_lvl = 15;
      bestv = 99; besti = -1;
      for (int j = 0; j < 16; j++)
        if (fc_in[j] != 4'hF && !served[j] && int'(fc_in[j]) < bestv) begin
          bestv = int'(fc_in[j]); besti = j;
        end
      checks++;
      if (fc_out !== 4'(exp_lvl)) begin failures++; $display("FAIL level %0d exp %0d", fc_out, exp_lvl); end
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (may_send[j] !== (fc_in[j] != 4'hF)) begin failures++; $display("FAIL may_send %0d", j); end
      end
      checks++;
      if (pick_valid !== (besti >= 0) || (besti >= 0 && pick !== 4'(besti))) begin
        failures++;
        $display("FAIL pick %0d/%0d exp %0d", pick_valid, pick, besti);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_routing_filter: checks that every bus carries its input's routing bits in
// phase 0 and the common timestamp in phase 1.
module tb_routing_filter;
  import atm_ctrl_pkg::*;
  logic [15:0][15:0] header, bus;
  tstamp_t timestamp;
  logic phase;
  int checks = 0, failures = 0;

  routing_filter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 16; i++) header[i] = 16'($urandom);
      timestamp = 16'($urandom);
      phase = k[0];
      #1;
      for (int i = 0; i < 16; i++) begin
        logic [15:0] exp;
        exp = phase ? timestamp : {11'b0, header[i][4:0]};
        checks++;
        if (bus[i] !== exp) begin
          failures++;
          $display("FAIL bus %0d phase %0d got %h exp %h", i, phase, bus[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

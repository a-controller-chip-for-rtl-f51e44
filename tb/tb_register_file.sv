// tb_register_file: writes headers from all 16 inputs in several cell cycles (two
// load clocks each, routing bits then timestamp), into random units, then checks
// the 256 bits presented for every select value, for matching routing values and
// in a distribution layer, against a model of the stored headers.
module tb_register_file;
  import atm_ctrl_pkg::*;
  logic clk = 0;
  logic load, phase, dist_mode;
  logic [15:0] wr_en;
  logic [15:0][3:0] wr_unit;
  logic [15:0][15:0] header;
  tstamp_t timestamp;
  route_t route_bus;
  logic [255:0] occupied, ts_bits;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  logic [4:0]  m_rt [256];
  logic [15:0] m_ts [256];

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; phase = 0; dist_mode = 0; wr_en = 0; wr_unit = 0; header = 0;
    timestamp = 0; route_bus = 0; occupied = 0; sel = 0;
    for (int cyc = 0; cyc < 40; cyc++) begin
      @(negedge clk);
      wr_en = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        wr_unit[i] = 4'($urandom);
        header[i]  = {11'($urandom), 5'($urandom_range(0, 7))};
      end
      timestamp = 16'($urandom);
      load = 1; phase = 0;
      @(negedge clk);
      phase = 1;
      @(negedge clk);
      load = 0; phase = 0;
      for (int i = 0; i < 16; i++)
        if (wr_en[i]) begin
          m_rt[i*16 + int'(wr_unit[i])] = header[i][4:0];
          m_ts[i*16 + int'(wr_unit[i])] = timestamp;
          occupied[i*16 + int'(wr_unit[i])] = 1'b1;
        end
    end
    for (int m = 0; m < 2; m++) begin
      dist_mode = m[0];
      for (int r = 0; r < 8; r++) begin
        route_bus = 5'(r);
        for (int b = 0; b < 16; b++) begin
          logic [255:0] exp;
          sel = 4'(b);
          #1;
          for (int s = 0; s < 256; s++)
            exp[s] = occupied[s] && (dist_mode || m_rt[s] == 5'(r)) && m_ts[s][b];
          checks++;
          if (ts_bits !== exp) begin
            failures++;
            $display("FAIL route=%0d sel=%0d", r, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_multi_high_detector: checks the none / one / several detector against a
// population count, for all one-hot and zero inputs and for random patterns.
module tb_multi_high_detector;
  logic [15:0] in;
  logic        any_hi, multi_hi;
  int          checks = 0, failures = 0;

  multi_high_detector dut (.in(in), .any_hi(any_hi), .multi_hi(multi_hi));

  task automatic check_one(input logic [15:0] v);
    int pc;
    in = v;
    #1;
    pc = $countones(v);
    checks++;
    if (any_hi !== (pc >= 1) || multi_hi !== (pc >= 2)) begin
      failures++;
      $display("FAIL in=%h any=%0d multi=%0d popcount=%0d", v, any_hi, multi_hi, pc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    for (int i = 0; i < 16; i++) check_one(16'(1) << i);
    for (int i = 0; i < 15; i++) check_one(16'(3) << i);
    for (int k = 0; k < 500; k++) check_one(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_oldest_comparator: random searches over 256 slots. A random set of slots are
// candidates with timestamps whose top bit is 1; the test feeds their bits most
// significant first and checks the winner (largest timestamp, lowest address on a
// tie), the tie flag, "nothing found" for an empty set, and the latency: the
// search must end within NBITS+3 clocks of the start pulse (start, one clock per
// bit, two pipeline stages), and end early when one
// candidate is left before the last bit. It counts early ends, ties and skipped
// (all-zero) bit positions and fails if any of them never happened.
module tb_oldest_comparator;
  logic clk = 0, rst_n = 0;
  logic start, bit_valid, busy, done, found, tie;
  logic [255:0] bits, survivors;
  logic [7:0] addr;
  int checks = 0, failures = 0;
  int n_early = 0, n_tie = 0, n_skip = 0, n_empty = 0;
  logic        cand [256];
  logic [15:0] ts   [256];

  oldest_comparator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.busy && dut.in_v && !dut.and_any) n_skip++;

  task automatic search(input int kind);
    int ncand, best, nbest, lat, issued;
    logic [15:0] bestv;
    ncand = 0; nbest = 0; best = -1; bestv = 0;
    for (int s = 0; s < 256; s++) begin
      case (kind)
        0: cand[s] = ($urandom_range(0, 99) < 3);
        1: cand[s] = ($urandom_range(0, 99) < 40);
        default: cand[s] = 1'b0;
      endcase
      // kind 1: few distinct values so that ties happen
      ts[s] = (kind == 1) ? {1'b1, 12'h0, 3'($urandom)} : {1'b1, 15'($urandom)};
      if (cand[s]) begin
        ncand++;
        if (best < 0 || ts[s] > bestv) begin best = s; bestv = ts[s]; nbest = 1; end
        else if (ts[s] == bestv) nbest++;
      end
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1; issued = 0;
    while (!done && lat < 40) begin
      if (issued < 16) begin
        bit_valid = 1;
        for (int s = 0; s < 256; s++) bits[s] = cand[s] & ts[s][15 - issued];
        issued++;
      end else begin
        bit_valid = 0;
        bits = 256'(0);
      end
      @(negedge clk);
      lat++;
    end
    bit_valid = 0;
    checks++;
    if (!done || lat > 16 + 3) begin
      failures++;
      $display("FAIL latency %0d done=%0d", lat, done);
    end
    if (lat < 16 + 3) n_early++;
    checks++;
    if (found !== (ncand > 0)) begin
      failures++;
      $display("FAIL found=%0d ncand=%0d", found, ncand);
    end
    if (ncand > 0) begin
      checks++;
      if (addr !== 8'(best) || tie !== (nbest > 1)) begin
        failures++;
        $display("FAIL addr=%0d exp %0d tie=%0d nbest=%0d", addr, best, tie, nbest);
      end
      if (nbest > 1) n_tie++;
    end else n_empty++;
  endtask

  initial begin
    start = 0; bit_valid = 0; bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 150; k++) search(k % 3 == 2 ? 1 : 0);
    search(2);
    // Mechanism coverage
    checks += 4;
    if (n_early == 0) begin failures++; $display("FAIL no early end"); end
    if (n_tie == 0)   begin failures++; $display("FAIL no tie"); end
    if (n_skip == 0)  begin failures++; $display("FAIL no skipped position"); end
    if (n_empty == 0) begin failures++; $display("FAIL no empty search"); end
    $display("early=%0d ties=%0d skips=%0d empty=%0d", n_early, n_tie, n_skip, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

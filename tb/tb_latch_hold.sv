// tb_latch_hold: drives Hold as a square wave and a random hit input that
// changes between edges, and checks that Latched Hit always equals the hit
// value present at the most recent Hold edge (rising or falling), i.e. the
// double-edge sampling rate, and that the value is held for the full half
// period. Then checks the SafeB state table: Hold=1/SafeB=0 forces the
// no-hit safe state; Hold=0/SafeB=0 loses a hit present at the rising edge;
// SafeB=1 latches in both Hold levels.
module tb_latch_hold;
  logic hit_in, hold, safe_b, latched_hit;
  logic model;
  int checks = 0, failures = 0;

  latch_hold dut (.hit_in(hit_in), .hold(hold), .safe_b(safe_b), .latched_hit(latched_hit));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Toggle Hold: one level lasts 150 time units (150 ns).
  task automatic toggle_hold();
    hold = ~hold;
    model = hit_in;
    #1;
  endtask

  initial begin
    safe_b = 1'b1;
    hold   = 1'b0;
    hit_in = 1'b0;
    #10;
    toggle_hold();
    toggle_hold();
    for (int i = 0; i < 400; i++) begin
      // the input changes several times inside the interval
      for (int k = 0; k < 5; k++) begin
        hit_in = 1'($urandom);
        #29;
        check(latched_hit == model, $sformatf("sample %0d hold=%0b", i, hold));
      end
      hit_in = 1'($urandom);
      #3;
      toggle_hold();
      check(latched_hit == model, $sformatf("after edge %0d", i));
    end
    // Safe power-down: Hold high, SafeB low -> no hit reported
    hold = 1'b0; hit_in = 1'b1; #5;
    hold = 1'b1; #5;
    check(latched_hit == 1'b1, "hit latched at rising edge");
    safe_b = 1'b0; #5;
    check(latched_hit == 1'b0, "safe state: Hold=1 SafeB=0 gives no hit");
    // Hold=0 with SafeB low: the hit at the next rising edge is lost
    hold = 1'b0; hit_in = 1'b1; #5;
    hold = 1'b1; #5;
    check(latched_hit == 1'b0, "Hold=0 SafeB=0: rising-edge hit lost");
    // falling-edge path still works while SafeB low
    hit_in = 1'b1; #5; hold = 1'b0; #5;
    check(latched_hit == 1'b1, "falling-edge path unaffected by SafeB");
    // Back to normal: SafeB=1 latches in both Hold levels
    safe_b = 1'b1; hit_in = 1'b1; #5;
    hold = 1'b1; hit_in = 1'b0; #5;
    check(latched_hit == 1'b1, "SafeB=1 Hold=1 latched");
    hold = 1'b0; hit_in = 1'b1; #5;
    check(latched_hit == 1'b0, "SafeB=1 Hold=0 latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

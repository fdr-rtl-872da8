// tb_master_controller: runs an acquisition and checks that Hold toggles
// every 15 clocks (150 ns at 100 MHz), that the timecode starts at 1 and
// advances by one per toggle, that sample_strobe follows each toggle after
// the settle delay, that the controller waits for write_busy before going
// idle, and that a readout keeps `reading` high until no data is stored and
// then pulses readout_done.
module tb_master_controller;
  import fdr_pkg::*;
  localparam int HC = 15, SC = 1;
  logic clk = 0, rst_n = 0, acquire = 0, readout_start = 0, data_stored = 0, write_busy = 0;
  logic hold, sample_strobe, reading, readout_done;
  timecode_t timecode;
  int checks = 0, failures = 0;

  master_controller #(.HOLD_CYCLES(HC), .SETTLE_CYCLES(SC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: cycle of each Hold toggle and of each strobe
  int cyc = 0, last_toggle = -1, n_toggle = 0, n_strobe = 0;
  logic hold_q = 0;
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n && hold != hold_q) begin
      if (last_toggle >= 0) check(cyc - last_toggle == HC, $sformatf("hold period %0d", cyc - last_toggle));
      last_toggle = cyc;
      n_toggle++;
      check(timecode == 13'(n_toggle), $sformatf("timecode %0d after %0d toggles", timecode, n_toggle));
    end
    if (sample_strobe) begin
      n_strobe++;
      check(cyc - last_toggle == SC, "strobe delay");
    end
    hold_q = hold;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) acquire = 1;
    repeat (HC * 20) @(negedge clk);
    acquire = 0;
    write_busy = 1;
    repeat (40) @(negedge clk);
    check(dut.state != 0, "waits for write_busy");
    write_busy = 0;
    repeat (HC + 5) @(negedge clk);
    check(n_toggle >= 20 && n_strobe == n_toggle, $sformatf("toggles %0d strobes %0d", n_toggle, n_strobe));
    check(!reading, "idle after acquisition");
    data_stored = 1;
    readout_start = 1; @(negedge clk); readout_start = 0;
    check(reading, "reading after readout_start");
    repeat (30) begin @(negedge clk); check(reading && !readout_done, "stays in readout"); end
    data_stored = 0;
    @(posedge clk); #1;
    check(readout_done && !reading, "readout_done pulse");
    @(posedge clk); #1;
    check(!readout_done, "readout_done one cycle");
    // a new acquisition restarts the timecode
    n_toggle = 0; last_toggle = -1;
    @(negedge clk) acquire = 1;
    repeat (HC * 3 + 2) @(negedge clk);
    check(n_toggle == 3 && timecode == 3, "timecode restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

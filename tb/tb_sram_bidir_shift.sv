// tb_sram_bidir_shift: random pushes and pops against a queue model of a
// last-in first-out memory of 20 words, checking the port word, the
// not-empty (20-input OR) and full flags every cycle, and that pushing into a
// full memory loses the oldest word and pulses overflow. Also fills it to
// exactly 20 words and empties it again.
module tb_sram_bidir_shift;
  localparam int DEPTH = 20;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [21:0] push_word, port_word;
  logic not_empty, full, overflow;
  logic [21:0] model [$];
  bit exp_ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  sram_bidir_shift #(.DEPTH(DEPTH), .WIDTH(22)) dut (.*);

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

  task automatic step(input bit do_push, input bit do_pop);
    push = do_push; pop = do_pop && !do_push && model.size() > 0;
    push_word = 22'($urandom);
    @(posedge clk); #1;
    exp_ovf = 0;
    if (push) begin
      model.push_front(push_word);
      if (model.size() > DEPTH) begin void'(model.pop_back()); exp_ovf = 1; n_ovf++; end
    end else if (pop) void'(model.pop_front());
    push = 0; pop = 0;
    check(overflow == exp_ovf, "overflow");
    check(not_empty == (model.size() > 0), "not_empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() > 0) check(port_word == model[0], "port word");
  endtask

  initial begin
    push_word = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    check(!not_empty && !full, "empty after reset");
    for (int i = 0; i < DEPTH; i++) step(1, 0);
    check(full, "full after 20 writes");
    for (int i = 0; i < DEPTH; i++) step(0, 1);
    check(!not_empty, "empty after 20 reads");
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = $urandom % 10;
      step(r < 5, r >= 5 && r < 9);
    end
    for (int i = 0; i < 25; i++) step(1, 0);
    check(n_ovf > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

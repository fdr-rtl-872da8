// tb_hit_row: replays a three-sample hit sequence on one row: sample 1 hits
// banks 100 (100001) and 111 (110011), sample 2 hits all seven banks with
// patterns 000111..000001, sample 3 hits banks 100 (100001) and 011 (100010).
// It checks that a sample with k hit banks keeps the row writing for exactly k
// cycles, then reads the row back and checks the eleven words in the expected
// order: newest sample first, banks in position order within a sample, each
// word {timecode, bank code, pattern}. Then checks OVERRIDE (all seven banks
// written with an empty pattern) and memory overflow.
module tb_hit_row;
  import fdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [0:6][5:0] hit_in;
  logic hold = 0, safe_b = 1, override_b = 1, sample_strobe = 0, row_read_active = 0;
  timecode_t timecode = 0;
  hit_word_t read_word;
  logic not_empty, write_busy, overflow, data_valid;
  int checks = 0, failures = 0, n_ovf = 0;

  hit_row #(.DEPTH(20)) dut (.*);

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

  // Present hits, toggle Hold, strobe, and count the write cycles.
  task automatic sample(input logic [0:6][5:0] pat, input int t);
    int busy_cycles, k;
    hit_in = pat;
    @(negedge clk);
    hold = ~hold;
    timecode = 13'(t);
    @(negedge clk);
    hit_in = '0;                         // input changes after the edge: must not matter
    sample_strobe = 1;
    @(negedge clk);
    sample_strobe = 0;
    busy_cycles = 0;
    while (write_busy) begin busy_cycles++; @(negedge clk); end
    k = 0;
    for (int b = 0; b < 7; b++) if (pat[b] != 0 || !override_b) k++;
    check(busy_cycles == k, $sformatf("sample %0d: %0d write cycles, expected %0d", t, busy_cycles, k));
  endtask

  task automatic expect_word(input int t, input logic [2:0] bank, input logic [5:0] patt);
    @(negedge clk);
    check(not_empty, "word present");
    check(read_word == {13'(t), bank, patt},
          $sformatf("read %b %b %b expected %0d %b %b", read_word.time_code, read_word.bank,
                    read_word.pattern, t, bank, patt));
    row_read_active = 1;
    @(negedge clk);
    row_read_active = 0;
  endtask

  initial begin
    hit_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sample({6'b100001, 6'b0, 6'b110011, 6'b0, 6'b0, 6'b0, 6'b0}, 1);
    sample({6'b000111, 6'b000110, 6'b000101, 6'b000100, 6'b000011, 6'b000010, 6'b000001}, 2);
    sample({6'b100001, 6'b0, 6'b0, 6'b0, 6'b0, 6'b100010, 6'b0}, 3);
    expect_word(3, 3'b100, 6'b100001);
    expect_word(3, 3'b011, 6'b100010);
    expect_word(2, 3'b100, 6'b000111);
    expect_word(2, 3'b101, 6'b000110);
    expect_word(2, 3'b111, 6'b000101);
    expect_word(2, 3'b110, 6'b000100);
    expect_word(2, 3'b010, 6'b000011);
    expect_word(2, 3'b011, 6'b000010);
    expect_word(2, 3'b001, 6'b000001);
    expect_word(1, 3'b100, 6'b100001);
    expect_word(1, 3'b111, 6'b110011);
    @(negedge clk);
    check(!not_empty, "row empty after readout");
    // OVERRIDE (active low): every bank is written, even without hits
    override_b = 0;
    sample('0, 9);
    override_b = 1;
    expect_word(9, 3'b100, 6'b0);
    expect_word(9, 3'b101, 6'b0);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); row_read_active = 1; @(negedge clk); row_read_active = 0;
    end
    check(!not_empty, "row empty after override readout");
    // Overflow: 3 samples of 7 banks = 21 words into 20 stages
    for (int t = 10; t < 13; t++) begin
      fork
        sample({7{6'b111111}}, t);
        begin
          repeat (12) begin @(posedge clk); #1; if (overflow) n_ovf++; end
        end
      join
    end
    check(n_ovf == 1, $sformatf("one word lost on overflow, saw %0d", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_column_readout: models 168 row memories as queues holding random words
// in random rows, runs a readout and checks that exactly one RowReadActive
// line is raised per clock, always the lowest row that still holds data, that
// one word per clock leaves the column, and that each output word carries the
// Gray-code address of its row. Rows 0 and 167 always hold data so that both
// ends of the encoder are read.
module tb_column_readout;
  import fdr_pkg::*;
  localparam int ROWS = 168;
  logic clk = 0, rst_n = 0, reading = 0;
  logic [ROWS-1:0] row_not_empty, row_read_active;
  hit_word_t row_word [ROWS];
  logic rd_valid;
  hit_word_t rd_word;
  logic [8:0] rd_address;
  hit_word_t q [ROWS][$];
  int checks = 0, failures = 0, total = 0, got = 0;
  hit_word_t exp_word [$];
  int exp_row [$];

  column_readout #(.ROWS(ROWS)) dut (.*);

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

  always_comb
    for (int r = 0; r < ROWS; r++) begin
      row_not_empty[r] = q[r].size() > 0;
      row_word[r]      = (q[r].size() > 0) ? q[r][0] : '0;
    end

  always @(posedge clk) if (rst_n) begin
    int lowest;
    lowest = -1;
    for (int r = ROWS - 1; r >= 0; r--) if (q[r].size() > 0) lowest = r;
    if (rd_valid) begin
      check(exp_word.size() > 0, "unexpected output");
      if (exp_word.size() > 0) begin
        int er;
        er = exp_row.pop_front();
        check(rd_word == exp_word.pop_front(), "word");
        check(rd_address == 9'(er ^ (er >> 1)), $sformatf("address of row %0d", er));
        got++;
      end
    end
    if (reading && lowest >= 0) begin
      check(row_read_active == (ROWS'(1) << lowest), $sformatf("row %0d selected", lowest));
      exp_word.push_back(q[lowest][0]);
      exp_row.push_back(lowest);
      void'(q[lowest].pop_front());
    end else begin
      check(row_read_active == '0, "no row selected");
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      int n;
      n = (r == 0 || r == ROWS - 1) ? 3 : (($urandom % 4 == 0) ? int'($urandom % 5) : 0);
      for (int i = 0; i < n; i++) q[r].push_back(22'($urandom));
      total += n;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) reading = 1;
    repeat (total + 5) @(negedge clk);
    reading = 0;
    check(got == total, $sformatf("%0d of %0d words read", got, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_config_array: programs random Trim0..Trim3 and MASK bits into every
// pixel of the full 168 x 168 array following the loading order of the
// configuration procedure: rows from the bottom up, for each row Trim0,
// Trim1, Trim2, Trim3 and MASK, each word shifted through the FAST register
// (168 shifts, first bit for the last column) followed by one SLOW shift.
// It checks CONFIG_OUT replays CONFIG_IN 168 shifts late, every pixel's trim
// and mask bits, a full readback (parallel load, 168 readback shifts, one
// SLOW shift per word, bottom pixel's Trim0 first), the TEST_IN path through
// the READBACK register, and the three resets.
module tb_config_array;
  localparam int ROWS = 168, COLS = 168, BITS = 5;
  logic clk = 0;
  logic fast_rst_b = 0, fast_shift = 0, config_in = 0, config_out;
  logic slow_rst_b = 0, slow_shift = 0;
  logic rb_rst_b = 0, readback_shift = 0, parallel_load = 0, test_in = 0, readback_out;
  logic [ROWS-1:0][BITS-1:0][0:COLS-1] pixel_cfg;
  logic [ROWS-1:0][COLS-1:0][3:0] exp_trim;
  logic [ROWS-1:0][COLS-1:0]      exp_mask;
  int checks = 0, failures = 0, errs;
  logic [COLS-1:0] in_hist;   // bits shifted into FAST, newest at [0]

  config_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // configuration bit j (0..3 = Trim0..Trim3, 4 = MASK) of pixel (r, c)
  function automatic logic [3:0] trim(int r, int c);
    return {pixel_cfg[r][1][c], pixel_cfg[r][2][c], pixel_cfg[r][3][c], pixel_cfg[r][4][c]};
  endfunction

  function automatic logic cfg_bit(int r, int c, int j);
    return (j == 4) ? exp_mask[r][c] : exp_trim[r][c][j];
  endfunction

  task automatic fast_load(int r, int j);
    for (int c = COLS - 1; c >= 0; c--) begin
      @(negedge clk);
      config_in = cfg_bit(r, c, j);
      fast_shift = 1;
      @(negedge clk);
      fast_shift = 0;
      check(config_out == in_hist[COLS-2], "CONFIG_OUT delayed by 168 shifts");
      in_hist = {in_hist[COLS-2:0], config_in};
    end
    @(negedge clk) slow_shift = 1;
    @(negedge clk) slow_shift = 0;
  endtask

  initial begin
    in_hist = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        exp_trim[r][c] = 4'($urandom);
        exp_mask[r][c] = 1'($urandom);
      end
    repeat (3) @(negedge clk);
    fast_rst_b = 1; slow_rst_b = 1; rb_rst_b = 1;
    @(negedge clk);
    check(pixel_cfg == '0 && config_out == 0 && readback_out == 0, "reset state");
    for (int r = ROWS - 1; r >= 0; r--)
      for (int j = 0; j < BITS; j++) fast_load(r, j);
    // pad the FAST register with zeros
    config_in = 0;
    repeat (COLS) begin
      @(negedge clk) fast_shift = 1; @(negedge clk) fast_shift = 0;
      in_hist = {in_hist[COLS-2:0], 1'b0};
    end
    check(config_out == 0, "FAST register padded");
    errs = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (trim(r, c) != exp_trim[r][c]) errs++;
        if (pixel_cfg[r][0][c] != exp_mask[r][c]) errs++;
      end
    check(errs == 0, $sformatf("%0d pixel configuration errors", errs));
    check(pixel_cfg[0][0][0] == exp_mask[0][0] && trim(ROWS-1, COLS-1) == exp_trim[ROWS-1][COLS-1], "corner pixels");
    // full readback
    for (int r = ROWS - 1; r >= 0; r--)
      for (int j = 0; j < BITS; j++) begin
        @(negedge clk) parallel_load = 1;
        @(negedge clk) parallel_load = 0;
        errs = 0;
        for (int c = COLS - 1; c >= 0; c--) begin
          if (readback_out != cfg_bit(r, c, j)) errs++;
          @(negedge clk) readback_shift = 1;
          @(negedge clk) readback_shift = 0;
        end
        check(errs == 0, $sformatf("readback row %0d bit %0d: %0d errors", r, j, errs));
        @(negedge clk) slow_shift = 1;
        @(negedge clk) slow_shift = 0;
      end
    check(pixel_cfg == '0, "array empty after full readback");
    // TEST_IN path through the READBACK register
    errs = 0;
    for (int i = 0; i < 2 * COLS; i++) begin
      test_in = (i % 3 == 0);
      @(negedge clk) readback_shift = 1;
      @(negedge clk) readback_shift = 0;
      if (i >= COLS && readback_out != ((i - COLS + 1) % 3 == 0)) errs++;
    end
    check(errs == 0, "TEST_IN appears at READBACK_OUT after 168 shifts");
    // resets
    rb_rst_b = 0; @(negedge clk); rb_rst_b = 1;
    check(readback_out == 0, "READBACK reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fdr_top: end-to-end test of the row-control logic at its full size
// (168 x 168 pixels, four logic columns of 42 pixels, 20-word row memories).
//
//  1. Programs random trim bits and a MASK pattern into every pixel through
//     the FAST and SLOW registers, checks the stored configuration, and reads
//     the bottom stage back through the READBACK register (parallel load).
//  2. Runs an acquisition of NSAMP Hold toggles with random sparse hits that
//     change between Hold edges. A reference model applies the masks, the
//     bank grouping and codes, the timecode and the last-in first-out row
//     memories (oldest word lost on overflow; the words read back show which
//     were lost). During the run, SafeB is held
//     low across one rising Hold edge (those hits must be lost), and OVERRIDE
//     is asserted for three samples so that every row memory overflows.
//  3. Reads everything out and compares every word and row address, column by
//     column, with the model; checks the 15-cycle Hold interval.
// Counts how often each mechanism occurred and fails if one never did.
module tb_fdr_top;
  import fdr_pkg::*;
  localparam int ROWS = 168, COLS = 168, LCOLS = COLS / 42, DEPTH = 20, HC = 15;
  localparam int NSAMP = 16;
  localparam logic [2:0] CODES [7] = '{3'b100, 3'b101, 3'b111, 3'b110, 3'b010, 3'b011, 3'b001};

  logic clk = 0, rst_n = 0;
  logic acquire = 0, readout_start = 0, safe_b = 1, override_b = 1;
  logic [ROWS-1:0][0:COLS-1] pixel_hit;
  logic hold, reading, readout_done, overflow;
  timecode_t timecode;
  logic [LCOLS-1:0] rd_valid;
  hit_word_t rd_word [LCOLS];
  logic [8:0] rd_address [LCOLS];
  logic fast_rst_b = 0, fast_shift = 0, config_in = 0, config_out;
  logic slow_rst_b = 0, slow_shift = 0;
  logic rb_rst_b = 0, readback_shift = 0, parallel_load = 0, test_in = 0, readback_out;
  logic [ROWS-1:0][4:0][0:COLS-1] pixel_cfg;

  fdr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_masked = 0, n_safe = 0, n_override = 0, n_overflow = 0, n_model_ovf = 0;
  int n_words = 0, n_hold = 0, n_rows_read = 0, n_multi_bank = 0;
  logic [3:0] exp_trim [ROWS][COLS];
  logic       exp_mask [ROWS][COLS];
  hit_word_t  model [LCOLS][ROWS][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cfg_bit(int r, int c, int j);   // j: 0..3 Trim0..3, 4 MASK
    return (j == 4) ? exp_mask[r][c] : exp_trim[r][c][j];
  endfunction

  always @(posedge clk) if (overflow) n_overflow++;

  // Hold interval monitor
  int hold_cyc = 0, n_intervals = 0;
  logic hold_q = 0;
  always @(posedge clk) begin
    #1;
    hold_cyc++;
    if (hold != hold_q) begin
      if (n_hold > 0) begin
        check(hold_cyc == HC, $sformatf("Hold interval %0d cycles", hold_cyc));
        n_intervals++;
      end
      hold_cyc = 0;
    end
    hold_q = hold;
  end

  // Model one sample taken at a Hold edge.
  task automatic model_sample(input bit safe_lost);
    int t;
    t = int'(timecode);
    for (int lc = 0; lc < LCOLS; lc++)
      for (int r = 0; r < ROWS; r++) begin
        int nb;
        nb = 0;
        for (int b = 6; b >= 0; b--) begin
          logic [5:0] patt;
          for (int i = 0; i < 6; i++) begin
            int c;
            c = lc * 42 + b * 6 + i;
            patt[5-i] = pixel_hit[r][c] && !exp_mask[r][c] && !safe_lost;
            if (pixel_hit[r][c] && exp_mask[r][c]) n_masked++;
          end
          if (patt != 0 || !override_b) begin
            model[lc][r].push_front({13'(t), CODES[b], patt});
            nb++;
            if (model[lc][r].size() > DEPTH) begin
              void'(model[lc][r].pop_back());
              n_model_ovf++;
            end
          end
        end
        if (nb > 1) n_multi_bank++;
      end
  endtask

  initial begin
    int errs;
    pixel_hit = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        exp_trim[r][c] = 4'($urandom);
        exp_mask[r][c] = ($urandom % 16) == 0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1; fast_rst_b = 1; slow_rst_b = 1; rb_rst_b = 1;

    // 1. configuration
    for (int r = ROWS - 1; r >= 0; r--)
      for (int j = 0; j < 5; j++) begin
        for (int c = COLS - 1; c >= 0; c--) begin
          config_in = cfg_bit(r, c, j);
          fast_shift = 1; @(negedge clk); fast_shift = 0;
        end
        slow_shift = 1; @(negedge clk); slow_shift = 0;
      end
    errs = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (pixel_cfg[r][CFG_MASK][c] != exp_mask[r][c]) errs++;
        if ({pixel_cfg[r][CFG_TRIM3][c], pixel_cfg[r][CFG_TRIM2][c], pixel_cfg[r][CFG_TRIM1][c],
             pixel_cfg[r][CFG_TRIM0][c]} != exp_trim[r][c]) errs++;
      end
    check(errs == 0, $sformatf("%0d configuration errors", errs));
    parallel_load = 1; @(negedge clk); parallel_load = 0;
    errs = 0;
    for (int c = COLS - 1; c >= 0; c--) begin
      if (readback_out != exp_trim[ROWS-1][c][0]) errs++;
      readback_shift = 1; @(negedge clk); readback_shift = 0;
    end
    check(errs == 0, "readback of the bottom row's Trim0");

    // 2. acquisition
    @(negedge clk) acquire = 1;
    for (int s = 0; s < NSAMP; s++) begin
      bit safe_lost;
      // new random sparse hits, set well inside the interval
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) pixel_hit[r][c] = ($urandom % 40) == 0;
      override_b = !(s >= 10 && s < 13);
      if (s == 5) safe_b = 0;                 // hold is low here: covers the next rising edge
      // wait for the Hold toggle
      while (hold == (s % 2 == 1)) begin @(posedge clk); #2; end
      safe_lost = !safe_b && hold;
      if (safe_lost) n_safe++;
      if (!override_b) n_override++;
      n_hold++;
      check(timecode == 13'(s + 1), $sformatf("timecode %0d at sample %0d", timecode, s + 1));
      model_sample(safe_lost);
      repeat (10) @(negedge clk);              // the rows' writes are over
      if (s == 6) safe_b = 1;
    end
    pixel_hit = '0;
    @(negedge clk) acquire = 0;
    override_b = 1;
    while (!(dut.u_ctrl.state == 0)) @(negedge clk);

    // 3. readout
    for (int lc0 = 0; lc0 < LCOLS; lc0++) begin
      automatic int lc = lc0;
      fork
        begin
          automatic int last_row = -1;
          forever begin
            @(posedge clk); #1;
            if (rd_valid[lc]) begin
              int r;
              r = -1;
              for (int rr = ROWS - 1; rr >= 0; rr--) if (model[lc][rr].size() > 0) r = rr;
              check(r >= 0, "word with nothing expected");
              if (r >= 0) begin
                hit_word_t w;
                w = model[lc][r].pop_front();
                check(rd_word[lc] == w, $sformatf("col %0d row %0d word %h expected %h",
                                                   lc, r, rd_word[lc], w));
                check(rd_address[lc] == 9'(r ^ (r >> 1)), "row address");
                if (r != last_row) n_rows_read++;
                last_row = r;
                n_words++;
              end
            end
          end
        end
      join_none
    end
    readout_start = 1; @(negedge clk); readout_start = 0;
    while (!readout_done) @(posedge clk);
    repeat (3) @(negedge clk);
    errs = 0;
    for (int lc = 0; lc < LCOLS; lc++)
      for (int r = 0; r < ROWS; r++) errs += model[lc][r].size();
    check(errs == 0, $sformatf("%0d words never read", errs));
    // several rows overflowing in the same cycle give one pulse of the shared flag
    check((n_overflow > 0) == (n_model_ovf > 0) && n_overflow <= n_model_ovf,
          $sformatf("overflow pulses %0d for %0d lost words", n_overflow, n_model_ovf));

    $display("mechanisms: hold samples %0d, masked hits %0d, safe-mode samples %0d, override samples %0d,",
             n_hold, n_masked, n_safe, n_override);
    $display("            overflows %0d, multi-bank writes %0d, words read %0d, row switches %0d",
             n_overflow, n_multi_bank, n_words, n_rows_read);
    check(n_hold == NSAMP && n_intervals == NSAMP - 1 && n_masked > 0 && n_safe > 0 && n_override > 0 && n_overflow > 0 &&
          n_multi_bank > 0 && n_words > 0 && n_rows_read >= LCOLS * ROWS, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

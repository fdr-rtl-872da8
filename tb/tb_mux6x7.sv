// tb_mux6x7: applies random hit patterns (often with empty banks), pending
// masks and OVERRIDE levels and checks DataValid, the selected bank (highest
// pending bank with data), its code from the bank assignment table
// 100 101 111 110 010 011 001, the pattern, and the zero data code when no
// bank is valid.
module tb_mux6x7;
  logic [0:6][5:0] hits;
  logic [6:0] pending, has_data, select;
  logic override_b, data_valid;
  logic [2:0] bank_code;
  logic [5:0] data_code;
  int checks = 0, failures = 0;
  int n_override = 0, n_none = 0;
  localparam logic [2:0] CODES [7] = '{3'b100, 3'b101, 3'b111, 3'b110, 3'b010, 3'b011, 3'b001};

  mux6x7 dut (.hits(hits), .pending(pending), .override_b(override_b), .has_data(has_data),
              .data_valid(data_valid), .select(select), .bank_code(bank_code), .data_code(data_code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sel;
      for (int b = 0; b < 7; b++) hits[b] = ($urandom % 3 == 0) ? 6'($urandom) : 6'd0;
      pending    = 7'($urandom);
      override_b = ($urandom % 8) != 0;
      #1;
      sel = -1;
      for (int b = 0; b < 7; b++) begin
        bit hd;
        hd = (hits[b] != 0) || !override_b;
        check(has_data[b] == hd, $sformatf("has_data[%0d]", b));
        if (hd && pending[b]) sel = b;      // the last one found is the highest
      end
      if (!override_b) n_override++;
      if (sel < 0) begin
        n_none++;
        check(!data_valid && select == 0 && data_code == 0, "no valid bank");
      end else begin
        check(data_valid && select == 7'(1 << sel), $sformatf("select %b expected bank %0d", select, sel));
        check(bank_code == CODES[sel], "bank code");
        check(data_code == hits[sel], "data code");
      end
    end
    check(n_override > 0 && n_none > 0, "override and empty cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

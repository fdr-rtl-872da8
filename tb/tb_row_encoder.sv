// tb_row_encoder: activates every one of the 168 RowReadActive lines alone
// and checks the bus code against the reflected Gray code of the row, checks
// that all 168 codes differ, checks two printed codes (row 167 reads
// 011110100, row 0 reads 000000000), the idle all-ones bus and the wired-AND
// of two simultaneously active rows.
module tb_row_encoder;
  localparam int ROWS = 168;
  logic [ROWS-1:0] act;
  logic [8:0] address;
  logic valid;
  int checks = 0, failures = 0;

  row_encoder #(.ROWS(ROWS)) dut (.row_read_active(act), .address(address), .valid(valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [511:0] seen;
    seen = '0;
    act = '0;
    #1;
    check(address == 9'h1FF && !valid, "idle bus");
    for (int r = 0; r < ROWS; r++) begin
      logic [8:0] exp;
      act = '0; act[r] = 1'b1;
      #1;
      exp = 9'(r) ^ (9'(r) >> 1);
      check(address == exp && valid, $sformatf("row %0d code %b", r, address));
      check(!seen[address], $sformatf("row %0d code repeated", r));
      seen[address] = 1'b1;
      if (r == 167) check(address == 9'b011110100, "row 167 printed code");
      if (r == 0)   check(address == 9'b000000000, "row 0 printed code");
    end
    act = '0; act[5] = 1'b1; act[100] = 1'b1;
    #1;
    check(address == ((9'd5 ^ 9'd2) & (9'd100 ^ 9'd50)), "two rows wired-AND");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

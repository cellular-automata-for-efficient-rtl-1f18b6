// tb_ca_colsync: self-checking test of the column completion signal.
// Random finished / participating patterns are applied and the release is
// compared with "synchronisation on, every participating row finished, and
// at least one row finished", computed here row by row.
module tb_ca_colsync;
  localparam int ROWS = 12;

  logic en;
  logic [ROWS-1:0] ok, cmp, part;
  logic rel;

  ca_colsync #(.ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      bit all_done, some;
      en   = ($urandom % 8) != 0;
      part = ROWS'($urandom);
      // mostly-finished columns so that both outcomes are common
      cmp  = part & ~(($urandom % 3 == 0) ? ROWS'(1) << ($urandom % ROWS) : '0);
      ok   = ~part | cmp;
      all_done = 1; some = 0;
      for (int r = 0; r < ROWS; r++) begin
        if (part[r] && !cmp[r]) all_done = 0;
        if (cmp[r]) some = 1;
      end
      #1;
      checks++;
      if (rel !== (en && all_done && some)) begin
        failures++;
        $display("FAIL: en %0b part %h cmp %h rel %0b", en, part, cmp, rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

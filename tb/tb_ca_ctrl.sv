// tb_ca_ctrl: self-checking test of the pattern pipelining controller.
//
// Checks that patterns enter the array no closer than t_d clocks apart (and
// exactly t_d apart when the host streams back to back), that the issued
// word is the streamed one, one clock after the handshake, and that outputs
// arriving on different rows at different times are gathered into one result
// per pattern, with the detection flag of the masked output cells.
module tb_ca_ctrl;
  import ca_pkg::*;

  localparam int ROWS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] t_d = 16'd7;
  logic [ROWS-1:0] po_mask = 8'b0010_0100;
  logic s_valid = 0, s_ready, pi_valid, m_valid, m_detected;
  word_t [ROWS-1:0] s_word = '0, pi_word, po_word = '0, m_word;
  logic [ROWS-1:0] po_valid = '0, po_detected = '0;
  logic [31:0] n_issued, n_done;

  ca_ctrl #(.ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue monitor: spacing and content
  int last_issue = -1000, cycle = 0, issues = 0;
  word_t [ROWS-1:0] sent [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && s_valid && s_ready) sent.push_back(s_word);
    if (rst_n && pi_valid) begin
      word_t [ROWS-1:0] w;
      w = sent.pop_front();
      check(pi_word == w, "issued word equals streamed word");
      check(cycle - last_issue >= int'(t_d), $sformatf("spacing %0d < t_d", cycle - last_issue));
      if (issues > 0 && issues < 6)
        check(cycle - last_issue == int'(t_d), "back-to-back stream issues every t_d clocks");
      last_issue <= cycle;
      issues++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // stream six patterns back to back
    for (int p = 0; p < 6; p++) begin
      s_valid = 1;
      for (int r = 0; r < ROWS; r++) s_word[r] = word_t'(p * 16 + r);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    repeat (10) @(negedge clk);
    check(n_issued == 6 && issues == 6, "six patterns issued");

    // outputs: row 2 fires first, row 5 two clocks later; row 0 is not masked
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      po_valid = 8'b0000_0101; po_word[2] = word_t'(32'h20 + p); po_word[0] = 8'hEE;
      @(negedge clk);
      po_valid = '0;
      check(!m_valid, "no result before all masked rows fired");
      @(negedge clk);
      po_valid = 8'b0010_0000; po_word[5] = word_t'(32'h50 + p);
      po_detected = (p == 2) ? 8'b0010_0000 : 8'b0000_0001;
      @(negedge clk);
      po_valid = '0;
      check(m_valid && m_word[2] == word_t'(32'h20 + p) && m_word[5] == word_t'(32'h50 + p),
            $sformatf("result %0d gathered", p));
      check(m_detected == (p == 2), "detection flag of masked outputs only");
      @(negedge clk);
      check(!m_valid, "one result pulse per pattern");
    end
    check(n_done == 3, "three results counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

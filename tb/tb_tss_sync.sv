// tb_tss_sync: self-checking test of the synchronisation unit.
// Random commit and release pulses (only while granted) drive the unit; a
// reference model tracks which buffer each side must hold and how many are
// full, and every cycle the grants and bank numbers are compared with it.
// The test also requires that both "both buffers full" (producer stalled)
// and "both empty" (consumer waiting) occur.
module tb_tss_sync;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic prod_avail, prod_bank, prod_commit;
  logic cons_avail, cons_bank, cons_release;
  int checks = 0, failures = 0;
  int m_count; logic m_wr, m_rd;
  int n_full = 0, n_empty = 0;

  tss_sync dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; prod_commit = 0; cons_release = 0;
    m_count = 0; m_wr = 0; m_rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(prod_avail, m_count != 2, "prod_avail");
      check(cons_avail, m_count != 0, "cons_avail");
      check(prod_bank, m_wr, "prod_bank");
      check(cons_bank, m_rd, "cons_bank");
      if (m_count == 2) n_full++;
      if (m_count == 0) n_empty++;
      // phases bias the load so that both extremes are reached
      prod_commit  = prod_avail && ($urandom % 4 < ((n / 200) % 2 ? 1 : 3));
      cons_release = cons_avail && ($urandom % 4 < ((n / 200) % 2 ? 3 : 1));
      if (prod_commit)  begin m_wr = ~m_wr; m_count++; end
      if (cons_release) begin m_rd = ~m_rd; m_count--; end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++; $display("full=%0d empty=%0d never both", n_full, n_empty);
    end
    $display("cycles both full %0d, both empty %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

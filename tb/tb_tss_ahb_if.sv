// tb_tss_ahb_if: self-checking test of the gateway's AHB-Lite slave.
// The testbench plays the bus master (with HREADY = HREADYOUT, a single
// slave) and a memory of 64 words with synchronous read as the target.
// Back-to-back writes, reads, and write-then-read sequences at random
// addresses must all return the data last written; a read right after a
// write must cost exactly one wait state (counted), other transfers none.
module tb_tss_ahb_if;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [15:0] haddr;
  logic [1:0]  htrans;
  logic [31:0] hwdata, hrdata, rdata, wr_data;
  logic rd_en, wr_en;
  logic [15:0] rd_addr, rd_addr_q, wr_addr;
  logic [31:0] tmem [64];
  logic [31:0] ref_mem [64];
  int checks = 0, failures = 0, waits = 0, exp_waits = 0, cyc = 0;

  tss_ahb_if #(.ADDR_W(16)) dut (.*);
  assign hready = hreadyout;

  // target: synchronous-read memory addressed by rd_addr in the address phase
  always_ff @(posedge clk) begin
    if (wr_en) tmem[wr_addr[7:2]] <= wr_data;
    rdata <= tmem[rd_addr[7:2]];
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !hreadyout) waits++;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pipelined sequence: ops[i] = 1 for write; address phases back to back
  task automatic run_seq(input int nops);
    bit          pw;      // previous transfer was a write
    bit          pv;      // a data phase is pending
    logic [15:0] pa;
    logic [31:0] pd;
    pv = 0; pw = 0; pa = 0; pd = 0;
    for (int i = 0; i <= nops; i++) begin
      bit w;
      logic [15:0] a;
      logic [31:0] d;
      w = ($urandom % 2 == 0);
      a = {8'h00, 6'($urandom), 2'b00};
      d = $urandom;
      // address phase of transfer i (none after the last)
      @(negedge clk);
      hsel   = (i < nops);
      htrans = (i < nops) ? 2'b10 : 2'b00;
      hwrite = w;
      haddr  = a;
      hwdata = pw ? pd : 32'h0;          // data phase of transfer i-1
      if (pv && pw && (i < nops) && !w) exp_waits++;
      // wait until the transfer in its data phase completes
      @(posedge clk);
      while (!hready) @(posedge clk);
      // check read data of transfer i-1 (valid in its data phase)
      if (pv && !pw) begin
        checks++;
        if (hrdata !== ref_mem[pa[7:2]]) begin
          failures++;
          $display("read %h: %h expected %h", pa, hrdata, ref_mem[pa[7:2]]);
        end
      end
      if (pv && pw) ref_mem[pa[7:2]] = pd;
      pv = (i < nops); pw = w; pa = a; pd = d;
    end
  endtask

  initial begin
    rst_n = 0; hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hwdata = 0;
    for (int i = 0; i < 64; i++) begin tmem[i] = 0; ref_mem[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) run_seq(30);
    checks += 2;
    if (waits != exp_waits) begin
      failures++; $display("%0d wait states, expected %0d", waits, exp_waits);
    end
    if (hresp !== 1'b0) begin failures++; $display("HRESP not OKAY"); end
    $display("wait states %0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tss_ocm: self-checking test of the Output Control Management unit.
// A behavioural accelerator waits for ORead, writes the elements of a job
// into its output buffer in a random order, and pulses OReady. The byte
// stream that leaves the OCM is compared with the bytes the testbench
// derives itself: elements walked in stream order (address i, or
// (i mod cols) * rows + i / cols when transposed), each split into
// elem_bytes bytes in the configured order. A slow sink forces the
// accelerator to wait for a free buffer (must happen at least once); with
// a sink that is always ready, a job of 4-byte elements must leave at one
// byte per cycle without a gap.
module tb_tss_ocm;
  import tss_pkg::*;
  localparam int unsigned EB = 4, D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mg_cfg_t cfg;
  logic oread, oready, acc_we, out_valid, out_ready, drain_done;
  logic [$clog2(D)-1:0] acc_addr;
  logic [31:0] acc_wdata, acc_rdata;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int acc_waits = 0, drains = 0, nbytes = 0;
  logic [7:0] exp_q [$];
  logic [31:0] abuf [D];
  bit slow_sink, gapless_job;
  int first_cyc, last_cyc, cyc = 0;

  tss_ocm #(.ELEM_BYTES(EB), .DEPTH(D)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && drain_done) drains++;
  end

  // sink: ready set at the falling edge holds through the next rising edge
  always @(negedge clk) begin
    out_ready = slow_sink ? ($urandom % 4 == 0) : 1'b1;
    if (rst_n && out_valid && out_ready) begin
      logic [7:0] e;
      checks++;
      if (nbytes == 0) first_cyc = cyc;
      last_cyc = cyc;
      nbytes++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected byte %h", out_data);
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++; $display("byte %h expected %h", out_data, e);
        end
      end
    end
  end

  task automatic produce(input int njobs);
    int n, nb, perm [D];
    n  = int'(cfg.rows) * int'(cfg.cols);
    nb = int'(cfg.elem_bytes);
    for (int j = 0; j < njobs; j++) begin
      @(negedge clk);
      if (!oread) acc_waits++;
      while (!oread) @(negedge clk);
      for (int a = 0; a < n; a++) perm[a] = a;
      for (int a = n - 1; a > 0; a--) begin
        int r, t;
        r = $urandom % (a + 1);
        t = perm[a]; perm[a] = perm[r]; perm[r] = t;
      end
      for (int k = 0; k < n; k++) begin
        logic [31:0] v;
        v = '0;
        for (int b = 0; b < nb; b++) v[8*b +: 8] = 8'($urandom);
        abuf[perm[k]] = v;
        acc_addr  = $clog2(D)'(perm[k]);
        acc_wdata = v;
        acc_we    = 1;
        @(negedge clk);
        acc_we    = 0;
      end
      for (int i = 0; i < n; i++) begin
        int a;
        a = cfg.transpose ? (i % int'(cfg.cols)) * int'(cfg.rows) + i / int'(cfg.cols) : i;
        for (int k = 0; k < nb; k++)
          exp_q.push_back(cfg.swap ? abuf[a][8*(nb-1-k) +: 8] : abuf[a][8*k +: 8]);
      end
      oready = 1;
      @(negedge clk);
      oready = 0;
    end
  endtask

  task automatic phase(input mg_cfg_t c, input int njobs, input bit slow);
    cfg = c;
    slow_sink = slow;
    produce(njobs);
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; oready = 0; acc_we = 0; acc_addr = 0; acc_wdata = 0;
    slow_sink = 0; cfg = MG_CFG_DEFAULT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase('{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd16}, 5, 1);
    phase('{elem_bytes: 3'd2, swap: 1'b1, transpose: 1'b1, rows: 8'd4, cols: 8'd4}, 5, 1);
    phase('{elem_bytes: 3'd3, swap: 1'b1, transpose: 1'b1, rows: 8'd5, cols: 8'd2}, 4, 0);
    phase('{elem_bytes: 3'd1, swap: 1'b0, transpose: 1'b0, rows: 8'd2, cols: 8'd8}, 4, 0);
    // rate: one job of 16 four-byte elements, sink always ready
    nbytes = 0;
    phase('{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd16}, 1, 0);
    checks += 4;
    if (nbytes != 64 || last_cyc - first_cyc != 63) begin
      failures++;
      $display("64 bytes left over %0d cycles", last_cyc - first_cyc + 1);
    end
    if (acc_waits == 0) begin failures++; $display("accelerator never waited"); end
    if (drains != 19) begin failures++; $display("%0d drain_done pulses", drains); end
    if (exp_q.size() != 0) begin failures++; $display("bytes missing"); end
    $display("accelerator waits %0d, jobs drained %0d", acc_waits, drains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

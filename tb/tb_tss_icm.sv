// tb_tss_icm: self-checking test of the Input Control Management unit.
// A random byte stream (random gaps) is pushed into the ICM for several
// jobs in each of three element formats / job orders. A behavioural
// accelerator waits for IReady, reads its whole input buffer through the
// random-access port, compares every element with the job the testbench
// assembled itself (element i of the stream expected at address i, or at
// (i mod cols) * rows + i / cols when transposed), then pulses IRead. The
// accelerator is sometimes slow so that both buffers fill and the stream
// is back-pressured; the test fails if that never happens, or if the
// accelerator is ever handed a buffer while the stream still fills it
// (IReady high without a completed job).
module tb_tss_icm;
  import tss_pkg::*;
  localparam int unsigned EB = 4, D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mg_cfg_t cfg;
  logic in_valid, in_ready, iready, iread, acc_we, fill_done;
  logic [7:0] in_data;
  logic [$clog2(D)-1:0] acc_addr;
  logic [31:0] acc_wdata, acc_rdata;
  int checks = 0, failures = 0;
  int stalls = 0, jobs_done = 0, fills = 0;
  logic [31:0] pbuf [D];     // job being assembled by the source
  logic [31:0] exp_q [$];    // finished jobs, in buffer-address order
  int          njobs_ready = 0;

  tss_icm #(.ELEM_BYTES(EB), .DEPTH(D)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && fill_done) fills++;
  end

  // stream source: njobs jobs of the current format
  task automatic produce(input int njobs);
    int n, nb;
    n  = int'(cfg.rows) * int'(cfg.cols);
    nb = int'(cfg.elem_bytes);
    for (int j = 0; j < njobs; j++) begin
      for (int i = 0; i < n; i++) begin
        logic [31:0] v;
        int a;
        v = '0;
        for (int b = 0; b < nb; b++) v[8*b +: 8] = 8'($urandom);
        a = cfg.transpose ? (i % int'(cfg.cols)) * int'(cfg.rows) + i / int'(cfg.cols) : i;
        pbuf[a] = v;
        for (int k = 0; k < nb; k++) begin
          @(negedge clk);
          while ($urandom % 5 == 0) @(negedge clk);
          in_valid = 1;
          in_data  = cfg.swap ? v[8*(nb-1-k) +: 8] : v[8*k +: 8];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          in_valid = 0;
        end
      end
      for (int a = 0; a < n; a++) exp_q.push_back(pbuf[a]);
      njobs_ready++;
    end
  endtask

  // behavioural accelerator: consume njobs jobs
  task automatic consume(input int njobs, input bit slow);
    int n;
    n = int'(cfg.rows) * int'(cfg.cols);
    for (int j = 0; j < njobs; j++) begin
      @(negedge clk);
      while (!iready) @(negedge clk);
      if (slow) repeat (300) @(negedge clk);
      checks++;
      if (njobs_ready == 0) begin
        failures++; $display("IReady without a complete job");
        continue;
      end
      njobs_ready--;
      for (int a = 0; a < n; a++) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        acc_addr = $clog2(D)'(a);
        @(negedge clk);
        checks++;
        if (acc_rdata !== e) begin
          failures++;
          $display("job %0d addr %0d: %h expected %h", j, a, acc_rdata, e);
        end
      end
      iread = 1;
      @(negedge clk);
      iread = 0;
      jobs_done++;
    end
  endtask

  task automatic phase(input mg_cfg_t c, input int njobs, input bit slow);
    cfg = c;
    fork
      produce(njobs);
      consume(njobs, slow);
    join
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_data = 0; iread = 0; acc_we = 0;
    acc_addr = 0; acc_wdata = 0; cfg = MG_CFG_DEFAULT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase('{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd16}, 5, 1);
    phase('{elem_bytes: 3'd2, swap: 1'b1, transpose: 1'b1, rows: 8'd4, cols: 8'd4}, 5, 0);
    phase('{elem_bytes: 3'd3, swap: 1'b0, transpose: 1'b1, rows: 8'd2, cols: 8'd5}, 4, 1);
    phase('{elem_bytes: 3'd1, swap: 1'b0, transpose: 1'b0, rows: 8'd2, cols: 8'd8}, 4, 0);
    checks += 3;
    if (stalls == 0) begin failures++; $display("stream was never back-pressured"); end
    if (jobs_done != 18) begin failures++; $display("%0d jobs consumed", jobs_done); end
    if (fills != 18) begin failures++; $display("%0d fill_done pulses", fills); end
    $display("jobs %0d, stall cycles %0d", jobs_done, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

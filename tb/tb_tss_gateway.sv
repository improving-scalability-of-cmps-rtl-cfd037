// tb_tss_gateway: self-checking test of the gateway on its own.
// Each input flow's byte stream is looped back straight into the output
// flow of the same number (standing in for an accelerator chain). A host
// model on the AHB bus enables the interrupts, programs a different format
// per flow, then runs a polling loop: whenever STATUS shows a free input
// buffer it writes a job into the input SPM and commits it; whenever it
// shows a filled output buffer it reads it, compares every word with what
// the testbench computes from the bytes sent (input format -> byte stream
// -> output format), clears the interrupt and releases the buffer.
//   flow 0: 16-word input jobs, 8-word output jobs (one outside job becomes
//           two jobs on the far side: granularity adjustment)
//   flow 1: output flow reverses the byte order of each word (marshalling)
//   flow 2: input flow walks its 4x4 job column-major (transposition)
// It also checks that the interrupt line rose, that it follows
// IRQ_STATUS & IRQ_ENABLE, and that the MUX select outputs follow MUX_SEL.
module tb_tss_gateway;
  import tss_pkg::*;
  localparam int unsigned NF = 3, ND = 12, SW = 4, SD = 32;
  localparam int unsigned NJOBS = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic hsel, hwrite, hready, hreadyout, hresp, irq;
  logic [15:0] haddr;
  logic [1:0]  htrans;
  logic [31:0] hwdata, hrdata;
  logic [ND-1:0][SW-1:0] sel;
  logic [NF-1:0] src_valid, src_ready, dst_valid, dst_ready;
  logic [NF-1:0][7:0] src_data, dst_data;
  int checks = 0, failures = 0;
  int irq_rises = 0, out_jobs [NF], in_jobs [NF];
  logic irq_q = 0;
  mg_cfg_t icfg [NF], ocfg [NF];
  logic [7:0] bytes_q [NF][$];

  tss_gateway #(.N_FLOWS(NF), .N_DST(ND), .SEL_W(SW), .SPM_DEPTH(SD)) dut (.*);
  tb_ahb_bfm bfm (.clk, .hsel, .haddr, .htrans, .hwrite, .hwdata,
                  .hready, .hrdata);
  assign hready    = hreadyout;
  assign dst_valid = src_valid;
  assign dst_data  = src_data;
  assign src_ready = dst_ready;

  always @(posedge clk) begin
    irq_q <= irq;
    if (rst_n && irq && !irq_q) irq_rises++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int walk(input mg_cfg_t c, input int i);
    return c.transpose ? (i % int'(c.cols)) * int'(c.rows) + i / int'(c.cols) : i;
  endfunction

  function automatic logic [15:0] mmr(input logic [7:0] r);
    return {6'b0, r, 2'b00};
  endfunction

  task automatic send_job(input int f);
    int n, nb;
    logic [31:0] w [SD];
    n  = int'(icfg[f].rows) * int'(icfg[f].cols);
    nb = int'(icfg[f].elem_bytes);
    for (int k = 0; k < n; k++) begin
      w[k] = $urandom;
      bfm.write(16'h1000 * 16'(1 + f) + 16'(4 * k), w[k]);
    end
    for (int i = 0; i < n; i++)
      for (int b = 0; b < nb; b++) begin
        int a;
        a = walk(icfg[f], i);
        bytes_q[f].push_back(icfg[f].swap ? w[a][8*(nb-1-b) +: 8] : w[a][8*b +: 8]);
      end
    bfm.write(mmr(REG_COMMAND), 32'(1) << (IRQ_IN_OFS + f));
    in_jobs[f]++;
  endtask

  task automatic take_job(input int f);
    int n, nb;
    logic [31:0] e [SD];
    logic [31:0] got;
    n  = int'(ocfg[f].rows) * int'(ocfg[f].cols);
    nb = int'(ocfg[f].elem_bytes);
    for (int i = 0; i < n; i++) begin
      logic [31:0] v;
      v = '0;
      for (int b = 0; b < nb; b++) begin
        logic [7:0] x;
        x = bytes_q[f].pop_front();
        if (ocfg[f].swap) v[8*(nb-1-b) +: 8] = x; else v[8*b +: 8] = x;
      end
      e[walk(ocfg[f], i)] = v;
    end
    for (int k = 0; k < n; k++) begin
      bfm.read(16'h1000 * 16'(8 + f) + 16'(4 * k), got);
      checks++;
      if (got !== e[k]) begin
        failures++;
        $display("flow %0d out job %0d word %0d: %h expected %h",
                 f, out_jobs[f], k, got, e[k]);
      end
    end
    bfm.write(mmr(REG_IRQ_STATUS), 32'(1) << f);
    bfm.write(mmr(REG_COMMAND), 32'(1) << f);
    out_jobs[f]++;
  endtask

  initial begin
    logic [31:0] st, is, ie;
    int exp_out [NF];
    rst_n = 0;
    for (int f = 0; f < NF; f++) begin out_jobs[f] = 0; in_jobs[f] = 0; end
    icfg[0] = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd16};
    ocfg[0] = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd8};
    icfg[1] = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'd12};
    ocfg[1] = '{elem_bytes: 3'd4, swap: 1'b1, transpose: 1'b0, rows: 8'd1, cols: 8'd12};
    icfg[2] = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b1, rows: 8'd4, cols: 8'd4};
    ocfg[2] = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd2, cols: 8'd8};
    exp_out[0] = 2 * NJOBS; exp_out[1] = NJOBS; exp_out[2] = NJOBS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      bfm.write(mmr(REG_IN_JOB + 8'(f)), 32'(icfg[f]));
      bfm.write(mmr(REG_OUT_JOB + 8'(f)), 32'(ocfg[f]));
    end
    for (int k = 0; k < ND; k++) bfm.write(mmr(REG_MUX_SEL + 8'(k)), 32'((k + 5) % 13));
    for (int k = 0; k < ND; k++) begin
      checks++;
      if (sel[k] !== SW'((k + 5) % 13)) begin failures++; $display("sel %0d", k); end
    end
    bfm.write(mmr(REG_IRQ_ENABLE), 32'h0000_0007);
    // polling loop of the host
    while (out_jobs[0] < exp_out[0] || out_jobs[1] < exp_out[1] || out_jobs[2] < exp_out[2]) begin
      bfm.read(mmr(REG_STATUS), st);
      bfm.read(mmr(REG_IRQ_STATUS), is);
      bfm.read(mmr(REG_IRQ_ENABLE), ie);
      checks++;
      if (irq !== |(is & ie)) begin failures++; $display("irq %b vs status %h", irq, is); end
      for (int f = 0; f < NF; f++) begin
        if (st[f]) take_job(f);
        if (st[IRQ_IN_OFS + f] && in_jobs[f] < NJOBS) send_job(f);
      end
    end
    checks += 2;
    if (irq_rises == 0) begin failures++; $display("interrupt never raised"); end
    if (bytes_q[0].size() + bytes_q[1].size() + bytes_q[2].size() != 0) begin
      failures++; $display("bytes left over");
    end
    $display("output jobs %0d/%0d/%0d, interrupts %0d", out_jobs[0], out_jobs[1],
             out_jobs[2], irq_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tss_top_body.svh: common body of the end-to-end TSS testbenches.
// The including module defines: NJOBS (outside jobs per flow), ACC_ICFG /
// ACC_OCFG (per-slot formats, also given to the DUT), GW_ICFG / GW_OCFG
// (gateway flow formats, programmed through the MMRs), CHAIN (three slots
// per flow, in order), and the DUT instance name 'dut'.
//
// Three chains of three accelerators run side by side, each fed by one
// gateway input flow and drained by one gateway output flow. A host model
// on the AHB bus programs the MUX selects and formats, then services the
// gateway by polling: it writes outside jobs into free input SPM buffers and
// commits them, and reads and checks finished output buffers. Expected data
// comes from a byte-level reference model of every stage (gateway input
// format -> each accelerator's ICM format -> kernel -> OCM format -> gateway
// output format). Mechanisms counted (each must occur at least once):
// back-pressure on an interconnect link, both buffers of an ICM full at
// once, an accelerator waiting for a free output buffer, an outside job
// split into several accelerator jobs, all three chains streaming in the
// same cycle, a backward link, byte-order swaps, transposed jobs and the
// completion interrupt.

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic hsel, hwrite, hready, hreadyout, hresp, irq;
  logic [15:0] haddr;
  logic [1:0]  htrans;
  logic [31:0] hwdata, hrdata;
  logic [8:0]          acc_iready, acc_iread, acc_iwe, acc_oread, acc_oready, acc_owe;
  logic [8:0][AW-1:0]  acc_iaddr, acc_oaddr;
  logic [8:0][31:0]    acc_iwdata, acc_irdata, acc_owdata, acc_ordata;

  int checks = 0, failures = 0;
  int in_jobs [3], out_jobs [3];
  // reference model: pending bytes in front of each stage; stage 0..2 are
  // the accelerators of the chain, stage 3 the gateway output flow
  logic [7:0] stage_q [3][4][$];
  int n_stall = 0, n_icm_full = 0, n_concurrent = 0, n_irq = 0;
  int n_swap_jobs = 0, n_transpose_jobs = 0;
  logic irq_q = 0;

  tb_ahb_bfm bfm (.clk, .hsel, .haddr, .htrans, .hwrite, .hwdata,
                  .hready, .hrdata);
  assign hready = hreadyout;

  for (genvar a = 0; a < 9; a++) begin : g_kernel
    tb_acc_model #(.N(int'(ACC_ICFG[a].rows) * int'(ACC_ICFG[a].cols)),
                   .OUT_BYTES(int'(ACC_OCFG[a].elem_bytes)),
                   .KEY(32'h1357_9BDF * (a + 1)), .AW(AW),
                   .MAX_PAUSE((a == 6 || a == 7) ? 300 : 20)) u_k (
      .clk, .rst_n,
      .iready (acc_iready[a]), .iread (acc_iread[a]), .iaddr (acc_iaddr[a]),
      .iwe (acc_iwe[a]), .iwdata (acc_iwdata[a]), .irdata (acc_irdata[a]),
      .oread (acc_oread[a]), .oready (acc_oready[a]), .oaddr (acc_oaddr[a]),
      .owe (acc_owe[a]), .owdata (acc_owdata[a])
    );
  end

  initial begin
    #(WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    logic [2:0] act;
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
    if (|(dut.dst_valid & ~dut.dst_ready)) n_stall++;
    for (int a = 0; a < 9; a++)
      if (acc_iready[a] && !dut.dst_ready[a] && dut.dst_valid[a]) n_icm_full++;
    for (int f = 0; f < 3; f++)
      act[f] = |(dut.src_valid & dut.src_ready & chain_mask(f));
    if (&act) n_concurrent++;
  end

  function automatic logic [11:0] chain_mask(input int f);
    logic [11:0] m;
    m = '0;
    for (int s = 0; s < 3; s++) m[CHAIN[f][s]] = 1'b1;
    m[9 + f] = 1'b1;
    return m;
  endfunction

  function automatic int walk(input mg_cfg_t c, input int i);
    return c.transpose ? (i % int'(c.cols)) * int'(c.rows) + i / int'(c.cols) : i;
  endfunction

  function automatic logic [15:0] mmr(input logic [7:0] r);
    return {6'b0, r, 2'b00};
  endfunction

  // run every complete job through the reference stages of flow f
  task automatic ref_advance(input int f);
    for (int s = 0; s < 3; s++) begin
      int a, n, ib, ob;
      mg_cfg_t ic, oc;
      logic [31:0] key, mask;
      logic [31:0] b [64];
      a  = CHAIN[f][s];
      ic = ACC_ICFG[a]; oc = ACC_OCFG[a];
      n  = int'(ic.rows) * int'(ic.cols);
      ib = int'(ic.elem_bytes); ob = int'(oc.elem_bytes);
      key  = 32'h1357_9BDF * (a + 1);
      mask = (ob >= 4) ? 32'hFFFF_FFFF : ((32'h1 << (8 * ob)) - 1);
      while (stage_q[f][s].size() >= n * ib) begin
        for (int i = 0; i < n; i++) begin
          logic [31:0] v;
          v = '0;
          for (int k = 0; k < ib; k++) begin
            logic [7:0] x;
            x = stage_q[f][s].pop_front();
            if (ic.swap) v[8*(ib-1-k) +: 8] = x; else v[8*k +: 8] = x;
          end
          b[walk(ic, i)] = (v ^ key) & mask;
        end
        for (int i = 0; i < n; i++)
          for (int k = 0; k < ob; k++) begin
            logic [31:0] w;
            w = b[walk(oc, i)];
            stage_q[f][s+1].push_back(oc.swap ? w[8*(ob-1-k) +: 8] : w[8*k +: 8]);
          end
        if (ic.swap || oc.swap) n_swap_jobs++;
        if (ic.transpose || oc.transpose) n_transpose_jobs++;
      end
    end
  endtask

  task automatic send_job(input int f);
    int n, nb;
    logic [31:0] w [256];
    n  = int'(GW_ICFG[f].rows) * int'(GW_ICFG[f].cols);
    nb = int'(GW_ICFG[f].elem_bytes);
    for (int k = 0; k < n; k++) begin
      w[k] = $urandom;
      bfm.write(16'h1000 * 16'(1 + f) + 16'(4 * k), w[k]);
    end
    for (int i = 0; i < n; i++)
      for (int b = 0; b < nb; b++) begin
        int a;
        a = walk(GW_ICFG[f], i);
        stage_q[f][0].push_back(GW_ICFG[f].swap ? w[a][8*(nb-1-b) +: 8] : w[a][8*b +: 8]);
      end
    ref_advance(f);
    bfm.write(mmr(REG_COMMAND), 32'(1) << (IRQ_IN_OFS + f));
    in_jobs[f]++;
  endtask

  task automatic take_job(input int f);
    int n, nb;
    logic [31:0] e [256];
    logic [31:0] got;
    n  = int'(GW_OCFG[f].rows) * int'(GW_OCFG[f].cols);
    nb = int'(GW_OCFG[f].elem_bytes);
    checks++;
    if (stage_q[f][3].size() < n * nb) begin
      failures++;
      $display("flow %0d: output job ready before the reference has its data", f);
      return;
    end
    for (int i = 0; i < n; i++) begin
      logic [31:0] v;
      v = '0;
      for (int b = 0; b < nb; b++) begin
        logic [7:0] x;
        x = stage_q[f][3].pop_front();
        if (GW_OCFG[f].swap) v[8*(nb-1-b) +: 8] = x; else v[8*b +: 8] = x;
      end
      e[walk(GW_OCFG[f], i)] = v;
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

  function automatic int out_jobs_expected(input int f);
    int ib, ob;
    ib = NJOBS * int'(GW_ICFG[f].rows) * int'(GW_ICFG[f].cols) * int'(GW_ICFG[f].elem_bytes);
    // bytes are scaled by each stage's out/in element size ratio
    for (int s = 0; s < 3; s++) begin
      int a;
      a  = CHAIN[f][s];
      ib = ib / int'(ACC_ICFG[a].elem_bytes) * int'(ACC_OCFG[a].elem_bytes);
    end
    ob = int'(GW_OCFG[f].rows) * int'(GW_OCFG[f].cols) * int'(GW_OCFG[f].elem_bytes);
    return ib / ob;
  endfunction

  initial begin
    logic [31:0] st;
    int acc_jobs, gw_jobs, waits, backward;
    bit done;
    rst_n = 0;
    for (int f = 0; f < 3; f++) begin in_jobs[f] = 0; out_jobs[f] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // configuration: formats of the gateway flows, then the MUX selects
    for (int f = 0; f < 3; f++) begin
      bfm.write(mmr(REG_IN_JOB + 8'(f)), 32'(GW_ICFG[f]));
      bfm.write(mmr(REG_OUT_JOB + 8'(f)), 32'(GW_OCFG[f]));
    end
    backward = 0;
    for (int f = 0; f < 3; f++) begin
      bfm.write(mmr(REG_MUX_SEL + 8'(CHAIN[f][0])), 32'(9 + f));
      for (int s = 1; s < 3; s++) begin
        bfm.write(mmr(REG_MUX_SEL + 8'(CHAIN[f][s])), 32'(CHAIN[f][s-1]));
        if (CHAIN[f][s] / 3 <= CHAIN[f][s-1] / 3) backward++;
      end
      bfm.write(mmr(REG_MUX_SEL + 8'(9 + f)), 32'(CHAIN[f][2]));
    end
    bfm.write(mmr(REG_IRQ_ENABLE), 32'h0000_0007);
    // host service loop
    done = 0;
    while (!done) begin
      bfm.read(mmr(REG_STATUS), st);
      for (int f = 0; f < 3; f++) begin
        if (st[f]) take_job(f);
        if (st[IRQ_IN_OFS + f] && in_jobs[f] < NJOBS) send_job(f);
      end
      done = 1;
      for (int f = 0; f < 3; f++)
        if (out_jobs[f] < out_jobs_expected(f)) done = 0;
    end
    repeat (20) @(negedge clk);
    acc_jobs = 0; waits = 0; gw_jobs = 0;
    for (int f = 0; f < 3; f++) gw_jobs += in_jobs[f];
    acc_jobs = g_kernel[0].u_k.jobs + g_kernel[1].u_k.jobs + g_kernel[2].u_k.jobs +
               g_kernel[3].u_k.jobs + g_kernel[4].u_k.jobs + g_kernel[5].u_k.jobs +
               g_kernel[6].u_k.jobs + g_kernel[7].u_k.jobs + g_kernel[8].u_k.jobs;
    waits    = g_kernel[0].u_k.out_waits + g_kernel[1].u_k.out_waits + g_kernel[2].u_k.out_waits +
               g_kernel[3].u_k.out_waits + g_kernel[4].u_k.out_waits + g_kernel[5].u_k.out_waits +
               g_kernel[6].u_k.out_waits + g_kernel[7].u_k.out_waits + g_kernel[8].u_k.out_waits;
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (stage_q[f][3].size() != 0 || stage_q[f][0].size() != 0) begin
        failures++; $display("flow %0d: data left in the reference", f);
      end
    end
    $display("outside jobs in %0d, accelerator jobs %0d, output jobs %0d/%0d/%0d",
             gw_jobs, acc_jobs, out_jobs[0], out_jobs[1], out_jobs[2]);
    $display("link stall cycles %0d, ICM both-full cycles %0d, output-buffer waits %0d",
             n_stall, n_icm_full, waits);
    $display("3-chain concurrent cycles %0d, backward links %0d, interrupts %0d",
             n_concurrent, backward, n_irq);
    $display("jobs with byte swap %0d, with transposition %0d", n_swap_jobs, n_transpose_jobs);
    checks += 8;
    if (n_stall == 0)        begin failures++; $display("no link stall"); end
    if (n_icm_full == 0)     begin failures++; $display("no ICM with both buffers full"); end
    if (waits == 0)          begin failures++; $display("no output-buffer wait"); end
    if (acc_jobs <= 3 * gw_jobs) begin failures++; $display("no job split"); end
    if (n_concurrent == 0)   begin failures++; $display("chains never concurrent"); end
    if (backward == 0)       begin failures++; $display("no backward link"); end
    if (n_irq == 0)          begin failures++; $display("no interrupt"); end
    if (EXPECT_FORMATS && (n_swap_jobs == 0 || n_transpose_jobs == 0)) begin
      failures++; $display("no swap or transpose");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

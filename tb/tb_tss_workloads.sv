// tb_tss_workloads: runs the eight streaming applications of the TSS
// evaluation through chains of accelerator slots of one default-size TSS
// instance, one application after another.
//
// For each application the chain has as many slots as the application has
// accelerator nodes (slot 0 -> 1 -> ... -> n-1, fed by gateway flow 0 and
// drained by gateway output flow 0), and the volume streamed is the largest
// number of bytes the application moves over one edge, rounded up to whole
// 64-byte accelerator jobs:
//   H.263 decoder   4 accelerators, 38016 bytes
//   H.263 encoder   4 accelerators, 38016 bytes
//   MP3 decoder     8 accelerators,   576 bytes
//   MP3 playback    2 accelerators,     4 bytes (one 64-byte job)
//   sample rate     5 accelerators,     4 bytes (one 64-byte job)
// The three applications with more accelerator nodes than slots run in two
// passes, the way a host would run them: the whole volume goes through a
// chain of all nine slots and back to the host, then the host rewires the
// selects and sends it through a second chain of the remaining nodes:
//   modem          11 accelerators (9 + 2),    4 bytes (one 64-byte job)
//   synthetic      13 accelerators (9 + 4), 1000 bytes
//   satellite      11 accelerators (9 + 2),    4 bytes (one 64-byte job)
// The real application graphs are not plain chains (some have more direct
// accelerator links than a chain) and their kernels are not modelled: every
// slot runs the behavioural XOR kernel, so each output word must equal the
// input word XOR the keys of all slots in the chain. Between applications
// the host rewires the MUX selects (opening all of them first), which also
// checks reconfiguration. The
// number of cycles per application is printed.
module tb_tss_workloads;
  import tss_pkg::*;
  localparam int AW = 6;
  localparam int NAPP = 8;
  localparam string APP_NAME [NAPP] = '{"H263Dec", "H263Enc", "MP3Dec", "MP3PB", "Sam.Rat.",
                                        "Modem", "Synthetic", "Satellite"};
  localparam int    APP_ACCS [NAPP] = '{4, 4, 8, 2, 5, 11, 13, 11};
  localparam int    APP_COMM [NAPP] = '{38016, 38016, 576, 4, 4, 4, 1000, 4};

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
  int cyc = 0;
  logic [31:0] exp_q [$];
  logic [31:0] src_q [$];   // words the host sends in the current pass
  logic [31:0] res_q [$];   // words the host received in the current pass

  tss_top dut (.*);
  tb_ahb_bfm bfm (.clk, .hsel, .haddr, .htrans, .hwrite, .hwdata,
                  .hready, .hrdata);
  assign hready = hreadyout;

  for (genvar a = 0; a < 9; a++) begin : g_kernel
    tb_acc_model #(.N(16), .OUT_BYTES(4), .KEY(32'h1357_9BDF * (a + 1)),
                   .AW(AW), .MAX_PAUSE(4)) u_k (
      .clk, .rst_n,
      .iready (acc_iready[a]), .iread (acc_iread[a]), .iaddr (acc_iaddr[a]),
      .iwe (acc_iwe[a]), .iwdata (acc_iwdata[a]), .irdata (acc_irdata[a]),
      .oread (acc_oread[a]), .oready (acc_oready[a]), .oaddr (acc_oaddr[a]),
      .owe (acc_owe[a]), .owdata (acc_owdata[a])
    );
  end

  always @(posedge clk) cyc++;

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] mmr(input logic [7:0] r);
    return {6'b0, r, 2'b00};
  endfunction

  // One pass: stream the words of src_q through slots 0..n-1 and collect
  // the results in res_q. Returns the number of cycles taken.
  task automatic run_pass(input int app, input int n, output int cycles);
    int words, job, jobs_in, jobs_out, sent, t0;
    logic [31:0] st, got;
    mg_cfg_t c;
    words = src_q.size();
    job   = 255;
    while (words % job != 0) job--;
    jobs_in = words / job; jobs_out = 0; sent = 0;
    c = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0, rows: 8'd1, cols: 8'(job)};
    bfm.write(mmr(REG_IN_JOB), 32'(c));
    bfm.write(mmr(REG_OUT_JOB), 32'(c));
    // open every consumer first, so that no producer is ever selected twice
    for (int k = 0; k < 12; k++) bfm.write(mmr(REG_MUX_SEL + 8'(k)), 32'd15);
    for (int k = 0; k < 12; k++) begin
      int s;
      s = (k == 0) ? 9 : (k < n) ? k - 1 : (k == 9) ? n - 1 : 15;
      bfm.write(mmr(REG_MUX_SEL + 8'(k)), 32'(s));
    end
    t0 = cyc;
    while (jobs_out < jobs_in) begin
      bfm.read(mmr(REG_STATUS), st);
      if (st[0]) begin
        for (int k = 0; k < job; k++) begin
          logic [31:0] e;
          bfm.read(16'h8000 + 16'(4 * k), got);
          res_q.push_back(got);
        end
        bfm.write(mmr(REG_COMMAND), 32'h1);
        jobs_out++;
      end
      if (st[IRQ_IN_OFS] && sent < jobs_in) begin
        for (int k = 0; k < job; k++) begin
          bfm.write(16'h1000 + 16'(4 * k), src_q.pop_front());
        end
        bfm.write(mmr(REG_COMMAND), 32'h100);
        sent++;
      end
    end
    cycles = cyc - t0;
    $display("%-9s pass through %0d slots, %0d bytes in %0d outside jobs of %0d words: %0d cycles",
             APP_NAME[app], n, 4 * words, jobs_in, job, cycles);
  endtask

  task automatic run_app(input int app);
    int n, words, cycles, total, left;
    logic [31:0] key, got, e;
    n     = APP_ACCS[app];
    words = ((APP_COMM[app] + 63) / 64) * 16;
    key   = '0;
    total = 0;
    res_q.delete();
    for (int k = 0; k < words; k++) begin
      logic [31:0] w;
      w = $urandom;
      res_q.push_back(w);
      exp_q.push_back(w);
    end
    // the chain is cut into passes of at most nine slots; slot a of a pass
    // applies key a, so the expected result folds in the keys pass by pass
    left = n;
    while (left > 0) begin
      int m;
      m = (left > 9) ? 9 : left;
      src_q = res_q;
      res_q.delete();
      run_pass(app, m, cycles);
      total += cycles;
      for (int a = 0; a < m; a++) key ^= 32'h1357_9BDF * (a + 1);
      left -= m;
    end
    checks++;
    if (res_q.size() != words) begin
      failures++;
      $display("%s: %0d words back, expected %0d", APP_NAME[app], res_q.size(), words);
    end
    for (int k = 0; k < words && res_q.size() > 0; k++) begin
      got = res_q.pop_front();
      e = exp_q.pop_front() ^ key;
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("%s word %0d: %h expected %h", APP_NAME[app], k, got, e);
      end
    end
    exp_q.delete();
    $display("%-9s %0d accelerators, %0d bytes: %0d cycles in all", APP_NAME[app], n, 4 * words, total);
  endtask

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int app = 0; app < NAPP; app++) run_app(app);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tss_marsh_in: self-checking test of the input marshalling unit.
// For every element size (1..4 bytes) and both byte orders a random byte
// stream is fed with random gaps and random back-pressure; the elements
// that come out are compared with elements assembled by the testbench. A
// final run with no gaps checks the rate of one byte per cycle.
module tb_tss_marsh_in;
  import tss_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mg_cfg_t cfg;
  logic in_valid, in_ready, elem_valid, elem_ready;
  logic [7:0]  in_data;
  logic [31:0] elem_data;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  bit gaps;
  int cyc = 0;
  always @(posedge clk) cyc++;

  tss_marsh_in #(.ELEM_BYTES(4)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random back-pressure, checks each element
  // the ready value set here holds through the next rising edge, so the
  // handshake checked here is the one that edge performs
  always @(negedge clk) begin
    elem_ready = gaps ? ($urandom % 3 != 0) : 1'b1;
    if (rst_n && elem_valid && elem_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected element %h", elem_data);
      end else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (elem_data !== e) begin
          failures++; $display("element %h expected %h", elem_data, e);
        end
      end
    end
  end

  task automatic send(input int nelem);
    for (int e = 0; e < nelem; e++) begin
      logic [31:0] v;
      int nb;
      nb = int'(cfg.elem_bytes);
      v = '0;
      for (int b = 0; b < nb; b++) v[8*b +: 8] = 8'($urandom);
      exp_q.push_back(v);
      for (int k = 0; k < nb; k++) begin
        in_data  = cfg.swap ? v[8*(nb-1-k) +: 8] : v[8*k +: 8];
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 0;
        if (gaps) while ($urandom % 4 == 0) @(posedge clk) #1;
      end
    end
  endtask

  initial begin
    int t0, t1;
    rst_n = 0; in_valid = 0; in_data = 0; gaps = 1;
    cfg = MG_CFG_DEFAULT;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int nb = 1; nb <= 4; nb++)
      for (int sw = 0; sw < 2; sw++) begin
        cfg.elem_bytes = 3'(nb);
        cfg.swap = sw[0];
        send(20);
        repeat (10) @(posedge clk);
        #1;
      end
    // throughput: 32 bytes without gaps take 32 cycles
    gaps = 0;
    cfg.elem_bytes = 3'd4; cfg.swap = 1'b0;
    t0 = cyc;
    send(8);
    t1 = cyc;
    checks++;
    if ((t1 - t0) != 32) begin
      failures++; $display("32 bytes took %0d cycles", (t1 - t0));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("%0d elements missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

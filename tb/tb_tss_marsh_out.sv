// tb_tss_marsh_out: self-checking test of the output marshalling unit.
// For every element size (1..4 bytes) and both byte orders random elements
// are offered with random gaps while the byte sink applies random
// back-pressure; the bytes are compared with the element bytes in the
// configured order. A final run without gaps checks one byte per cycle.
module tb_tss_marsh_out;
  import tss_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mg_cfg_t cfg;
  logic elem_valid, elem_ready, out_valid, out_ready;
  logic [31:0] elem_data;
  logic [7:0]  out_data;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  bit gaps;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int nbytes_seen = 0;

  tss_marsh_out #(.ELEM_BYTES(4)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the ready value set here holds through the next rising edge, so the
  // handshake checked here is the one that edge performs
  always @(negedge clk) begin
    out_ready = gaps ? ($urandom % 3 != 0) : 1'b1;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      nbytes_seen++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected byte %h", out_data);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++; $display("byte %h expected %h", out_data, e);
        end
      end
    end
  end

  task automatic send(input int nelem);
    for (int e = 0; e < nelem; e++) begin
      logic [31:0] v;
      int nb;
      nb = int'(cfg.elem_bytes);
      v = $urandom;
      for (int k = 0; k < nb; k++)
        exp_q.push_back(cfg.swap ? v[8*(nb-1-k) +: 8] : v[8*k +: 8]);
      elem_data  = v;
      elem_valid = 1;
      @(posedge clk);
      while (!elem_ready) @(posedge clk);
      #1;
      elem_valid = 0;
      if (gaps) while ($urandom % 4 == 0) @(posedge clk) #1;
    end
  endtask

  initial begin
    int t0;
    rst_n = 0; elem_valid = 0; elem_data = 0; gaps = 1;
    cfg = MG_CFG_DEFAULT;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int nb = 1; nb <= 4; nb++)
      for (int sw = 0; sw < 2; sw++) begin
        cfg.elem_bytes = 3'(nb);
        cfg.swap = sw[0];
        send(20);
        while (exp_q.size() != 0) @(posedge clk);
        #1;
      end
    // throughput: 8 four-byte elements leave in 32 consecutive cycles
    gaps = 0;
    repeat (2) @(posedge clk);
    #1;
    cfg.elem_bytes = 3'd4; cfg.swap = 1'b0;
    nbytes_seen = 0;
    t0 = cyc;
    send(8);
    while (exp_q.size() != 0) @(posedge clk);
    checks++;
    if ((cyc - t0) > 34) begin
      failures++; $display("32 bytes took %0d cycles", (cyc - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tss_ctrl: self-checking test of the control/configuration unit.
// Configuration registers (flow formats, MUX selects) are written with
// random values and read back, and the select outputs are compared with
// what was written. COMMAND writes must give single-cycle commit/release
// pulses on the named flows. Job events must set IRQ_STATUS, raise the
// interrupt line only for enabled bits, and be cleared by writing ones;
// STATUS must mirror the flow state inputs.
module tb_tss_ctrl;
  import tss_pkg::*;
  localparam int unsigned NF = 3, ND = 12, SW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr_en, irq;
  logic [7:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [NF-1:0] out_full, out_job_done, in_free, in_job_done, out_release, in_commit;
  mg_cfg_t [NF-1:0] in_cfg, out_cfg;
  logic [ND-1:0][SW-1:0] sel;
  int checks = 0, failures = 0;
  int n_rel = 0, n_com = 0;

  tss_ctrl #(.N_FLOWS(NF), .N_DST(ND), .SEL_W(SW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      n_rel += $countones(out_release);
      n_com += $countones(in_commit);
    end
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e, input string what);
    rd_addr = a; #1;
    checks++;
    if (rd_data !== e) begin
      failures++; $display("%s: read %h expected %h", what, rd_data, e);
    end
  endtask

  task automatic expect1(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("%s = %b expected %b", what, got, e); end
  endtask

  initial begin
    logic [31:0] v;
    logic [SW-1:0] sv [ND];
    rst_n = 0; wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    out_full = 0; out_job_done = 0; in_free = 0; in_job_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset values
    expect_rd(REG_MUX_SEL, 32'hF, "mux sel reset (open)");
    expect_rd(REG_IN_JOB, 32'(MG_CFG_DEFAULT), "in cfg reset");
    expect1(irq, 1'b0, "irq after reset");
    // configuration registers
    for (int f = 0; f < NF; f++) begin
      v = $urandom & ((1 << $bits(mg_cfg_t)) - 1);
      wr(REG_IN_JOB + 8'(f), v);
      expect_rd(REG_IN_JOB + 8'(f), v, "in cfg");
      checks++; if (in_cfg[f] !== v[$bits(mg_cfg_t)-1:0]) failures++;
      v = $urandom & ((1 << $bits(mg_cfg_t)) - 1);
      wr(REG_OUT_JOB + 8'(f), v);
      expect_rd(REG_OUT_JOB + 8'(f), v, "out cfg");
      checks++; if (out_cfg[f] !== v[$bits(mg_cfg_t)-1:0]) failures++;
    end
    for (int k = 0; k < ND; k++) begin
      sv[k] = SW'($urandom);
      wr(REG_MUX_SEL + 8'(k), 32'(sv[k]));
    end
    for (int k = 0; k < ND; k++) begin
      expect_rd(REG_MUX_SEL + 8'(k), 32'(sv[k]), "mux sel");
      checks++;
      if (sel[k] !== sv[k]) begin failures++; $display("sel %0d wrong", k); end
    end
    // commands: release flow 1, commit flows 0 and 2
    wr(REG_COMMAND, 32'h0000_0502);
    @(negedge clk);
    checks += 2;
    if (n_rel != 1) begin failures++; $display("%0d release pulses", n_rel); end
    if (n_com != 2) begin failures++; $display("%0d commit pulses", n_com); end
    // status mirror
    out_full = 3'b101; in_free = 3'b010;
    expect_rd(REG_STATUS, 32'h0000_0205, "status");
    // events and interrupt
    @(negedge clk); out_job_done = 3'b010; @(negedge clk); out_job_done = 0;
    expect_rd(REG_IRQ_STATUS, 32'h0000_0002, "irq status");
    expect1(irq, 1'b0, "irq masked");
    wr(REG_IRQ_ENABLE, 32'h0000_0102);
    expect1(irq, 1'b1, "irq enabled out event");
    wr(REG_IRQ_STATUS, 32'h0000_0002);
    expect1(irq, 1'b0, "irq cleared");
    @(negedge clk); in_job_done = 3'b001; @(negedge clk); in_job_done = 0;
    expect1(irq, 1'b1, "irq on input event");
    expect_rd(REG_IRQ_STATUS, 32'h0000_0100, "irq status in");
    // an event in the same cycle as its clear wins
    @(negedge clk); wr_en = 1; wr_addr = REG_IRQ_STATUS; wr_data = 32'h100;
    in_job_done = 3'b001;
    @(negedge clk); wr_en = 0; in_job_done = 0;
    expect_rd(REG_IRQ_STATUS, 32'h0000_0100, "event beats clear");
    wr(REG_IRQ_STATUS, 32'h100);
    expect1(irq, 1'b0, "irq cleared again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

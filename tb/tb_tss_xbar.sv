// tb_tss_xbar: self-checking test of the MUX interconnect.
// For many random point-to-point configurations (each producer used at
// most once, some consumers left open) and random valid/ready/data values,
// every consumer must see exactly its selected producer's valid and data
// (zero/invalid when open), and every producer the ready of the consumer
// that selected it (low when nobody did).
module tb_tss_xbar;
  localparam int unsigned NS = 12, ND = 12, SW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [ND-1:0][SW-1:0] sel;
  logic [NS-1:0] src_valid, src_ready;
  logic [NS-1:0][7:0] src_data;
  logic [ND-1:0] dst_valid, dst_ready;
  logic [ND-1:0][7:0] dst_data;
  int checks = 0, failures = 0;

  tss_xbar #(.N_SRC(NS), .N_DST(ND), .SEL_W(SW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NS];
    rst_n = 0; sel = '1; src_valid = 0; src_data = 0; dst_ready = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      for (int s = 0; s < NS; s++) perm[s] = s;
      for (int s = NS - 1; s > 0; s--) begin
        int r, t;
        r = $urandom % (s + 1);
        t = perm[s]; perm[s] = perm[r]; perm[r] = t;
      end
      for (int d = 0; d < ND; d++)
        sel[d] = ($urandom % 5 == 0) ? SW'(15) : SW'(perm[d]);
      src_valid = NS'($urandom);
      dst_ready = ND'($urandom);
      for (int s = 0; s < NS; s++) src_data[s] = 8'($urandom);
      @(negedge clk);
      for (int d = 0; d < ND; d++) begin
        logic ev; logic [7:0] ed;
        ev = (sel[d] < NS) ? src_valid[sel[d]] : 1'b0;
        ed = (sel[d] < NS) ? src_data[sel[d]] : 8'h00;
        checks++;
        if (dst_valid[d] !== ev || dst_data[d] !== ed) begin
          failures++;
          $display("dst %0d sel %0d: %b/%h expected %b/%h", d, sel[d],
                   dst_valid[d], dst_data[d], ev, ed);
        end
      end
      for (int s = 0; s < NS; s++) begin
        logic er;
        er = 1'b0;
        for (int d = 0; d < ND; d++) if (sel[d] == SW'(s)) er = dst_ready[d];
        checks++;
        if (src_ready[s] !== er) begin
          failures++; $display("src %0d ready %b expected %b", s, src_ready[s], er);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tss_dbuf: self-checking test of the two-bank buffer memory.
// Random writes through both ports into both banks are mirrored in a
// reference array; random reads through either port are compared with it
// one cycle after the address (the synchronous read latency).
module tb_tss_dbuf;
  localparam int unsigned W = 16, D = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_bank, b_bank, a_we, b_we;
  logic [$clog2(D)-1:0] a_addr, b_addr;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] ref_mem [2*D];
  int checks = 0, failures = 0;

  tss_dbuf #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_a, exp_b;
    a_we = 0; b_we = 0; a_bank = 0; b_bank = 0; a_addr = 0; b_addr = 0;
    a_wdata = 0; b_wdata = 0;
    // fill every word of both banks, port A for bank 0, port B for bank 1
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_we = 1; a_bank = 0; a_addr = i[$clog2(D)-1:0]; a_wdata = W'($urandom);
      b_we = 1; b_bank = 1; b_addr = i[$clog2(D)-1:0]; b_wdata = W'($urandom);
      ref_mem[{1'b0, a_addr}] = a_wdata;
      ref_mem[{1'b1, b_addr}] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // random mix of reads and writes
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a_bank = 1'($urandom); a_addr = $clog2(D)'($urandom);
      b_bank = 1'($urandom); b_addr = $clog2(D)'($urandom);
      a_we = ($urandom % 4 == 0); b_we = ($urandom % 4 == 0);
      if (a_we && b_we && a_bank == b_bank && a_addr == b_addr) a_we = 0;
      a_wdata = W'($urandom); b_wdata = W'($urandom);
      exp_a = ref_mem[{a_bank, a_addr}];
      exp_b = ref_mem[{b_bank, b_addr}];
      if (a_we) ref_mem[{a_bank, a_addr}] = a_wdata;
      if (b_we) ref_mem[{b_bank, b_addr}] = b_wdata;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== exp_a) begin
        failures++; $display("port A read %h exp %h", a_rdata, exp_a);
      end
      if (b_rdata !== exp_b) begin
        failures++; $display("port B read %h exp %h", b_rdata, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

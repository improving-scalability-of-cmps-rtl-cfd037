// tb_acc_model: behavioural accelerator kernel for the TSS testbenches.
// It stands in for an application kernel in one slot: wait for IReady,
// read the N input elements (one per cycle, synchronous read), pulse IRead,
// wait for ORead, write out[k] = (in[k] ^ KEY) truncated to OUT_BYTES
// bytes, and pulse OReady. Random pauses before each job make it slower or
// faster than its neighbours. It counts jobs and how often it had to wait
// for a free output buffer.
module tb_acc_model #(
  parameter int          N         = 16,
  parameter int          OUT_BYTES = 4,
  parameter logic [31:0] KEY       = 32'h0,
  parameter int          AW        = 6,
  parameter int          MAX_PAUSE = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          iready,
  output logic          iread,
  output logic [AW-1:0] iaddr,
  output logic          iwe,
  output logic [31:0]   iwdata,
  input  logic [31:0]   irdata,
  input  logic          oread,
  output logic          oready,
  output logic [AW-1:0] oaddr,
  output logic          owe,
  output logic [31:0]   owdata
);
  int jobs = 0, out_waits = 0;
  logic [31:0] buf_q [N];
  logic [31:0] mask;

  assign mask = (OUT_BYTES >= 4) ? 32'hFFFF_FFFF : ((32'h1 << (8 * OUT_BYTES)) - 1);

  initial begin
    iread = 0; iaddr = 0; iwe = 0; iwdata = 0;
    oready = 0; oaddr = 0; owe = 0; owdata = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      while (!iready) @(negedge clk);
      repeat ($urandom % (MAX_PAUSE + 1)) @(negedge clk);
      for (int k = 0; k < N; k++) begin
        iaddr = AW'(k);
        @(negedge clk);
        buf_q[k] = irdata;                // read one cycle after the address
      end
      iread = 1;
      @(negedge clk);
      iread = 0;
      if (!oread) out_waits++;
      while (!oread) @(negedge clk);
      for (int k = 0; k < N; k++) begin
        oaddr  = AW'(k);
        owdata = (buf_q[k] ^ KEY) & mask;
        owe    = 1;
        @(negedge clk);
      end
      owe = 0;
      oready = 1;
      @(negedge clk);
      oready = 0;
      jobs++;
    end
  end
endmodule

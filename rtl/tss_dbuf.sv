// tss_dbuf: two-bank buffer memory (I0/I1 or O0/O1 of an ICM/OCM, and the
// per-flow input/output SPMs of the gateway).
//
// The two banks are held in one array addressed by {bank, addr}. Port A and
// port B each select a bank and may read or write any word of it (the
// random access the accelerator expects to its current buffer). Reads are
// synchronous: rdata is valid one cycle after the address. The document
// gives the double-buffer principle; the two-port, synchronous-read SRAM
// organisation is this design's choice. When both ports write the same word
// in one cycle, port B wins (never happens under the synchronisation unit,
// which gives each bank to one side at a time).
module tss_dbuf #(
  parameter int unsigned WIDTH = 32,  // bits per word
  parameter int unsigned DEPTH = 64   // words per bank
) (
  input  logic                     clk,
  // port A
  input  logic                     a_bank,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  // port B
  input  logic                     b_bank,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[{a_bank, a_addr}] <= a_wdata;
    if (b_we) mem[{b_bank, b_addr}] <= b_wdata;
    a_rdata <= mem[{a_bank, a_addr}];
    b_rdata <= mem[{b_bank, b_addr}];
  end

endmodule

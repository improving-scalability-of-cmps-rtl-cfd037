// tb_ahb_bfm: simple AHB-Lite master for testbenches (the host processor /
// DMA side of the gateway). One transfer at a time: an address phase
// followed by its data phase, HTRANS idle in between. Read data is taken in
// the middle of the data phase once HREADY is high.
module tb_ahb_bfm (
  input  logic        clk,
  output logic        hsel,
  output logic [15:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic [31:0] hrdata
);
  int n_xfers = 0;

  initial begin
    hsel = 0; haddr = 0; htrans = 2'b00; hwrite = 0; hwdata = 0;
  end

  task automatic write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    while (!hready) @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(negedge clk);
    while (!hready) @(negedge clk);   // address phase taken at the last edge
    hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk);
    while (!hready) @(negedge clk);   // data phase done
    n_xfers++;
  endtask

  task automatic read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    while (!hready) @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge clk);
    while (!hready) @(negedge clk);
    hsel = 0; htrans = 2'b00;
    while (!hready) @(negedge clk);
    d = hrdata;                       // data phase, HREADY high
    n_xfers++;
  endtask
endmodule

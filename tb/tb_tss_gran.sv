// tb_tss_gran: self-checking test of the granularity counter.
// For several job shapes, linear and transposed, it steps through three
// jobs with random gaps and compares the address and the last-element flag
// with addr = i (linear) or (i mod cols) * rows + i / cols (transposed).
module tb_tss_gran;
  import tss_pkg::*;
  localparam int unsigned D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, step, last;
  mg_cfg_t cfg;
  logic [$clog2(D)-1:0] addr;
  int checks = 0, failures = 0;

  tss_gran #(.DEPTH(D)) dut (.*);

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int rows, input int cols, input bit tr);
    int exp_addr;
    cfg = '{elem_bytes: 3'd4, swap: 1'b0, transpose: tr,
            rows: 8'(rows), cols: 8'(cols)};
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < rows * cols; i++) begin
        while ($urandom % 3 == 0) @(negedge clk);
        exp_addr = tr ? (i % cols) * rows + i / cols : i;
        checks += 2;
        if (addr !== $clog2(D)'(exp_addr)) begin
          failures++;
          $display("rows %0d cols %0d tr %0d i %0d: addr %0d exp %0d",
                   rows, cols, tr, i, addr, exp_addr);
        end
        if (last !== (i == rows * cols - 1)) begin
          failures++; $display("last flag wrong at i %0d", i);
        end
        step = 1; @(negedge clk); step = 0;
      end
  endtask

  initial begin
    rst_n = 0; clear = 0; step = 0; cfg = MG_CFG_DEFAULT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 16, 0);
    run(4, 4, 1);
    run(2, 8, 1);
    run(8, 3, 1);
    run(3, 5, 0);
    run(1, 1, 0);
    run(8, 8, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

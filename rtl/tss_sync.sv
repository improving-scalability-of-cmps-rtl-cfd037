// tss_sync: synchronisation unit of an ICM or OCM.
//
// It orders the two buffers of a double buffer between a producing side and
// a consuming side, so that each buffer belongs to exactly one side at a
// time. It behaves as a two-entry FIFO of buffer tokens: the producer gets
// the next free buffer (prod_avail, prod_bank), fills it and commits it
// (prod_commit); the consumer then gets the oldest full buffer (cons_avail,
// cons_bank), uses it and releases it (cons_release), which frees it for
// the producer again. Buffers are used alternately, 0, 1, 0, ...
//
// In an ICM the producer is the incoming stream and cons_avail is the
// accelerator's IReady, cons_release its IRead (finished). In an OCM the
// producer is the accelerator (prod_avail = ORead, prod_commit = OReady) and
// the consumer is the outgoing stream. Commit/release are single-cycle
// pulses, honoured only while the matching *_avail is high. Reset leaves both
// buffers empty.
module tss_sync (
  input  logic       clk,
  input  logic       rst_n,
  output logic       prod_avail,
  output logic       prod_bank,
  input  logic       prod_commit,
  output logic       cons_avail,
  output logic       cons_bank,
  input  logic       cons_release
);
  logic [1:0] count;
  logic       wr_ptr, rd_ptr;
  logic       do_commit, do_release;

  assign prod_avail = (count != 2'd2);
  assign cons_avail = (count != 2'd0);
  assign prod_bank  = wr_ptr;
  assign cons_bank  = rd_ptr;

  assign do_commit  = prod_commit  && prod_avail;
  assign do_release = cons_release && cons_avail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      wr_ptr <= 1'b0;
      rd_ptr <= 1'b0;
    end else begin
      if (do_commit)  wr_ptr <= ~wr_ptr;
      if (do_release) rd_ptr <= ~rd_ptr;
      case ({do_commit, do_release})
        2'b10:   count <= count + 2'd1;
        2'b01:   count <= count - 2'd1;
        default: count <= count;
      endcase
    end
  end

  // A commit or release outside its grant is a protocol error of the user.
  a_commit_granted : assert property (@(posedge clk) disable iff (!rst_n)
    prod_commit |-> prod_avail);
  a_release_granted : assert property (@(posedge clk) disable iff (!rst_n)
    cons_release |-> cons_avail);

endmodule

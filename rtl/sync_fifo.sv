// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for every queue in both monitors: the MSM Spikes FIFO (one spike
// snapshot per word), the per-module partial-address FIFOs of the DSM and the
// 1024 x 16-bit AER FIFO that feeds the output handshake.
//
// The head word is always visible on rd_data while empty is low; asserting
// rd_en pops it at the clock edge. A write while full is ignored (the word is
// lost), and a read while empty is ignored; both are counted by the caller if
// it cares. A simultaneous read and write while full is accepted. The
// document gives the FIFOs' roles and two of their sizes but not their
// read timing: the show-ahead behaviour and the drop-on-full rule are this
// design's choices. Storage is a plain array so a synthesis tool can map it
// to block RAM.
//
// Timing: a word written in cycle t is visible (empty low) in cycle t+1.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16   // must be a power of two, >= 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;   // one extra bit tells full from empty

  logic do_wr, do_rd;
  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign count = wptr - rptr;
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  assign rd_data = mem[rptr[AW-1:0]];

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two");
  end

endmodule

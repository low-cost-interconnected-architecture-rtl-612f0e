// spike_fifo: input buffer of one router channel.
//
// A synchronous FIFO of DEPTH packets, first-word-fall-through: the oldest
// packet is always visible on dout while data_present is high, and rd_en
// pops it at the clock edge. A write with wr_en while full is high is
// ignored; senders are expected to test full first. A write and a read in
// the same cycle are both performed, also when the FIFO is full.
//
// Interface and timing: wr_en/din from the previous-layer router
// ("FIFOWriteEN", "Spikes_In"), full back to it ("FIFOFullFlag");
// data_present ("Data present flag") to the scheduler as its request,
// rd_en ("FIFOReadEN") from the input controller. A packet written in cycle
// t is visible from cycle t+1. Reset (synchronous, active high) empties it.
//
// The depth of five packets and the signal set follow the document; the
// first-word-fall-through organisation is this design's choice, which
// lets the router forward a packet one cycle after its grant.
module spike_fifo #(
  parameter int unsigned W     = lcia_pkg::PKT_W,
  parameter int unsigned DEPTH = lcia_pkg::FIFO_DEPTH
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         data_present
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          do_wr, do_rd;

  assign full         = (cnt == (AW+1)'(DEPTH));
  assign data_present = (cnt != '0);
  assign dout         = mem[rp];
  assign do_rd        = rd_en && data_present;
  assign do_wr        = wr_en && (!full || do_rd);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule

// vdos_async_fifo: small dual-clock FIFO used by the data block to carry
// bytes from the clk1 (VC-12) domain to an output clock domain.
//
// Classic Gray-code design: binary read and write pointers one bit wider
// than the address, their Gray codes passed through two-flop synchronisers
// into the other domain. full and empty are computed from the synchronised
// pointers, so they are conservative. The read side is show-ahead: rdata is
// the oldest byte whenever empty is low, and rd pops it. A write while full
// is dropped and reported on overflow for one wclk cycle.
//
// Resets are asynchronous, active high, one per domain; the caller asserts
// both together and releases each synchronously to its own clock.
// DEPTH must be a power of two. This FIFO is this design's own choice for the
// clock-domain crossing the receiver needs between clk1 and clk2/clk3.
module vdos_async_fifo #(
  parameter int DW    = 8,
  parameter int DEPTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          empty
);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in wclk domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in rclk domain
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain
  assign full     = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nxt = wbin + (AW + 1)'(wr && !full);

  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      overflow <= wr && full;
    end
  end

  // ---------------- read domain
  assign empty    = (rgray == wgray_r2);
  assign rdata    = mem[rbin[AW-1:0]];
  assign rbin_nxt = rbin + (AW + 1)'(rd && !empty);

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule

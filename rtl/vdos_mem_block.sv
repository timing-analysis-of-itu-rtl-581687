// vdos_mem_block: differential-delay buffer for one VCG member (MEMn).
//
// The VC-12 stream on din is written continuously, one byte per clk1 cycle,
// into a circular RAM of MF_SLOTS multiframe slots of MF_BYTES bytes each
// (128 x 140 = 17920 bytes, enough for 64 ms of differential delay). fin1
// marks the V5 byte that begins a multiframe; byte b of the slot s multiframe
// is stored at address s*MF_BYTES + b. When the RAM is full the oldest slot
// is overwritten.
//
// Reading starts when the controller raises en: the slot number on add is
// loaded (add = 1 means address 140, the second multiframe) and the buffer
// then streams one byte per clk1 cycle from there, slot after slot, for as
// long as en stays high. dout appears two cycles after the first cycle en is
// high, with dout_sof on byte 0 of every multiframe. dout_valid is low while
// not reading and for slots that have not been written since the last reset.
//
// reset2 (from the controller) clears the buffer: all slots are marked empty,
// reading stops and writing waits for the next fin1. reset1 does the same at
// power-up. Both are synchronous and active high.
//
// The slot/offset addressing, one write and one read per cycle and the 140-
// byte multiframe follow the receiver description; the per-slot empty flags
// (how "clearing" the RAM is done) and the registered read are this design's
// choices.
module vdos_mem_block #(
  parameter int MF_SLOTS = vdos_pkg::MF_SLOTS,
  parameter int MF_BYTES = vdos_pkg::MF_BYTES,
  localparam int SW    = $clog2(MF_SLOTS),
  localparam int OW    = $clog2(MF_BYTES),
  localparam int DEPTH = MF_SLOTS * MF_BYTES,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk1,
  input  logic          reset1,
  input  logic          reset2,
  input  logic          fin1,
  input  logic [7:0]    din,
  input  logic          en,
  input  logic [SW-1:0] add,
  output logic [7:0]    dout,
  output logic          dout_valid,
  output logic          dout_sof
);

  logic rst;
  assign rst = reset1 || reset2;

  // ---------------- write side
  logic [SW-1:0] w_slot;
  logic [OW-1:0] w_off;
  logic          w_valid;

  vdos_mf_counter #(.MF_SLOTS(MF_SLOTS), .MF_BYTES(MF_BYTES)) u_wcnt (
    .clk      (clk1),
    .rst      (rst),
    .fin1     (fin1),
    .cur_slot (w_slot),
    .cur_off  (w_off),
    .cur_valid(w_valid)
  );

  logic [7:0] ram [DEPTH];
  logic [AW-1:0] w_addr;
  assign w_addr = AW'(w_slot) * AW'(MF_BYTES) + AW'(w_off);

  always_ff @(posedge clk1) begin
    if (w_valid) ram[w_addr] <= din;
  end

  // one flag per slot: written since the last reset
  logic [MF_SLOTS-1:0] slot_full;
  always_ff @(posedge clk1) begin
    if (rst) slot_full <= '0;
    else if (w_valid && w_off == '0) slot_full[w_slot] <= 1'b1;
  end

  // ---------------- read side
  logic          rd_active;
  logic [SW-1:0] r_slot;
  logic [OW-1:0] r_off;
  logic [AW-1:0] r_addr;

  assign r_addr = AW'(r_slot) * AW'(MF_BYTES) + AW'(r_off);

  always_ff @(posedge clk1) begin
    if (rst || !en) begin
      rd_active <= 1'b0;
      r_slot    <= '0;
      r_off     <= '0;
    end else if (!rd_active) begin
      rd_active <= 1'b1;
      r_slot    <= add;
      r_off     <= '0;
    end else if (r_off == OW'(MF_BYTES - 1)) begin
      r_off  <= '0;
      r_slot <= (r_slot == SW'(MF_SLOTS - 1)) ? '0 : r_slot + 1'b1;
    end else begin
      r_off <= r_off + 1'b1;
    end
  end

  // the start slot must exist in the buffer
  a_add_range: assert property (@(posedge clk1) disable iff (rst)
                                (en && !rd_active) |-> (add < SW'(MF_SLOTS)) || (MF_SLOTS == (1 << SW)));

  always_ff @(posedge clk1) begin
    dout <= ram[r_addr];
  end

  always_ff @(posedge clk1) begin
    if (rst) begin
      dout_valid <= 1'b0;
      dout_sof   <= 1'b0;
    end else begin
      dout_valid <= rd_active && en && slot_full[r_slot];
      dout_sof   <= rd_active && en && slot_full[r_slot] && (r_off == '0);
    end
  end

endmodule

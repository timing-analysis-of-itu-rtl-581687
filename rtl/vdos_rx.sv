// vdos_rx: receiver for voice and data carried in one VC-12 virtual
// concatenation group (VC-12-6v): five members carry GFP-framed 10 Mbit/s
// Ethernet, the sixth carries one E1 (PCM-30, 2048 kbit/s).
//
// The members reach the receiver over different paths and so with different
// delays. Each member is written into its own 64 ms (128-multiframe) memory
// block. The controller reads the sequence-number byte of every member each
// multiframe, finds the slot in which each member carries the sync value and
// then starts all memories of a group reading from those slots, so their
// outputs line up. The data block strips overhead and stuffing, interleaves
// members 1-5 back into the Ethernet byte stream (dout1, clk2) and sends
// member 6 out as the E1 byte stream (dout2, clk3). A lost alignment or a
// 64 ms hunt without success makes the controller pulse reset2, which clears
// the memories and the data block and starts over.
//
// Interface: din[i] is member i's VC-12 stream, one byte per clk1 cycle;
// fin1 marks the V5 byte and fin2 the sequence-number byte, common to all
// members (the upstream pointer processing aligns the VC-12 frames). reset1
// is synchronous to clk1 and active high. Outputs are bytes with valid
// strobes in the clk2 and clk3 domains; en, reset2, mismatch, timeout and
// ovf are clk1-domain status signals.
//
// Structure (six memory blocks, controller, data block, three clocks)
// follows the receiver description; see the sub-modules for the details
// that are this design's own.
module vdos_rx #(
  parameter int         N_LANES    = vdos_pkg::N_LANES,
  parameter int         N_DATA     = vdos_pkg::N_DATA,
  parameter int         MF_SLOTS   = vdos_pkg::MF_SLOTS,
  parameter int         MF_BYTES   = vdos_pkg::MF_BYTES,
  parameter logic [7:0] SYNC_SEQ   = vdos_pkg::SYNC_SEQ,
  parameter int         FIFO_DEPTH = 16
) (
  input  logic               clk1,
  input  logic               clk2,
  input  logic               clk3,
  input  logic               reset1,
  input  logic               fin1,
  input  logic               fin2,
  input  logic [7:0]         din [N_LANES],
  output logic [7:0]         dout1,
  output logic               dout1_valid,
  output logic [7:0]         dout2,
  output logic               dout2_valid,
  output logic [N_LANES-1:0] en,
  output logic               reset2,
  output logic               mismatch,
  output logic               timeout,
  output logic               ovf
);

  localparam int SW = $clog2(MF_SLOTS);

  logic [SW-1:0]      add      [N_LANES];
  logic [7:0]         mem_dout [N_LANES];
  logic [N_LANES-1:0] mem_valid, mem_sof;

  vdos_controller #(
    .N_LANES (N_LANES),
    .N_DATA  (N_DATA),
    .MF_SLOTS(MF_SLOTS),
    .MF_BYTES(MF_BYTES),
    .SYNC_SEQ(SYNC_SEQ)
  ) u_ctrl (
    .clk1    (clk1),
    .reset1  (reset1),
    .fin1    (fin1),
    .fin2    (fin2),
    .d       (din),
    .en      (en),
    .add     (add),
    .reset2  (reset2),
    .mismatch(mismatch),
    .timeout (timeout)
  );

  for (genvar i = 0; i < N_LANES; i++) begin : g_mem
    vdos_mem_block #(.MF_SLOTS(MF_SLOTS), .MF_BYTES(MF_BYTES)) u_mem (
      .clk1      (clk1),
      .reset1    (reset1),
      .reset2    (reset2),
      .fin1      (fin1),
      .din       (din[i]),
      .en        (en[i]),
      .add       (add[i]),
      .dout      (mem_dout[i]),
      .dout_valid(mem_valid[i]),
      .dout_sof  (mem_sof[i])
    );
  end

  vdos_data_block #(
    .N_LANES   (N_LANES),
    .N_DATA    (N_DATA),
    .MF_BYTES  (MF_BYTES),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_data (
    .clk1       (clk1),
    .clk2       (clk2),
    .clk3       (clk3),
    .rst        (reset1 || reset2),
    .din        (mem_dout),
    .din_valid  (mem_valid),
    .din_sof    (mem_sof),
    .dout1      (dout1),
    .dout1_valid(dout1_valid),
    .dout2      (dout2),
    .dout2_valid(dout2_valid),
    .ovf        (ovf)
  );

endmodule

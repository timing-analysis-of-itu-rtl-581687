// vdos_mf_counter: multiframe position tracker for the receive side.
//
// For the byte on the input during this clk1 cycle it gives the buffer slot
// (which multiframe, modulo MF_SLOTS) and the byte offset in the multiframe.
// fin1 marks byte 0 (V5) of a multiframe and always starts a new slot at
// offset 0. Between fin1 pulses the counter runs free (flywheel), starting a
// new slot after MF_BYTES bytes. Before the first fin1 after reset nothing is
// aligned and cur_valid is low. The first aligned multiframe goes to slot 0.
//
// The memory blocks and the controller each hold one of these, fed with the
// same fin1 and reset, so they always agree on the slot numbers; that
// sharing is this design's choice.
//
// Timing: cur_* are combinational from fin1 and the registered position of
// the previous byte; the state advances every clk1 cycle (one byte/cycle).
module vdos_mf_counter #(
  parameter int MF_SLOTS = vdos_pkg::MF_SLOTS,
  parameter int MF_BYTES = vdos_pkg::MF_BYTES,
  localparam int SW = $clog2(MF_SLOTS),
  localparam int OW = $clog2(MF_BYTES)
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          fin1,
  output logic [SW-1:0] cur_slot,
  output logic [OW-1:0] cur_off,
  output logic          cur_valid
);

  logic [SW-1:0] slot_q;
  logic [OW-1:0] off_q;
  logic          started_q;
  logic [SW-1:0] slot_inc;

  assign slot_inc = (slot_q == SW'(MF_SLOTS - 1)) ? '0 : slot_q + 1'b1;

  always_comb begin
    cur_valid = started_q || fin1;
    if (fin1) begin
      cur_slot = started_q ? slot_inc : '0;
      cur_off  = '0;
    end else if (off_q == OW'(MF_BYTES - 1)) begin
      cur_slot = slot_inc;
      cur_off  = '0;
    end else begin
      cur_slot = slot_q;
      cur_off  = off_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started_q <= 1'b0;
      slot_q    <= '0;
      off_q     <= '0;
    end else if (cur_valid) begin
      started_q <= 1'b1;
      slot_q    <= cur_slot;
      off_q     <= cur_off;
    end
  end

endmodule

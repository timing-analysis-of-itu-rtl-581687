// vdos_controller: member alignment controller of the VDOS receiver.
//
// Every multiframe, on the clk1 cycle marked by fin2, the controller stores
// the sequence-number byte of each member in a small per-member table indexed
// by the multiframe slot (the same slot the memory block is writing). The
// members form two groups that are aligned independently: the data group
// (members 0..N_DATA-1, Ethernet) and the voice group (member N_DATA, E1).
//
// HUNT: a member whose sequence byte equals SYNC_SEQ records that slot in
// loc[]. When every member of a group has found it, the group goes to SYNC:
// its en bits go high and add[] holds each member's slot, so every memory of
// the group starts reading the multiframes that carry the same sequence
// number. If a group has a member that found SYNC_SEQ but not all members
// have done so within MF_SLOTS multiframes (64 ms, the buffer depth), the
// controller issues reset2.
//
// SYNC: en stays high. At the start of every multiframe that the memories
// read, the stored sequence byte of each member's read slot is compared with
// the expected value, SYNC_SEQ plus the number of multiframes read so far
// (modulo 256). A mismatch in any member drops en and issues reset2. The
// check is made at the start because, at the largest differential delay
// (127 multiframes), the writer replaces the oldest slot's sequence byte
// while that slot is still being read.
//
// reset2 is a one-cycle registered pulse. It clears all memory blocks and
// the controller itself (both groups), and the hunt starts again.
//
// Interface: clk1 domain only; d[i] is member i's byte stream, fin1 as for
// the memory blocks, fin2 marks the sequence byte. en/add/reset2 are
// registered. en rises two cycles after the fin2 cycle that completes a
// group. mismatch and timeout are one-cycle status pulses.
//
// From the receiver description: storing the sequence byte at fin2, hunting
// for 8'h78, en plus one address per memory, separate voice check, reset2 on
// mismatch and after 64 ms without sync, en held high while in sync. This
// design's choices: the expected value advancing by one per multiframe, and
// the timeout counted from the first member that found the sync value.
module vdos_controller #(
  parameter int         N_LANES  = vdos_pkg::N_LANES,
  parameter int         N_DATA   = vdos_pkg::N_DATA,
  parameter int         MF_SLOTS = vdos_pkg::MF_SLOTS,
  parameter int         MF_BYTES = vdos_pkg::MF_BYTES,
  parameter logic [7:0] SYNC_SEQ = vdos_pkg::SYNC_SEQ,
  localparam int SW = $clog2(MF_SLOTS),
  localparam int OW = $clog2(MF_BYTES)
) (
  input  logic               clk1,
  input  logic               reset1,
  input  logic               fin1,
  input  logic               fin2,
  input  logic [7:0]         d   [N_LANES],
  output logic [N_LANES-1:0] en,
  output logic [SW-1:0]      add [N_LANES],
  output logic               reset2,
  output logic               mismatch,
  output logic               timeout
);

  typedef enum logic {HUNT, SYNC} state_t;
  localparam int NG = 2;  // 0: data group, 1: voice group

  function automatic int grp(input int lane);
    return (lane < N_DATA) ? 0 : 1;
  endfunction

  logic rst;
  assign rst = reset1 || reset2;

  // ---------------- slot tracking (same rule as the memory blocks)
  logic [SW-1:0] c_slot;
  logic [OW-1:0] c_off;
  logic          c_valid;

  vdos_mf_counter #(.MF_SLOTS(MF_SLOTS), .MF_BYTES(MF_BYTES)) u_cnt (
    .clk      (clk1),
    .rst      (rst),
    .fin1     (fin1),
    .cur_slot (c_slot),
    .cur_off  (c_off),
    .cur_valid(c_valid)
  );

  // ---------------- sequence-number tables (m1..m6)
  logic [7:0] seq_mem [N_LANES][MF_SLOTS];

  always_ff @(posedge clk1) begin
    for (int i = 0; i < N_LANES; i++)
      if (fin2 && c_valid) seq_mem[i][c_slot] <= d[i];
  end

  // ---------------- per-member hunt results
  logic [N_LANES-1:0] found;
  logic [SW-1:0]      loc   [N_LANES];
  logic [SW-1:0]      rslot [N_LANES];

  // ---------------- per-group state
  state_t        state    [NG];
  logic [SW:0]   hunt_cnt [NG];
  logic [OW-1:0] rd_off   [NG];
  logic [7:0]    k        [NG];

  logic [NG-1:0] all_found, any_found, grp_mismatch, grp_timeout, chk_now, mf_end;

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      all_found[g] = 1'b1;
      any_found[g] = 1'b0;
      grp_mismatch[g] = 1'b0;
      chk_now[g] = (state[g] == SYNC) && (rd_off[g] == '0);
      mf_end[g]  = (state[g] == SYNC) && (rd_off[g] == OW'(MF_BYTES - 1));
      grp_timeout[g] = (state[g] == HUNT) && c_valid && (c_off == '0) &&
                       (hunt_cnt[g] == (SW + 1)'(MF_SLOTS - 1));
    end
    for (int i = 0; i < N_LANES; i++) begin
      all_found[grp(i)] = all_found[grp(i)] && found[i];
      any_found[grp(i)] = any_found[grp(i)] || found[i];
      if (chk_now[grp(i)] && seq_mem[i][rslot[i]] != SYNC_SEQ + k[grp(i)])
        grp_mismatch[grp(i)] = 1'b1;
    end
    for (int g = 0; g < NG; g++)
      grp_timeout[g] = grp_timeout[g] && any_found[g] && !all_found[g];
  end

  always_ff @(posedge clk1) begin
    if (rst) begin
      found <= '0;
      for (int i = 0; i < N_LANES; i++) begin
        loc[i]   <= '0;
        rslot[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_LANES; i++) begin
        if (state[grp(i)] == HUNT) begin
          if (fin2 && c_valid && !found[i] && d[i] == SYNC_SEQ) begin
            found[i] <= 1'b1;
            loc[i]   <= c_slot;
          end
          rslot[i] <= loc[i];
        end else if (mf_end[grp(i)]) begin
          rslot[i] <= (rslot[i] == SW'(MF_SLOTS - 1)) ? '0 : rslot[i] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk1) begin
    if (rst) begin
      for (int g = 0; g < NG; g++) begin
        state[g]    <= HUNT;
        hunt_cnt[g] <= '0;
        rd_off[g]   <= '0;
        k[g]        <= '0;
      end
    end else begin
      for (int g = 0; g < NG; g++) begin
        case (state[g])
          HUNT: begin
            rd_off[g] <= '0;
            k[g]      <= '0;
            if (any_found[g] && c_valid && c_off == '0)
              hunt_cnt[g] <= hunt_cnt[g] + 1'b1;
            if (all_found[g]) state[g] <= SYNC;
          end
          SYNC: begin
            if (mf_end[g]) begin
              rd_off[g] <= '0;
              k[g]      <= k[g] + 1'b1;
            end else begin
              rd_off[g] <= rd_off[g] + 1'b1;
            end
          end
          default: state[g] <= HUNT;
        endcase
      end
    end
  end

  // ---------------- outputs
  always_ff @(posedge clk1) begin
    if (reset1) begin
      reset2   <= 1'b0;
      mismatch <= 1'b0;
      timeout  <= 1'b0;
    end else begin
      reset2   <= !reset2 && ((|grp_mismatch) || (|grp_timeout));
      mismatch <= !reset2 && (|grp_mismatch);
      timeout  <= !reset2 && (|grp_timeout);
    end
  end

  // reset2 is a single-cycle pulse, and every member of a group is enabled
  // together
  a_reset2_pulse: assert property (@(posedge clk1) disable iff (reset1)
                                   reset2 |=> !reset2);
  a_group_en: assert property (@(posedge clk1) disable iff (reset1)
                               (en[N_DATA-1:0] == '0) || (en[N_DATA-1:0] == '1));

  always_comb begin
    for (int i = 0; i < N_LANES; i++) begin
      en[i]  = (state[grp(i)] == SYNC);
      add[i] = loc[i];
    end
  end

endmodule

// vdos_data_block: payload extraction and output of the VDOS receiver.
//
// Input: the six aligned member streams read out of the memory blocks, in
// the clk1 domain, each with a valid strobe and a start-of-multiframe flag
// (byte 0 = V5). A per-member byte counter gives each byte's position in its
// 140-byte multiframe.
//
// Overhead and stuffing removal:
//   * data members 0..N_DATA-1 (GFP-framed Ethernet in VC-12-5v): the four
//     path-overhead bytes V5/J2/N2/K4 are dropped, the 34 C-12 bytes of each
//     frame (136 per multiframe) are kept;
//   * voice member N_DATA (E1 asynchronously mapped into C-12): POH, the
//     fixed-stuff and justification-control bytes are dropped, leaving the
//     32 information bytes of each frame (128 per multiframe = 2048 kbit/s).
//
// Each member's kept bytes go into its own small dual-clock FIFO (m1..m6).
// dout1 (clk2 domain) is built by reading the data FIFOs in turn, one byte
// from each, m1, m2, ..., m5, m1, ...: this undoes the byte interleaving of
// virtual concatenation. dout2 (clk3 domain) is read straight from m6. Each
// output carries one byte per clock while its valid is high; clk2 must be at
// least 680/140 = 4.86 times the clk1 byte rate and clk3 at least 128/140 of
// it, otherwise the FIFOs overflow and ovf is raised (sticky until rst).
//
// rst (clk1 domain, active high, e.g. reset1 or reset2) clears everything;
// it is applied asynchronously to the clk2/clk3 sides and released there
// through two-flop synchronisers.
//
// The round-robin read of m1..m5, the direct output of m6 and the three
// clocks follow the receiver description. Byte-wide outputs with a valid
// strobe, the FIFO depth, and nominal-rate E1 demapping (justification bits
// not interpreted) are this design's choices.
module vdos_data_block #(
  parameter int N_LANES    = vdos_pkg::N_LANES,
  parameter int N_DATA     = vdos_pkg::N_DATA,
  parameter int MF_BYTES   = vdos_pkg::MF_BYTES,
  parameter int FIFO_DEPTH = 16
) (
  input  logic               clk1,
  input  logic               clk2,
  input  logic               clk3,
  input  logic               rst,
  input  logic [7:0]         din       [N_LANES],
  input  logic [N_LANES-1:0] din_valid,
  input  logic [N_LANES-1:0] din_sof,
  output logic [7:0]         dout1,
  output logic               dout1_valid,
  output logic [7:0]         dout2,
  output logic               dout2_valid,
  output logic               ovf
);

  import vdos_pkg::is_poh;
  import vdos_pkg::is_e1_payload;

  localparam int RW = (N_DATA > 1) ? $clog2(N_DATA) : 1;

  // ---------------- reset release per output domain
  logic [1:0] rst2_sync, rst3_sync;
  logic       rst2, rst3;

  always_ff @(posedge clk2 or posedge rst) begin
    if (rst) rst2_sync <= 2'b11;
    else     rst2_sync <= {rst2_sync[0], 1'b0};
  end
  always_ff @(posedge clk3 or posedge rst) begin
    if (rst) rst3_sync <= 2'b11;
    else     rst3_sync <= {rst3_sync[0], 1'b0};
  end
  assign rst2 = rst2_sync[1];
  assign rst3 = rst3_sync[1];

  // ---------------- position in the multiframe, overhead removal
  logic [7:0]         pos  [N_LANES];
  logic [N_LANES-1:0] keep;

  always_comb begin
    for (int i = 0; i < N_LANES; i++) begin
      logic [7:0] p;
      p = din_sof[i] ? 8'd0 : pos[i];
      if (i < N_DATA) keep[i] = din_valid[i] && !is_poh(p);
      else            keep[i] = din_valid[i] && is_e1_payload(p);
    end
  end

  always_ff @(posedge clk1) begin
    for (int i = 0; i < N_LANES; i++) begin
      if (rst) pos[i] <= '0;
      else if (din_valid[i]) begin
        if (din_sof[i]) pos[i] <= 8'd1;
        else if (pos[i] == 8'(MF_BYTES - 1)) pos[i] <= '0;
        else pos[i] <= pos[i] + 1'b1;
      end
    end
  end

  // ---------------- member buffers
  logic [N_LANES-1:0] f_full, f_ovf, f_empty, f_rd;
  logic [7:0]         f_rdata [N_LANES];

  for (genvar i = 0; i < N_LANES; i++) begin : g_fifo
    vdos_async_fifo #(.DW(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk    (clk1),
      .wrst    (rst),
      .wr      (keep[i]),
      .wdata   (din[i]),
      .full    (f_full[i]),
      .overflow(f_ovf[i]),
      .rclk    ((i < N_DATA) ? clk2 : clk3),
      .rrst    ((i < N_DATA) ? rst2 : rst3),
      .rd      (f_rd[i]),
      .rdata   (f_rdata[i]),
      .empty   (f_empty[i])
    );
  end

  always_ff @(posedge clk1) begin
    if (rst) ovf <= 1'b0;
    else if (|f_ovf) ovf <= 1'b1;
  end

  // ---------------- dout1: round-robin over the data members (clk2)
  logic [RW-1:0] rr;

  always_comb begin
    f_rd = '0;
    for (int i = 0; i < N_DATA; i++)
      if (RW'(i) == rr) f_rd[i] = !f_empty[i];
    f_rd[N_DATA] = !f_empty[N_DATA];
  end

  always_ff @(posedge clk2 or posedge rst2) begin
    if (rst2) begin
      rr          <= '0;
      dout1       <= '0;
      dout1_valid <= 1'b0;
    end else begin
      dout1_valid <= !f_empty[rr];
      if (!f_empty[rr]) begin
        dout1 <= f_rdata[rr];
        rr    <= (rr == RW'(N_DATA - 1)) ? '0 : rr + 1'b1;
      end
    end
  end

  // ---------------- dout2: voice member straight out (clk3)
  always_ff @(posedge clk3 or posedge rst3) begin
    if (rst3) begin
      dout2       <= '0;
      dout2_valid <= 1'b0;
    end else begin
      dout2_valid <= !f_empty[N_DATA];
      if (!f_empty[N_DATA]) dout2 <= f_rdata[N_DATA];
    end
  end

  // f_full is only reported through overflow
  logic unused_full;
  assign unused_full = |f_full;

endmodule

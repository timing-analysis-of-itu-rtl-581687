// vdos_pkg: constants and helpers shared by the VDOS (voice and data over
// SDH) receiver.
//
// The receiver takes six VC-12 members of one virtually concatenated group
// (VC-12-6v): members 1-5 carry GFP-framed 10 Mbit/s Ethernet, member 6
// carries one E1 (PCM-30) signal. Every member is a stream of 140-byte VC-12
// multiframes (4 frames of 35 bytes, 500 us). The frame layout helpers below
// say which byte positions of a multiframe are path overhead or stuffing.
//
// Followed from the receiver description: 6 members (5 data + 1 voice),
// 140-byte multiframes, 128-multiframe (64 ms) buffers, sync value 8'h78.
// Own choice: the E1 demapping is the byte-level nominal-rate asynchronous C-12
// mapping (32 payload bytes per frame, justification ignored).
package vdos_pkg;

  localparam int N_LANES     = 6;     // VCG members (VC-12-6v)
  localparam int N_DATA      = 5;     // members carrying Ethernet
  localparam int FRAME_BYTES = 35;    // VC-12 frame: 1 POH byte + 34 C-12 bytes
  localparam int MF_BYTES    = 140;   // VC-12 multiframe: 4 frames
  localparam int MF_SLOTS    = 128;   // 64 ms / 500 us of differential delay
  localparam logic [7:0] SYNC_SEQ = 8'h78;  // sequence value hunted for

  // Path-overhead bytes V5, J2, N2, K4: the first byte of each 35-byte frame.
  function automatic logic is_poh(input logic [7:0] pos);
    return (pos == 8'd0) || (pos == 8'(FRAME_BYTES)) ||
           (pos == 8'(2 * FRAME_BYTES)) || (pos == 8'(3 * FRAME_BYTES));
  endfunction

  // E1 information bytes in a nominal-rate asynchronously mapped C-12:
  // bytes 2..33 of every frame (32 bytes). Byte 0 is POH, byte 1 carries
  // fixed stuff or justification control, byte 34 is fixed stuff.
  function automatic logic is_e1_payload(input logic [7:0] pos);
    logic [7:0] f;
    f = (pos >= 8'(3 * FRAME_BYTES)) ? pos - 8'(3 * FRAME_BYTES) :
        (pos >= 8'(2 * FRAME_BYTES)) ? pos - 8'(2 * FRAME_BYTES) :
        (pos >= 8'(FRAME_BYTES))     ? pos - 8'(FRAME_BYTES)     : pos;
    return (f >= 8'd2) && (f <= 8'(FRAME_BYTES - 2));
  endfunction

endpackage

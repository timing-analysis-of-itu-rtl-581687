// tb_vdos_data_block: self-checking test of overhead removal, member
// de-interleaving and the two output clock domains.
//
// The driver plays the aligned output of six memory blocks: 140-byte
// multiframes with sof on byte 0. In data member i the kept (non-POH) byte q
// of multiframe n carries Ethernet byte n*680 + q*5 + i, the order in which
// virtual concatenation interleaves a byte stream over five members; the
// voice member carries E1 byte n*128 + q in the 32 information bytes of each
// frame. Every other byte is filler that must never reach an output.
// Byte values are a hash of the byte index, so order errors show.
// clk1 : clk2 : clk3 periods are 140 : 25 : 153.1, close to the real VC-12
// byte clock, a clk2 above 4.86x clk1 and the E1 byte clock.
// Checked: both output byte sequences, their counts after N multiframes
// (680 and 128 per multiframe, less what may sit in the FIFOs), the voice
// member starting later than the data members, overflow when clk2 stops,
// and recovery after rst.
module tb_vdos_data_block;
  localparam int NL  = 6;
  localparam int MFB = 140;

  logic          clk1 = 0, clk2 = 0, clk3 = 0;
  logic          rst;
  logic [7:0]    din [NL];
  logic [NL-1:0] din_valid, din_sof;
  logic [7:0]    dout1, dout2;
  logic          dout1_valid, dout2_valid, ovf;

  int checks = 0, failures = 0;
  bit clk2_run = 1;

  vdos_data_block dut (.*);

  always #70     clk1 = ~clk1;
  always #12.5   if (clk2_run) clk2 = ~clk2; else clk2 = 0;
  always #76.55  clk3 = ~clk3;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] heth(int g);
    return 8'((g * 131) ^ (g >> 7) ^ 8'h3c);
  endfunction
  function automatic logic [7:0] hpcm(int g);
    return 8'((g * 29) ^ (g >> 5) ^ 8'hc5);
  endfunction

  function automatic bit poh(int p);
    return (p % 35) == 0;
  endfunction
  function automatic bit e1(int p);
    return (p % 35) >= 2 && (p % 35) <= 33;
  endfunction

  // ---------------- monitors (sample between output clock edges)
  int n_eth, n_pcm;
  bit mon_on = 0;

  always @(negedge clk2) if (mon_on && dout1_valid) begin
    checks++;
    if (dout1 !== heth(n_eth)) begin
      failures++;
      if (failures < 10) $display("eth byte %0d: got %02h exp %02h", n_eth, dout1, heth(n_eth));
    end
    n_eth++;
  end

  always @(negedge clk3) if (mon_on && dout2_valid) begin
    checks++;
    if (dout2 !== hpcm(n_pcm)) begin
      failures++;
      if (failures < 10) $display("pcm byte %0d: got %02h exp %02h", n_pcm, dout2, hpcm(n_pcm));
    end
    n_pcm++;
  end

  // ---------------- source: nd data multiframes, voice starts vstart later
  task automatic send(int nmf, int vstart);
    for (int c = 0; c < (nmf + vstart) * MFB; c++) begin
      int n, p, q, nv, pv, qv;
      @(negedge clk1);
      n  = c / MFB;
      p  = c % MFB;
      q  = p - (p / 35) - 1;                 // kept-byte index in a data member
      nv = (c - vstart * MFB) / MFB;
      pv = (c - vstart * MFB) % MFB;
      qv = (pv / 35) * 32 + (pv % 35) - 2;   // E1 byte index in the multiframe
      for (int i = 0; i < NL - 1; i++) begin
        din_valid[i] = (n < nmf);
        din_sof[i]   = (n < nmf) && p == 0;
        din[i]       = poh(p) ? 8'($urandom) : heth(n * 680 + q * 5 + i);
      end
      din_valid[5] = (c >= vstart * MFB);
      din_sof[5]   = (c >= vstart * MFB) && pv == 0;
      din[5]       = (c >= vstart * MFB && e1(pv)) ? hpcm(nv * 128 + qv) : 8'($urandom);
    end
    @(negedge clk1);
    din_valid = '0;
    din_sof   = '0;
  endtask

  initial begin
    rst = 1; din_valid = '0; din_sof = '0;
    foreach (din[i]) din[i] = 0;
    repeat (3) @(negedge clk1);
    rst = 0;
    n_eth = 0; n_pcm = 0; mon_on = 1;

    // 1) 20 data multiframes, voice 3 multiframes behind
    fork
      send(20, 3);
    join
    repeat (4) @(negedge clk1);
    checks++;
    if (n_eth != 20 * 680) begin failures++; $display("eth count %0d exp %0d", n_eth, 20 * 680); end
    checks++;
    if (n_pcm < 20 * 128 - 16 || n_pcm > 20 * 128) begin
      failures++; $display("pcm count %0d exp about %0d", n_pcm, 20 * 128);
    end
    repeat (40) @(negedge clk1);
    checks++;
    if (n_pcm != 20 * 128) begin failures++; $display("pcm final count %0d", n_pcm); end
    checks++;
    if (ovf) begin failures++; $display("overflow at nominal clocks"); end

    // 2) clk2 stops: the data FIFOs overflow
    clk2_run = 0;
    mon_on   = 0;
    send(1, 0);
    checks++;
    if (!ovf) begin failures++; $display("no overflow with clk2 stopped"); end
    clk2_run = 1;

    // 3) rst clears the FIFOs and ovf; a fresh stream comes out intact
    @(negedge clk1) rst = 1;
    @(negedge clk1) rst = 0;
    repeat (3) @(negedge clk1);
    checks++;
    if (ovf) begin failures++; $display("ovf not cleared"); end
    n_eth = 0; n_pcm = 0; mon_on = 1;
    send(4, 0);
    repeat (40) @(negedge clk1);
    checks++;
    if (n_eth != 4 * 680 || n_pcm != 4 * 128) begin
      failures++; $display("after rst: eth %0d pcm %0d", n_eth, n_pcm);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

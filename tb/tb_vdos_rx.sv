// tb_vdos_rx: end-to-end test of the VDOS receiver at its full size
// (128-multiframe buffers, six members, no parameter overrides).
//
// A transmitter model builds a VC-12-6v group. Tx multiframe t of every
// member carries sequence value t mod 256 in its K4 byte (byte 105). Members
// 0-4 carry an Ethernet byte stream interleaved byte by byte (member i, kept
// byte q of multiframe t holds stream byte t*680 + q*5 + i) in the 34 C-12
// bytes of each frame. Member 5 carries an E1 stream, 32 bytes per frame in
// bytes 2..33. Filler everywhere else. The stream byte values repeat with
// the 256-multiframe sequence period, so after every lock the output must
// restart at the stream byte of the multiframe whose sequence value is 8'h78.
//
// Member i reaches the receiver D[i] multiframes late, D = {5,0,110,37,64}
// for the data members (55 ms of differential delay) and 90 for voice. Clock
// periods are the real ones: clk1 3572 ns (VC-12 byte clock), clk3 3906.25 ns
// (E1 byte clock), clk2 640 ns.
//
// Sequence of events (receiver multiframes r):
//   r=210/230   voice and data groups lock; from here both outputs are
//               checked byte by byte, and their rates over 100 multiframes;
//   r>128       the memories overwrite their oldest multiframes;
//   r=400       member 3's sequence byte is corrupted: mismatch, reset2;
//   after that  the first member to find 8'h78 belongs to a different tx
//               multiframe than the rest: the hunt times out after 64 ms;
//   then        both groups lock again and the outputs are checked again.
// Every mechanism (data lock, voice lock, overwrite, mismatch, timeout,
// relock) is counted and must occur at least once.
module tb_vdos_rx;
  localparam int NL  = 6;
  localparam int MFB = 140;
  localparam int ETH_PERIOD = 256 * 680;
  localparam int PCM_PERIOD = 256 * 128;

  logic          clk1 = 0, clk2 = 0, clk3 = 0;
  logic          reset1, fin1, fin2;
  logic [7:0]    din [NL];
  logic [7:0]    dout1, dout2;
  logic          dout1_valid, dout2_valid;
  logic [NL-1:0] en;
  logic          reset2, mismatch, timeout, ovf;

  int checks = 0, failures = 0;

  vdos_rx dut (.*);

  always #1786     clk1 = ~clk1;
  always #320      clk2 = ~clk2;
  always #1953.125 clk3 = ~clk3;

  initial begin
    #5s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] heth(int g);
    g = g % ETH_PERIOD;
    return 8'((g * 131) ^ (g >> 7) ^ 8'h3c);
  endfunction
  function automatic logic [7:0] hpcm(int g);
    g = g % PCM_PERIOD;
    return 8'((g * 29) ^ (g >> 5) ^ 8'hc5);
  endfunction

  // byte p of tx multiframe t of member i
  function automatic logic [7:0] tx_byte(int i, int t, int p);
    int f, q;
    f = p % 35;
    if (p == 105) return 8'(t);
    if (f == 0)   return 8'h55;                       // V5/J2/N2
    if (i < 5) begin
      q = p - (p / 35) - 1;
      return heth(t * 680 + q * 5 + i);
    end
    if (f >= 2 && f <= 33) return hpcm(t * 128 + (p / 35) * 32 + f - 2);
    return 8'ha5;                                     // C-12 stuff
  endfunction

  int dly [NL] = '{5, 0, 110, 37, 64, 90};
  int r, p;               // receiver multiframe and byte
  int bad_lane = 3, bad_r = 400;

  // ---------------- source (clk1 negedge)
  initial begin
    reset1 = 1; fin1 = 0; fin2 = 0;
    foreach (din[i]) din[i] = 0;
    repeat (4) @(negedge clk1);
    reset1 = 0;
    r = 0; p = 0;
    forever begin
      fin1 = (p == 0);
      fin2 = (p == 105);
      for (int i = 0; i < NL; i++) begin
        din[i] = tx_byte(i, r - dly[i] + 1024, p);
        if (i == bad_lane && r == bad_r && p == 105) din[i] = 8'h00;
      end
      @(negedge clk1);
      p++;
      if (p == MFB) begin p = 0; r++; end
    end
  end

  // ---------------- event counters (clk1 domain)
  int n_data_lock = 0, n_voice_lock = 0, n_mismatch = 0, n_timeout = 0;
  int n_overwrite = 0, n_reset2 = 0;
  logic en_d = 0, env_d = 0;
  int lock_cyc = 0, cyc = 0, first_out_cyc = -1;

  always @(negedge clk1) begin
    cyc++;
    if (en[0] && !en_d)  begin n_data_lock++;  lock_cyc = cyc; first_out_cyc = -1; end
    if (en[5] && !env_d) n_voice_lock++;
    en_d  <= en[0];
    env_d <= en[5];
    if (mismatch) n_mismatch++;
    if (timeout)  n_timeout++;
    if (reset2)   n_reset2++;
    // a multiframe starts in a slot that still holds an older one
    if (dut.g_mem[0].u_mem.w_valid && dut.g_mem[0].u_mem.w_off == 0 &&
        dut.g_mem[0].u_mem.slot_full[dut.g_mem[0].u_mem.w_slot])
      n_overwrite++;
    checks++;
    if (ovf) begin failures++; if (failures < 10) $display("FIFO overflow"); end
    checks++;
    if (en[4:0] != '0 && en[4:0] != '1) begin failures++; $display("data en split"); end
  end

  // ---------------- output checkers
  int e_eth = 0, e_pcm = 0, n_eth = 0, n_pcm = 0;
  logic eth_on = 0, pcm_on = 0;

  // expectation restarts at every lock (en rises two clk1 cycles before the
  // first byte can reach an output, so no old byte is in flight)
  always @(posedge en[0]) begin e_eth = 8'h78 * 680; eth_on = 1; end
  always @(posedge en[5]) begin e_pcm = 8'h78 * 128; pcm_on = 1; end
  always @(posedge reset2) begin eth_on = 0; pcm_on = 0; end

  always @(negedge clk2) if (dout1_valid) begin
    checks++;
    if (!eth_on || dout1 !== heth(e_eth)) begin
      failures++;
      if (failures < 10) $display("r=%0d eth byte %0d: got %02h exp %02h on=%0b", r, e_eth, dout1, heth(e_eth), eth_on);
    end
    if (first_out_cyc < 0) first_out_cyc = cyc;
    e_eth++;
    n_eth++;
  end

  always @(negedge clk3) if (dout2_valid) begin
    checks++;
    if (!pcm_on || dout2 !== hpcm(e_pcm)) begin
      failures++;
      if (failures < 10) $display("r=%0d pcm byte %0d: got %02h exp %02h", r, e_pcm, dout2, hpcm(e_pcm));
    end
    e_pcm++;
    n_pcm++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL r=%0d: %s", r, what); end
  endtask

  task automatic wait_mf(int rr);
    while (r < rr) @(negedge clk1);
  endtask

  initial begin
    int a_eth, a_pcm;
    wait_mf(232);
    check(n_data_lock == 1 && n_voice_lock == 1, "first locks");
    check(first_out_cyc > 0 && first_out_cyc - lock_cyc <= 4,
          $sformatf("first Ethernet byte %0d clk1 cycles after en", first_out_cyc - lock_cyc));
    // rates: 680 Ethernet bytes and 128 E1 bytes per 500 us multiframe
    wait_mf(250);
    a_eth = n_eth; a_pcm = n_pcm;
    wait_mf(350);
    check((n_eth - a_eth) >= 100 * 680 - 5 && (n_eth - a_eth) <= 100 * 680 + 5,
          $sformatf("Ethernet bytes in 100 multiframes: %0d", n_eth - a_eth));
    check((n_pcm - a_pcm) >= 100 * 128 - 2 && (n_pcm - a_pcm) <= 100 * 128 + 2,
          $sformatf("E1 bytes in 100 multiframes: %0d", n_pcm - a_pcm));
    wait_mf(1100);
    check(n_mismatch >= 1, "no mismatch");
    check(n_timeout >= 1, "no hunt timeout");
    check(n_overwrite >= 1, "no overwrite");
    check(n_data_lock >= 2, "data group did not lock again");
    check(n_voice_lock >= 2, "voice group did not lock again");
    check(n_reset2 == n_mismatch + n_timeout, "reset2 count");
    check(en == '1, "not locked at the end");
    check(n_eth > 600 * 680, $sformatf("Ethernet bytes checked: %0d", n_eth));
    $display("data locks %0d, voice locks %0d, mismatches %0d, timeouts %0d, overwrites %0d, eth bytes %0d, E1 bytes %0d",
             n_data_lock, n_voice_lock, n_mismatch, n_timeout, n_overwrite, n_eth, n_pcm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

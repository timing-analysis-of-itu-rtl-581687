// tb_vdos_rx_maxdelay: the differential-delay limit of the full-size
// receiver (128-multiframe buffers, default parameters).
//
// Same transmitter model as tb_vdos_rx: tx multiframe t carries sequence
// value t mod 256 in K4, Ethernet stream bytes t*680 + q*5 + i in the C-12
// bytes of data member i, E1 bytes in frame bytes 2..33 of member 5.
//   Run 1: data-member delays {0,127,64,1,126} multiframes, voice 127
//          (63.5 ms spread, the most the 128-slot buffers can hold). Both
//          groups must lock without a timeout and every output byte must be
//          right for 300 multiframes, while the buffers overwrite.
//   Run 2: member 1 delayed by 128 multiframes (64 ms): the member that is
//          late cannot be aligned; the data group must never lock and the
//          hunt must time out repeatedly, while the voice group still locks.
module tb_vdos_rx_maxdelay;
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

  function automatic logic [7:0] tx_byte(int i, int t, int p);
    int f, q;
    f = p % 35;
    if (p == 105) return 8'(t);
    if (f == 0)   return 8'h55;
    if (i < 5) begin
      q = p - (p / 35) - 1;
      return heth(t * 680 + q * 5 + i);
    end
    if (f >= 2 && f <= 33) return hpcm(t * 128 + (p / 35) * 32 + f - 2);
    return 8'ha5;
  endfunction

  int dly [NL];
  int r = 0, p = 0;
  bit run = 0;

  always @(negedge clk1) begin
    if (run) begin
      p++;
      if (p == MFB) begin p = 0; r++; end
    end
    fin1 <= run && (p == 0);
    fin2 <= run && (p == 105);
    for (int i = 0; i < NL; i++) din[i] <= tx_byte(i, r - dly[i] + 1024, p);
  end

  int n_timeout = 0, n_mismatch = 0, n_lock = 0, n_vlock = 0, n_eth = 0, n_pcm = 0;
  logic en_d = 0, env_d = 0;
  always @(negedge clk1) begin
    if (timeout)  n_timeout++;
    if (mismatch) n_mismatch++;
    if (en[0] && !en_d) n_lock++;
    if (en[5] && !env_d) n_vlock++;
    en_d  <= en[0];
    env_d <= en[5];
  end

  int e_eth = 0, e_pcm = 0;
  always @(posedge en[0]) e_eth = 8'h78 * 680;
  always @(posedge en[5]) e_pcm = 8'h78 * 128;

  always @(negedge clk2) if (dout1_valid) begin
    checks++;
    if (dout1 !== heth(e_eth)) begin
      failures++;
      if (failures < 10) $display("eth byte %0d: got %02h exp %02h", e_eth, dout1, heth(e_eth));
    end
    e_eth++; n_eth++;
  end
  always @(negedge clk3) if (dout2_valid) begin
    checks++;
    if (dout2 !== hpcm(e_pcm)) begin
      failures++;
      if (failures < 10) $display("pcm byte %0d: got %02h exp %02h", e_pcm, dout2, hpcm(e_pcm));
    end
    e_pcm++; n_pcm++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL r=%0d: %s", r, what); end
  endtask

  task automatic restart(int d0, int d1, int d2, int d3, int d4, int d5);
    @(negedge clk1);
    run = 0; reset1 = 1;
    dly = '{d0, d1, d2, d3, d4, d5};
    repeat (4) @(negedge clk1);
    reset1 = 0;
    r = 0; p = 0;
    n_timeout = 0; n_mismatch = 0; n_lock = 0; n_vlock = 0; n_eth = 0; n_pcm = 0;
    run = 1;
  endtask

  task automatic wait_mf(int rr);
    while (r < rr) @(negedge clk1);
  endtask

  initial begin
    reset1 = 1;
    dly = '{0, 0, 0, 0, 0, 0};

    // run 1: 127 multiframes of differential delay
    restart(0, 127, 64, 1, 126, 127);
    wait_mf(560);
    check(n_lock == 1 && n_vlock == 1, $sformatf("locks %0d/%0d", n_lock, n_vlock));
    check(n_timeout == 0 && n_mismatch == 0, "resynchronised at 127 multiframes");
    check(en == '1, "not in sync");
    check(n_eth >= 300 * 680, $sformatf("Ethernet bytes %0d", n_eth));
    check(n_pcm >= 300 * 128, $sformatf("E1 bytes %0d", n_pcm));

    // run 2: 128 multiframes is beyond the buffer
    restart(0, 128, 0, 0, 0, 3);
    wait_mf(900);
    check(n_lock == 0, "data group locked at 128 multiframes of delay");
    check(n_timeout >= 3, $sformatf("timeouts %0d", n_timeout));
    check(n_eth == 0, "Ethernet output without lock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

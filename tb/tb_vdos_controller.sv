// tb_vdos_controller: self-checking test of the alignment controller.
//
// A driver sends six streams of 140-byte multiframes, fin1 on byte 0 and
// fin2 on byte 105, where member i carries sequence value (t - D[i]) mod 256
// in multiframe t (t counts from the first fin1 after reset, so slot = t mod
// 128). The expected lock points follow directly: member i shows 8'h78 in
// multiframe 120 + D[i].
//   A: D = {3,0,17,9,100}, voice 40. The voice group locks at t = 160, the
//      data group at t = 220, each exactly two cycles after that fin2, with
//      add[i] = (120 + D[i]) mod 128. en then holds for 380 multiframes with
//      no reset2. A wrong sequence byte in member 2 must give mismatch,
//      reset2 and drop en.
//   B: member 4 never carries the sync value: after the first member finds
//      it, the hunt times out when the 128th multiframe starts (t = 248) and
//      again after the restart (t = 376 + 128 = 504), while the voice group
//      locks independently.
//   C: a wrong sequence byte in the voice member gives mismatch too.
//   D: members 127 multiframes apart (the buffer limit) lock and hold.
module tb_vdos_controller;
  localparam int MFB = 140;
  localparam int NL  = 6;

  logic        clk1 = 0;
  logic        reset1, fin1, fin2;
  logic [7:0]  d [NL];
  logic [NL-1:0] en;
  logic [6:0]  add [NL];
  logic        reset2, mismatch, timeout;

  int checks = 0, failures = 0;

  vdos_controller dut (.*);

  always #5 clk1 = ~clk1;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // ---------------- stream source
  int  dly [NL];
  int  t, b;
  int  bad_lane, bad_t;    // corrupt one sequence byte
  int  dead_lane;          // member that never carries the sync value
  int  cyc;

  // cycle-level history of the status outputs
  int  first_en_data, first_en_voice, fin2_cyc_data, fin2_cyc_voice;
  int  n_mismatch, n_timeout, cyc_mismatch, cyc_timeout [$];

  task automatic do_reset();
    @(negedge clk1);
    reset1 = 1; fin1 = 0; fin2 = 0;
    @(negedge clk1);
    @(negedge clk1);
    reset1 = 0;
    t = 0; b = -1; cyc = 0;
    first_en_data = -1; first_en_voice = -1;
    fin2_cyc_data = -1; fin2_cyc_voice = -1;
    n_mismatch = 0; n_timeout = 0; cyc_mismatch = -1;
    cyc_timeout.delete();
  endtask

  // one clk1 cycle: look at the outputs, then present the next byte
  task automatic step();
    @(negedge clk1);
    cyc++;
    if (en[0] && first_en_data < 0)  first_en_data  = cyc;
    if (en[5] && first_en_voice < 0) first_en_voice = cyc;
    if (mismatch) begin n_mismatch++; cyc_mismatch = cyc; end
    if (timeout)  begin n_timeout++;  cyc_timeout.push_back(cyc); end
    check(en[0] == en[1] && en[1] == en[2] && en[2] == en[3] && en[3] == en[4],
          "data members' en differ");
    b++;
    if (b == MFB) begin b = 0; t++; end
    fin1 = (b == 0);
    fin2 = (b == 105);
    for (int i = 0; i < NL; i++) begin
      d[i] = 8'($urandom);
      if (fin2) begin
        d[i] = 8'(t - dly[i]);
        if (i == dead_lane) d[i] = 8'h00;
        if (i == bad_lane && t == bad_t) d[i] = 8'h33;
      end
    end
    begin
      int maxd = 0;
      for (int i = 0; i < NL - 1; i++) if (dly[i] > maxd) maxd = dly[i];
      if (fin2 && dead_lane < 0 && t == 120 + maxd) fin2_cyc_data = cyc;
    end
    if (fin2 && t == 120 + dly[5]) fin2_cyc_voice = cyc;
  endtask

  task automatic run_to(int tt);
    while (!(t == tt && b == 0)) step();
  endtask

  initial begin
    reset1 = 1; fin1 = 0; fin2 = 0;
    foreach (d[i]) d[i] = 0;

    // ---------------- A: lock, hold, data mismatch
    dly = '{3, 0, 17, 9, 100, 40};
    bad_lane = -1; bad_t = -1; dead_lane = -1;
    do_reset();
    run_to(600);
    check(fin2_cyc_voice > 0 && first_en_voice == fin2_cyc_voice + 2,
          $sformatf("voice en at %0d, fin2 at %0d", first_en_voice, fin2_cyc_voice));
    check(fin2_cyc_data > 0 && first_en_data == fin2_cyc_data + 2,
          $sformatf("data en at %0d, fin2 at %0d", first_en_data, fin2_cyc_data));
    for (int i = 0; i < NL; i++)
      check(add[i] == 7'((120 + dly[i]) % 128),
            $sformatf("add[%0d]=%0d exp %0d", i, add[i], (120 + dly[i]) % 128));
    check(en == '1, "en not held");
    check(n_mismatch == 0 && n_timeout == 0, "spurious reset2 while in sync");
    bad_lane = 2; bad_t = 620;
    run_to(760);
    check(n_mismatch == 1, $sformatf("mismatch count %0d", n_mismatch));
    // member 2 is read 83 multiframes behind its arrival: the check of
    // multiframe 620 falls in multiframe 620 + 83 or 620 + 84
    check(cyc_mismatch > (703 * MFB) && cyc_mismatch < (705 * MFB),
          $sformatf("mismatch at cycle %0d", cyc_mismatch));
    check(en == '0, "en after mismatch");

    // ---------------- B: hunt timeout
    dly = '{0, 0, 0, 0, 0, 7};
    bad_lane = -1; dead_lane = 4;
    do_reset();
    run_to(600);
    check(n_timeout == 2, $sformatf("timeout count %0d", n_timeout));
    if (cyc_timeout.size() == 2) begin
      // timeout is flagged the cycle after fin1 of multiframe 248; the
      // restart aligns at the next fin1 (t = 249 -> slot 0), so the second
      // hunt finds at t = 376 and times out at t = 504
      check(cyc_timeout[0] == 248 * MFB + 2, $sformatf("timeout 1 at %0d", cyc_timeout[0]));
      check(cyc_timeout[1] == 504 * MFB + 2, $sformatf("timeout 2 at %0d", cyc_timeout[1]));
    end
    check(en[4:0] == '0, "data en with a dead member");
    check(first_en_voice == fin2_cyc_voice + 2, "voice lock independent of data");

    // ---------------- C: voice mismatch
    dly = '{5, 6, 7, 8, 9, 33};
    dead_lane = -1; bad_lane = 5; bad_t = 300;
    do_reset();
    run_to(299);
    check(en == '1, "all locked before the voice error");
    run_to(310);
    check(n_mismatch == 1, "voice mismatch not detected");
    check(en == '0, "en after voice mismatch");

    // ---------------- D: largest delay spread, 127 multiframes
    dly = '{0, 127, 0, 0, 0, 0};
    dead_lane = -1; bad_lane = -1;
    do_reset();
    run_to(600);
    check(first_en_data == fin2_cyc_data + 2, "no lock at 127 multiframes");
    check(add[1] == 7'((120 + 127) % 128) && add[0] == 7'(120), "add at 127 multiframes");
    check(en == '1 && n_mismatch == 0 && n_timeout == 0, "lost sync at 127 multiframes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

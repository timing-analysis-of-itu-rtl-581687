// tb_vdos_mem_block: self-checking test of the differential-delay buffer.
//
// A driver sends a continuous VC-12-like stream (one byte per clk1, fin1 on
// byte 0 of every 140-byte multiframe, byte value a hash of multiframe number
// and position). A reference model of the slot RAM predicts every byte the
// buffer must return once en is raised with a start slot on add.
// Checked: two-cycle read latency, byte order across slot and RAM wrap,
// dout_sof on multiframe starts, overwrite of the oldest multiframe when the
// buffer is full, and that reset2 empties the buffer and restarts slot
// numbering at the next fin1.
module tb_vdos_mem_block;
  localparam int SLOTS = 128;
  localparam int MFB   = 140;

  logic       clk1 = 0;
  logic       reset1, reset2, fin1, en;
  logic [7:0] din;
  logic [6:0] add;
  logic [7:0] dout;
  logic       dout_valid, dout_sof;

  int checks = 0, failures = 0;

  vdos_mem_block dut (.*);

  always #5 clk1 = ~clk1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stream source and reference model
  logic [7:0] model [SLOTS*MFB];
  bit         mfull [SLOTS];
  int         n = 0, b = -1, tb_slot = 0;
  bit         started = 0;

  function automatic logic [7:0] val(int mf, int pos);
    return 8'((mf * 37 + pos * 11 + (mf >> 3) * 5 + 8'h5a) ^ (pos >> 2));
  endfunction

  // called at a negedge: present the next byte
  task automatic drive_byte();
    b++;
    if (b == MFB) begin b = 0; n++; end
    fin1 = (b == 0);
    din  = val(n, b);
    if (fin1) begin
      tb_slot = started ? (tb_slot + 1) % SLOTS : 0;
      started = 1;
      mfull[tb_slot] = 1;
    end
    if (started) model[tb_slot*MFB + b] = din;
  endtask

  // ---------------- read expectation
  int  en_age = 0, es = 0, eo = 0;
  int  reads = 0;

  task automatic check_out();
    if (en) en_age++;
    else    en_age = 0;
    if (en_age == 1) begin
      checks++;
      if (dout_valid) begin failures++; $display("valid too early"); end
    end else if (en_age >= 2) begin
      checks++;
      if (dout_valid !== mfull[es] ||
          (mfull[es] && (dout !== model[es*MFB + eo] || dout_sof !== (eo == 0)))) begin
        failures++;
        if (failures < 10)
          $display("t=%0t slot %0d off %0d: got v=%0b %02h sof=%0b exp v=%0b %02h",
                   $time, es, eo, dout_valid, dout, dout_sof, mfull[es], model[es*MFB+eo]);
      end
      reads++;
      eo++;
      if (eo == MFB) begin eo = 0; es = (es + 1) % SLOTS; end
    end else begin
      checks++;
      if (dout_valid) begin failures++; $display("valid while en low"); end
    end
  endtask

  task automatic cycles(int c);
    repeat (c) begin
      @(negedge clk1);
      check_out();
      drive_byte();
    end
  endtask

  task automatic start_read(int slot);
    @(negedge clk1);
    check_out();
    drive_byte();
    en  = 1;
    add = 7'(slot);
    es  = slot;
    eo  = 0;
  endtask

  task automatic stop_read();
    @(negedge clk1);
    check_out();
    drive_byte();
    en = 0;
  endtask

  initial begin
    reset1 = 1; reset2 = 0; fin1 = 0; en = 0; din = 0; add = 0;
    foreach (mfull[i]) mfull[i] = 0;
    repeat (3) @(negedge clk1);
    reset1 = 0;
    // some bytes before the first fin1 are not aligned and not stored
    repeat (17) @(negedge clk1) din = 8'hee;
    b = MFB - 1; n = -1;

    // 1) read from slot 1 while the writer is 5 multiframes ahead
    cycles(5 * MFB + 40);
    start_read(1);
    cycles(3 * MFB);
    stop_read();

    // 2) keep reading across the RAM wrap for 140 multiframes
    start_read(2);
    cycles(140 * MFB);
    stop_read();

    // 3) full buffer: the slot after the one being written holds the
    //    oldest multiframe (n-127); n-128 was overwritten by n
    cycles(20);
    start_read((tb_slot + 1) % SLOTS);
    checks++;
    if (n < SLOTS) begin failures++; $display("buffer never wrapped"); end
    cycles(2 * MFB);
    stop_read();

    // 4) reset2 empties the buffer; numbering restarts at the next fin1
    cycles(30);
    @(negedge clk1);
    check_out();
    drive_byte();
    reset2 = 1;
    @(negedge clk1);
    check_out();
    reset2 = 0;
    foreach (mfull[i]) mfull[i] = 0;
    started = 0;
    drive_byte();
    if (b != 0) begin
      // bytes until the next fin1 are not stored
      while (b != MFB - 1) begin
        @(negedge clk1);
        check_out();
        b++;
        fin1 = 0;
        din  = val(n, b);
      end
    end
    cycles(MFB + 10);      // slot 0 written, now in slot 1
    start_read(5);         // never written since reset2: no valid data
    cycles(20);
    stop_read();
    start_read(0);
    cycles(2 * MFB);
    stop_read();
    cycles(5);

    checks++;
    if (reads < 140 * MFB) begin failures++; $display("too few reads %0d", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

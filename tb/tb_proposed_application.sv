// tb_proposed_application: end-to-end test of the whole design at its
// default parameters (50 MHz SYSCLK, SWCLK = SYSCLK/64, FWCLK = CWCLK =
// SYSCLK/16, 24-tick windows, reset 1024 cycles after a failure).
//
// Part 1, software through the register port: INIT starts the watchdog and
// services carry it through service, frame and controller windows; every
// failure mode is provoked (service, frame, controller window expiry and a
// sensor value over its limit), RSTOUT follows one failure, WDRST and clr
// clear others, a window length is changed through the 0xAAAA / 0x5555
// sequence, and the frame-window-closed status bit is read and cleared.
// dataout is checked against the sensor of each window.
// Part 2, fault injection: the program model services the watchdog on its
// own; first without faults (no failure may occur), then with random PC
// jumps, some of which the watchdog must detect and turn into a reset.
// Throughout, four pulse trains run through the scheduled processes and
// spare blocks: their measured periods are checked, one process is driven
// too fast to provoke its error, and every spare block must step in on a
// watchdog failure.
// Each mechanism is counted and one that never happened is a failure.
module tb_proposed_application;
  import wdt_pkg::*;

  localparam int NP = 4;
  localparam logic [15:0] LENS = 16'(3 << 13 | 3 << 10 | 3 << 7);

  logic sysclk = 1'b0, sysreset = 1'b1;
  logic init = 1, clr = 0, cs = 0, rd = 0, wr = 0;
  logic [15:0] dbus_i = '0, dbus_o;
  logic wdfail, rstout, swclk, fwclk, cwclk;
  logic [2:0] fail_mode;
  logic [1:0] stage;
  logic [7:0] swlen, fwlen, cwlen, fw_offset, dataout;
  logic enable1 = 1, enable2 = 1, enable3 = 1;
  logic [7:0] pressure = 8'h00, temp = 8'h10, heat = 8'h6A;
  logic prog_sel = 0, fi_enable = 0;
  logic [7:0] fi_pc;
  logic [15:0] fi_inject_count, fi_detect_count;
  logic [NP-1:0] task_pulse = '0;
  logic [NP-1:0][47:0] task_data;
  logic [NP-1:0] task_spare, task_err;
  logic [NP-1:0][15:0] task_spare_count;

  int checks = 0, failures = 0;
  int cyc = 0;
  // mechanism counters
  int n_sw2fw = 0, n_fw2cw = 0, n_cw2fw = 0, n_rstout = 0, n_unlock = 0;
  int n_fail [5] = '{0, 0, 0, 0, 0};
  int n_period_ok = 0, n_fast_err = 0, n_spare_all = 0, n_clear = 0, n_fwclosed = 0;
  bit fast_mode = 0;
  logic [15:0] cur_lens = LENS;   // length fields carried by every write

  always #10 sysclk = ~sysclk;   // 50 MHz

  proposed_application dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cyc=%0d)", what, cyc);
    end
  endtask

  // ---------------- monitors ----------------
  logic [1:0] stage_q = 0;
  logic wdfail_q = 0, rstout_q = 0;
  always @(posedge sysclk) begin
    cyc <= cyc + 1;
    if (!sysreset) begin
      if (stage_q == 2'(STG_SERVICE) && stage == 2'(STG_FRAME)) n_sw2fw++;
      if (stage_q == 2'(STG_FRAME)   && stage == 2'(STG_CTRL))  n_fw2cw++;
      if (stage_q == 2'(STG_CTRL)    && stage == 2'(STG_FRAME)) n_cw2fw++;
      if (wdfail && !wdfail_q) n_fail[fail_mode]++;
      if (rstout && !rstout_q) n_rstout++;
      if (wdfail && !wdfail_q && task_spare != '1) ;  // spare lags by a cycle
    end
    stage_q  <= stage;
    wdfail_q <= wdfail;
    rstout_q <= rstout;
  end

  // every spare block steps in when the watchdog has failed
  always @(negedge sysclk) if (!sysreset && wdfail && wdfail_q) begin
    if (task_spare == '1) n_spare_all++;
    else begin
      failures++;
      $display("FAIL: spare blocks not all active during WDFAIL (cyc=%0d)", cyc);
    end
  end

  // ---------------- task pulse trains ----------------
  // process p pulses every 10 + 5p cycles, 7 ns after a clock edge
  for (genvar p = 0; p < NP; p++) begin : g_pulse
    initial begin
      @(negedge sysreset);
      forever begin
        repeat (10 + 5 * p) @(posedge sysclk);
        #7 task_pulse[p] = 1;
        #2 task_pulse[p] = 0;
        if (p == 3 && fast_mode) begin
          #2 task_pulse[p] = 1;   // second pulse with no clock edge between
          #2 task_pulse[p] = 0;
        end
      end
    end
  end

  // periods seen by the embedded task, when no spare data is in use
  int since_rst = 0;
  always @(posedge sysclk) since_rst <= sysreset ? 0 : since_rst + 1;
  always @(negedge sysclk) if (!sysreset && since_rst > 100 && !fast_mode && !wdfail) begin
    for (int p = 0; p < NP; p++)
      if (!task_spare[p] && !task_err[p]) begin
        if (task_data[p] == 48'(10 + 5 * p)) n_period_ok++;
        else begin
          failures++;
          $display("FAIL: task %0d period %0d expected %0d", p, task_data[p], 10 + 5 * p);
        end
      end
  end

  // ---------------- bus helpers ----------------
  task automatic wr_reg(input logic [15:0] d);
    @(negedge sysclk);
    cs = 1; wr = 1; dbus_i = d;
    @(negedge sysclk);
    cs = 0; wr = 0; dbus_i = '0;
  endtask

  task automatic read_reg(output logic [15:0] d);
    @(negedge sysclk);
    cs = 1; rd = 1;
    #1 d = dbus_o;
    @(negedge sysclk);
    cs = 0; rd = 0;
  endtask

  task automatic service();
    wr_reg(cur_lens | 16'h0001);
    repeat (2) @(negedge sysclk);
  endtask

  task automatic start();
    @(negedge sysclk); init = 1;
    repeat (3) @(negedge sysclk);
    init = 0;
    repeat (5) @(negedge sysclk);
  endtask

  task automatic wait_fail(input int max, output int n);
    n = 0;
    while (!wdfail && n < max) begin @(negedge sysclk); n++; end
    if (!wdfail) n = -1;
  endtask

  task automatic clear_pin();
    @(negedge sysclk); clr = 1; @(negedge sysclk); clr = 0;
    repeat (2) @(negedge sysclk);
    check(!wdfail, "cleared");
    n_clear++;
  endtask

  initial begin
    repeat (400000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge sysclk);
    sysreset = 0;
    repeat (300) @(negedge sysclk);

    // ======== part 1: software watchdog ========
    start();
    check(stage == 2'(STG_SERVICE), "service window open after INIT");
    check(dataout == pressure, "dataout shows pressure in the service window");
    repeat (600) @(negedge sysclk);
    service();
    check(stage == 2'(STG_FRAME), "frame window after service");
    @(negedge sysclk);
    check(dataout == temp, "dataout shows temp in the frame window");
    for (int i = 0; i < 6; i++) begin
      repeat (150 + 30 * i) @(negedge sysclk);
      service();
    end
    check(!wdfail, "serviced in time: no failure");
    check(stage == 2'(STG_FRAME), "frame after an even number of services");
    // the frame window has been closed by services: FWCLOSED, then cleared
    begin
      logic [15:0] r1, r2;
      read_reg(r1);
      read_reg(r2);
      check(r1[2] && !r2[2], $sformatf("FWCLOSED read %b then %b", r1[2], r2[2]));
      if (r1[2] && !r2[2]) n_fwclosed++;
    end
    service();
    @(negedge sysclk);
    check(dataout == heat, "dataout shows heat in the controller window");
    // let the controller window expire: failure, then RSTOUT
    wait_fail(500, n);
    check(n > 300 && fail_mode == 3'(FM_CTRL), $sformatf("controller expiry after %0d", n));
    n = 0;
    while (!rstout && n < 2000) begin @(negedge sysclk); n++; end
    check(n >= 1020 && n <= 1030, $sformatf("RSTOUT %0d cycles after WDFAIL", n));
    repeat (40) @(negedge sysclk);
    check(!wdfail && stage == 2'(STG_IDLE), "idle after reset pulse");

    // service window expiry, cleared by WDRST
    start();
    wait_fail(2000, n);
    check(n > 1400 && fail_mode == 3'(FM_SERVICE), $sformatf("service expiry after %0d", n));
    wr_reg(LENS | 16'h0002);
    repeat (2) @(negedge sysclk);
    check(!wdfail, "WDRST clears");
    n_clear++;

    // frame window expiry, cleared by clr
    start();
    service();
    wait_fail(500, n);
    check(n > 300 && fail_mode == 3'(FM_FRAME), $sformatf("frame expiry after %0d", n));
    clear_pin();

    // sensor limit: pressure 0xC7 in the service window
    pressure = 8'hC7;
    start();
    check(wdfail && fail_mode == 3'(FM_PARAM), "pressure over limit fails the watchdog");
    check(dataout == 8'h00, "dataout zero for a reading over its limit");
    clear_pin();
    pressure = 8'h00;
    // disabled check lets the value through
    temp = 8'hD0; enable2 = 0;
    start();
    service();
    repeat (10) @(negedge sysclk);
    check(!wdfail, "disabled temperature check");
    clear_pin();
    temp = 8'h10; enable2 = 1;

    // shorten the controller window to 8 ticks via the unlock sequence
    wr_reg(16'hAAAA);
    wr_reg(16'h5555);
    cur_lens = 16'(3 << 13 | 3 << 10 | 1 << 7);
    wr_reg(cur_lens);
    repeat (3) @(negedge sysclk);
    check(cwlen == 8'd8, $sformatf("cwlen %0d after unlock", cwlen));
    if (cwlen == 8'd8) n_unlock++;
    start();
    service();
    service();
    wait_fail(300, n);
    check(n > 100 && n < 160 && fail_mode == 3'(FM_CTRL), $sformatf("short controller window %0d", n));
    clear_pin();
    wr_reg(16'hAAAA);
    wr_reg(16'h5555);
    cur_lens = LENS;
    wr_reg(LENS);
    repeat (3) @(negedge sysclk);
    check(cwlen == 8'd24, "controller window length restored");

    // a too-fast pulse train on process 3
    fast_mode = 1;
    begin
      bit saw;
      saw = 0;
      repeat (200) begin
        @(negedge sysclk);
        if (task_err[3] && task_spare[3]) saw = 1;
      end
      check(saw, "fast pulses flagged and covered by spare data");
      if (saw) n_fast_err++;
    end
    fast_mode = 0;
    repeat (100) @(negedge sysclk);

    // ======== part 2: program model, then fault injection ========
    // a system reset restarts the program, which then drives INIT
    prog_sel = 1;
    @(negedge sysclk); sysreset = 1;
    repeat (2) @(negedge sysclk); sysreset = 0;
    repeat (20000) @(negedge sysclk);
    check(!wdfail && n_rstout == 1, "program without faults keeps the watchdog serviced");
    check(stage != 2'(STG_IDLE), "program started the watchdog");
    fi_enable = 1;
    repeat (300000) begin
      @(negedge sysclk);
      if (fi_detect_count >= 5 && !wdfail && !rstout) break;
    end
    fi_enable = 0;
    $display("injected %0d faults, watchdog detected %0d", fi_inject_count, fi_detect_count);
    check(fi_detect_count >= 5, "injected faults detected");
    check(fi_inject_count > fi_detect_count, "not every jump is a detectable fault");
    check(n_rstout >= 1 + 5, "each detection ends in a reset");

    // ======== mechanism coverage ========
    $display("sw->fw %0d fw->cw %0d cw->fw %0d fails svc %0d frame %0d ctrl %0d param %0d rstout %0d",
             n_sw2fw, n_fw2cw, n_cw2fw, n_fail[1], n_fail[2], n_fail[3], n_fail[4], n_rstout);
    $display("clears %0d unlock %0d fwclosed %0d periods %0d fast %0d spare-all %0d",
             n_clear, n_unlock, n_fwclosed, n_period_ok, n_fast_err, n_spare_all);
    check(n_sw2fw > 0, "service window serviced");
    check(n_fw2cw > 0, "frame to controller window");
    check(n_cw2fw > 0, "controller to frame window");
    for (int m = 1; m <= 4; m++) check(n_fail[m] > 0, $sformatf("failure mode %0d seen", m));
    check(n_rstout > 0, "RSTOUT issued");
    check(n_clear > 0, "failure cleared before reset");
    check(n_unlock > 0, "length changed through unlock");
    check(n_fwclosed > 0, "frame-window-closed status read");
    check(n_period_ok > 0, "task periods measured");
    check(n_fast_err > 0, "scheduled-process error");
    check(n_spare_all > 0, "spare blocks used on WDFAIL");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

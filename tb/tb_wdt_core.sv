// tb_wdt_core: the windowed watchdog through its register port, at reduced
// clock ratios (SWCLK = SYSCLK/8, FWCLK = CWCLK = SYSCLK/4, 1 MHz so that
// 1 us = 1 cycle, reset 30 cycles after the fail flag). Covers: start on
// the INIT falling edge; service, frame and controller windows in order;
// expiry of each window with its failure mode and its timing (len ticks of
// its clock after it opened, plus at most one clock period of offset); the
// delayed RSTOUT and the return to idle; WDRST and clr clearing a failure
// before the reset; a parameter fault; services while idle being ignored;
// changing a window length through the 0xAAAA / 0x5555 sequence and a
// locked write being ignored; free length writes while INIT is high; the
// register read-back and the FWCLOSED status bit.
module tb_wdt_core;
  import wdt_pkg::*;

  localparam int SWD = 8, FWD = 4, CWD = 4, DLY = 30, PUL = 4;
  localparam logic [15:0] LENS = 16'(3 << 13 | 3 << 10 | 3 << 7);  // 24 ticks each

  logic sysclk = 1'b0, rst_n = 1'b0;
  logic cs = 0, wr = 0, rd = 0, ext_service = 0, init = 1, clr = 0, param_fault = 0;
  logic [15:0] din = '0, dout;
  logic wdfail, rstout, swclk, fwclk, cwclk;
  fail_mode_e fail_mode;
  stage_e stage;
  logic [7:0] swlen, fwlen, cwlen, fw_offset;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 sysclk = ~sysclk;
  always @(posedge sysclk) cyc <= cyc + 1;

  wdt_core #(.SYSCLK_MHZ(1), .KEY_US(20), .OPEN_US(20), .SW_DIV(SWD), .FW_DIV(FWD),
             .CW_DIV(CWD), .RST_DELAY_CYC(DLY), .RST_PULSE_CYC(PUL)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cyc=%0d)", what, cyc);
    end
  endtask

  task automatic wr_reg(input logic [15:0] d);
    @(negedge sysclk);
    cs = 1; wr = 1; din = d;
    @(negedge sysclk);
    cs = 0; wr = 0; din = '0;
  endtask

  task automatic service_bus();
    wr_reg(LENS | 16'h0001);
    @(negedge sysclk);   // WDSRVC pulse, then the window reacts
    @(negedge sysclk);
  endtask

  task automatic init_pulse();
    @(negedge sysclk); init = 1;
    repeat (3) @(negedge sysclk);
    init = 0;
    repeat (5) @(negedge sysclk);
  endtask

  // wait for WDFAIL; returns the cycles waited (or -1)
  task automatic wait_fail(input int max, output int n);
    n = 0;
    while (!wdfail && n < max) begin
      @(negedge sysclk);
      n++;
    end
    if (!wdfail) n = -1;
  endtask

  task automatic read_reg(output logic [15:0] d);
    @(negedge sysclk);
    cs = 1; rd = 1;
    #1 d = dout;
    @(negedge sysclk);
    cs = 0; rd = 0;
  endtask

  initial begin
    repeat (20000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, t;
    logic [15:0] r;
    repeat (2) @(negedge sysclk);
    rst_n = 1;
    repeat (4) @(negedge sysclk);
    check(stage == STG_IDLE && !wdfail, "idle after reset");
    check(swlen == 24 && fwlen == 24 && cwlen == 24, "power-on lengths 24");

    // while INIT is still high the lengths can be written without unlock
    wr_reg(16'(5 << 13 | 3 << 10 | 3 << 7));
    repeat (2) @(negedge sysclk);
    check(fwlen == 64 && swlen == 24, $sformatf("write during INIT: fwlen %0d", fwlen));
    wr_reg(LENS);
    repeat (2) @(negedge sysclk);
    check(fwlen == 24, "second write during INIT");

    // services while idle do nothing
    service_bus();
    check(stage == STG_IDLE, "service while idle ignored");

    // ---- 1: service -> frame -> controller -> frame, then controller expires
    init_pulse();
    check(stage == STG_SERVICE, "INIT fall opens the service window");
    repeat (40) @(negedge sysclk);
    service_bus();
    check(stage == STG_FRAME, "service closes service window, frame opens");
    repeat (50) @(negedge sysclk);
    service_bus();
    check(stage == STG_CTRL, "service in frame window opens controller window");
    repeat (60) @(negedge sysclk);
    ext_service = 1; @(negedge sysclk); ext_service = 0;
    repeat (2) @(negedge sysclk);
    check(stage == STG_FRAME, "external service restarts the frame window");
    service_bus();
    check(stage == STG_CTRL, "frame serviced again");
    check(!wdfail, "no failure while serviced in time");
    wait_fail(200, n);
    check(n >= 24 * CWD - 4 && n <= 24 * CWD + CWD + 2,
          $sformatf("controller window expired after %0d cycles, expected %0d..%0d",
                    n, 24 * CWD - 4, 24 * CWD + CWD + 2));
    check(fail_mode == FM_CTRL, "failure mode CTRL");
    read_reg(r);
    check(r[3] && r[6:4] == 3'(FM_CTRL) && r[15:7] == LENS[15:7], $sformatf("read-back %h", r));
    check(r[2], "FWCLOSED set: the frame window was closed by a service");
    // reset follows
    t = 0;
    while (!rstout && t < 100) begin @(negedge sysclk); t++; end
    check(t >= DLY - 3 && t <= DLY + 2, $sformatf("RSTOUT %0d cycles after read-back", t));
    repeat (PUL + 2) @(negedge sysclk);
    read_reg(r);
    check(!r[2], "FWCLOSED cleared by the earlier read");
    check(!rstout && !wdfail && stage == STG_IDLE, "idle again after the reset pulse");
    check(fail_mode == FM_CTRL, "failure mode kept after the reset");

    // ---- 2: service window expires
    init_pulse();
    wait_fail(400, n);
    check(n >= 24 * SWD - 10 && n <= 24 * SWD + SWD + 2,
          $sformatf("service window expired after %0d cycles", n));
    check(fail_mode == FM_SERVICE, "failure mode SERVICE");
    // WDRST before the reset: no RSTOUT
    wr_reg(LENS | 16'h0002);
    repeat (2) @(negedge sysclk);
    check(!wdfail && stage == STG_IDLE, "WDRST clears the failure");
    begin
      bit saw;
      saw = 0;
      repeat (DLY + 10) begin @(negedge sysclk); if (rstout) saw = 1; end
      check(!saw, "no reset after WDRST");
    end

    // ---- 3: frame window expires, cleared by clr
    init_pulse();
    service_bus();
    check(stage == STG_FRAME, "frame open");
    wait_fail(200, n);
    check(n >= 24 * FWD - 4 && n <= 24 * FWD + FWD + 2,
          $sformatf("frame window expired after %0d cycles", n));
    check(fail_mode == FM_FRAME, "failure mode FRAME");
    check(fw_offset < 8'(FWD), $sformatf("frame offset %0d below one FWCLK period", fw_offset));
    @(negedge sysclk); clr = 1; @(negedge sysclk); clr = 0;
    @(negedge sysclk);
    check(!wdfail, "clr clears the failure");

    // ---- 4: parameter fault
    param_fault = 1;
    repeat (4) @(negedge sysclk);
    check(!wdfail, "parameter fault ignored while idle");
    init_pulse();
    check(wdfail && fail_mode == FM_PARAM, "parameter fault while a window is open");
    param_fault = 0;
    clr = 1; @(negedge sysclk); clr = 0;
    @(negedge sysclk);

    // ---- 5: change SWLEN to 4 ticks through the unlock sequence
    wr_reg(LENS & ~16'(7 << 10));             // locked: ignored
    repeat (2) @(negedge sysclk);
    check(swlen == 24, "locked length write ignored");
    wr_reg(16'hAAAA);
    wr_reg(16'h5555);
    wr_reg(LENS & ~16'(7 << 10));             // SWLEN select 0
    repeat (2) @(negedge sysclk);
    check(swlen == 4 && fwlen == 24, $sformatf("unlocked write: swlen %0d", swlen));
    check(stage == STG_IDLE && !wdfail, "unlock patterns are not commands");
    init_pulse();
    wait_fail(100, n);
    check(n >= 0 && n <= 4 * SWD + SWD, $sformatf("short service window expired after %0d", n));
    check(fail_mode == FM_SERVICE, "short window failure mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

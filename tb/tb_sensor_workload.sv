// tb_sensor_workload: the sensor-monitoring workload on the whole design at
// its default parameters. Three sets of readings are applied, each from a
// fresh INIT and with every check enabled:
//   A  pressure 0x80, temp 0xD0, heat 0x2A: pressure is over its limit, so
//      the watchdog must fail in the service window (sensor mode) and issue
//      RSTOUT after the grace time; dataout reads 0.
//   B  pressure 0x00, temp 0x10, heat 0x6A: all within limits; software
//      services through several frame and controller windows, no failure,
//      no reset, and dataout shows 0x00, 0x10 and 0x6A in turn.
//   C  pressure 0xC7, temp 0x80, heat 0xD4: pressure over its limit again;
//      the failure must come at once, with RSTOUT still low.
// In set B the temperature check is also switched off and on to show that
// a reading is only checked while its enable is set.
module tb_sensor_workload;
  import wdt_pkg::*;

  localparam logic [15:0] LENS = 16'(3 << 13 | 3 << 10 | 3 << 7);

  logic sysclk = 1'b0, sysreset = 1'b1;
  logic init = 1, clr = 0, cs = 0, rd = 0, wr = 0;
  logic [15:0] dbus_i = '0, dbus_o;
  logic wdfail, rstout, swclk, fwclk, cwclk;
  logic [2:0] fail_mode;
  logic [1:0] stage;
  logic [7:0] swlen, fwlen, cwlen, fw_offset, dataout;
  logic enable1 = 1, enable2 = 1, enable3 = 1;
  logic [7:0] pressure, temp, heat;
  logic prog_sel = 0, fi_enable = 0;
  logic [7:0] fi_pc;
  logic [15:0] fi_inject_count, fi_detect_count;
  logic [3:0] task_pulse = '0;
  logic [3:0][47:0] task_data;
  logic [3:0] task_spare, task_err;
  logic [3:0][15:0] task_spare_count;
  int checks = 0, failures = 0;

  always #10 sysclk = ~sysclk;

  proposed_application dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr_reg(input logic [15:0] d);
    @(negedge sysclk);
    cs = 1; wr = 1; dbus_i = d;
    @(negedge sysclk);
    cs = 0; wr = 0; dbus_i = '0;
  endtask

  task automatic service();
    wr_reg(LENS | 16'h0001);
    repeat (3) @(negedge sysclk);
  endtask

  task automatic start(input logic [7:0] p, input logic [7:0] t, input logic [7:0] h);
    @(negedge sysclk);
    clr = 1; init = 1; pressure = p; temp = t; heat = h;
    @(negedge sysclk);
    clr = 0;
    repeat (3) @(negedge sysclk);
    init = 0;
    repeat (6) @(negedge sysclk);
  endtask

  initial begin
    repeat (100000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    pressure = 0; temp = 0; heat = 0;
    repeat (3) @(negedge sysclk);
    sysreset = 0;
    repeat (10) @(negedge sysclk);

    // ---- A
    start(8'h80, 8'hD0, 8'h2A);
    check(wdfail && fail_mode == 3'(FM_PARAM), "A: pressure 0x80 fails");
    check(!rstout, "A: no reset yet");
    check(dataout == 8'h00, "A: dataout 0 on a failed reading");
    n = 0;
    while (!rstout && n < 3000) begin @(negedge sysclk); n++; end
    check(rstout && n > 1000 && n < 1040, $sformatf("A: RSTOUT after %0d cycles", n));
    repeat (30) @(negedge sysclk);

    // ---- B
    start(8'h00, 8'h10, 8'h6A);
    check(!wdfail && stage == 2'(STG_SERVICE), "B: service window open, no failure");
    check(dataout == 8'h00, "B: dataout shows pressure");
    repeat (300) @(negedge sysclk);
    service();
    check(stage == 2'(STG_FRAME) && dataout == 8'h10, "B: frame window, dataout shows temp");
    for (int i = 0; i < 9; i++) begin
      repeat (200) @(negedge sysclk);
      service();
      check(!wdfail, "B: no failure");
      if (stage == 2'(STG_CTRL)) check(dataout == 8'h6A, "B: controller window, dataout shows heat");
    end
    // heat check while in frame, then temp over limit with its check disabled
    check(stage == 2'(STG_CTRL), "B: ends in a controller window");
    service();
    enable2 = 0; temp = 8'hD0;
    repeat (20) @(negedge sysclk);
    check(!wdfail && dataout == 8'h00, "B: disabled check passes an over-limit reading");
    enable2 = 1;
    repeat (3) @(negedge sysclk);
    check(wdfail && fail_mode == 3'(FM_PARAM), "B: re-enabled check catches it");
    check(!rstout, "B: no reset within the grace time");
    temp = 8'h10;

    // ---- C
    start(8'hC7, 8'h80, 8'hD4);
    check(wdfail && !rstout, "C: pressure 0xC7 fails, reset not yet issued");
    check(swlen == 8'd24 && fwlen == 8'd24 && cwlen == 8'd24, "C: window lengths unchanged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wdt_down_counter: raises WDFAIL and checks the exact cycle RSTOUT rises
// (DELAY_CYC + 1 cycles after WDFAIL is first applied at a clock edge), its
// PULSE_CYC-cycle width and the `done` pulse; then checks that dropping
// WDFAIL during the delay cancels the reset, and that a flag held high
// after the reset does not issue a second one.
module tb_wdt_down_counter;
  localparam int DELAY = 20, PULSE = 4;

  logic sysclk = 1'b0, rst_n = 1'b0, wdfail = 1'b0;
  logic rstout, done;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 sysclk = ~sysclk;
  always @(posedge sysclk) cyc <= cyc + 1;

  wdt_down_counter #(.DELAY_CYC(DELAY), .PULSE_CYC(PULSE)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cyc=%0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (2000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_fail, t_rise, width, t_done;
    repeat (2) @(negedge sysclk);
    rst_n = 1;
    repeat (3) @(negedge sysclk);

    wdfail = 1;
    @(posedge sysclk);
    t_fail = cyc + 1;    // number of the posedge that first sees WDFAIL
    t_rise = -1; width = 0; t_done = -1;
    repeat (DELAY + PULSE + 10) begin
      @(negedge sysclk);
      if (rstout && t_rise < 0) t_rise = cyc;
      if (rstout) width++;
      if (done) t_done = cyc;
    end
    check(t_rise - t_fail == DELAY + 1,
          $sformatf("RSTOUT %0d cycles after WDFAIL, expected %0d", t_rise - t_fail, DELAY + 1));
    check(width == PULSE, $sformatf("RSTOUT width %0d expected %0d", width, PULSE));
    check(t_done == t_rise + PULSE, $sformatf("done at %0d expected %0d", t_done, t_rise + PULSE));
    // flag still high: no second reset
    begin
      bit saw;
      saw = 0;
      repeat (DELAY + 10) begin
        @(negedge sysclk);
        if (rstout) saw = 1;
      end
      check(!saw, "one reset per failure");
    end
    wdfail = 0;
    repeat (3) @(negedge sysclk);

    // cancel during the delay
    wdfail = 1;
    repeat (DELAY / 2) @(negedge sysclk);
    wdfail = 0;
    begin
      bit saw;
      saw = 0;
      repeat (DELAY + PULSE + 5) begin
        @(negedge sysclk);
        if (rstout) saw = 1;
      end
      check(!saw, "cleared flag cancels the reset");
    end

    // arms again after a cancel
    wdfail = 1;
    begin
      bit saw;
      saw = 0;
      repeat (DELAY + 5) begin
        @(negedge sysclk);
        if (rstout) saw = 1;
      end
      check(saw, "reset after a new failure");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

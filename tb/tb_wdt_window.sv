// tb_wdt_window: one window with a window-clock tick every DIV = 4 SYSCLK
// cycles (cycles c with c mod 4 == 3). For starts at every phase of the
// tick and several lengths it checks, from a cycle count worked out in the
// testbench, that the offset equals the cycles from the start to the first
// tick, that `expired` comes exactly len ticks after that first tick, and
// that a service closes the window in the next cycle with no expiry later.
// Also checks cancel and the length-0 rule.
module tb_wdt_window;
  localparam int DIV = 4;

  logic sysclk = 1'b0, rst_n = 1'b0;
  logic cancel = 0, start = 0, service = 0, tick;
  logic [7:0] len = 8'd3;
  logic open, closed, expired;
  logic [7:0] count, offset;
  int checks = 0, failures = 0;
  int cyc = 0;          // number of posedges since reset release

  always #5 sysclk = ~sysclk;
  always @(posedge sysclk) if (rst_n) cyc <= cyc + 1;
  // tick is high during posedge number c when c mod DIV == DIV-1
  assign tick = rst_n && ((cyc + 1) % DIV == DIV - 1);

  wdt_window dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cyc=%0d)", what, cyc);
    end
  endtask

  // start in the next posedge; returns at the negedge after it with the
  // number of that posedge
  task automatic do_start(output int s);
    @(negedge sysclk);
    start = 1;
    @(negedge sysclk);
    start = 0;
    s = cyc;
  endtask

  initial begin
    repeat (20000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, t0, t_exp, t_seen;
    repeat (2) @(negedge sysclk);
    rst_n = 1;

    // expiry, every start phase, several lengths
    for (int l = 1; l <= 5; l += 2) begin
      for (int ph = 0; ph < DIV; ph++) begin
        len = 8'(l);
        repeat (ph) @(negedge sysclk);
        do_start(s);
        t0 = s + 1;
        while (t0 % DIV != DIV - 1) t0++;
        t_exp = t0 + l * DIV;
        t_seen = -1;
        while (cyc <= t_exp + 2 * DIV) begin
          if (expired && t_seen < 0) t_seen = cyc;
          @(negedge sysclk);
        end
        check(t_seen == t_exp, $sformatf("len %0d phase %0d: expired after posedge %0d, expected %0d",
                                         l, ph, t_seen, t_exp));
        check(offset == 8'(t0 - s - 1), $sformatf("offset %0d expected %0d", offset, t0 - s - 1));
        check(!open, "closed after expiry");
      end
    end

    // service in the run phase: closed next cycle, no expiry
    len = 8'd4;
    do_start(s);
    repeat (7) @(negedge sysclk);
    check(open && count != 0, "window running");
    service = 1;
    @(negedge sysclk);
    service = 0;
    check(closed && !open, "closed pulse after service");
    @(negedge sysclk);
    check(!closed, "closed is one cycle");
    begin
      bit saw;
      saw = 0;
      repeat (6 * DIV) begin
        @(negedge sysclk);
        if (expired) saw = 1;
      end
      check(!saw, "no expiry after service");
    end

    // service during alignment also closes
    do_start(s);
    while ((cyc + 1) % DIV == DIV - 1) @(negedge sysclk);
    service = 1;
    @(negedge sysclk);
    service = 0;
    check(closed, "service before the first window edge closes the window");

    // cancel
    do_start(s);
    repeat (6) @(negedge sysclk);
    cancel = 1;
    @(negedge sysclk);
    cancel = 0;
    check(!open && !closed && !expired, "cancel ends the window silently");
    begin
      bit saw;
      saw = 0;
      repeat (8 * DIV) begin
        @(negedge sysclk);
        if (expired || open) saw = 1;
      end
      check(!saw, "nothing after cancel");
    end

    // length 0 behaves as 1
    len = 8'd0;
    do_start(s);
    t0 = s + 1;
    while (t0 % DIV != DIV - 1) t0++;
    t_seen = -1;
    while (cyc <= t0 + 3 * DIV) begin
      if (expired && t_seen < 0) t_seen = cyc;
      @(negedge sysclk);
    end
    check(t_seen == t0 + DIV, $sformatf("len 0: expired at %0d expected %0d", t_seen, t0 + DIV));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

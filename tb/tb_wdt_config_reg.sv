// tb_wdt_config_reg: register-level test. The unlock inputs (is_key, len_we)
// are driven directly. Checks the power-on lengths, free writes while INIT is
// high, locked and unlocked later writes, writes flagged as keys, the WDSRVC
// and WDRST pulses and their timing, the read-back of every field, and the
// FWCLOSED status bit (set by a pulse, cleared by a read). Expected
// lengths come from the table written out below, not from the package.
module tb_wdt_config_reg;
  import wdt_pkg::*;

  localparam logic [7:0] LEN_TAB [8] = '{4, 8, 16, 24, 32, 64, 128, 255};

  logic sysclk = 1'b0, rst_n = 1'b0;
  logic cs = 0, wr = 0, rd = 0, is_key = 0, len_we = 0, wdfail = 0, init = 1,
        fw_closed = 0;
  logic [15:0] din = '0, dout;
  fail_mode_e fail_mode = FM_NONE;
  logic wdsrvc, wdrst;
  logic [7:0] fwlen, swlen, cwlen;
  int checks = 0, failures = 0;

  always #5 sysclk = ~sysclk;

  wdt_config_reg dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [15:0] fields(input int f, input int s, input int c);
    return 16'((f << 13) | (s << 10) | (c << 7));
  endfunction

  task automatic wr_reg(input logic [15:0] d);
    @(negedge sysclk);
    cs = 1; wr = 1; din = d;
    @(negedge sysclk);
    cs = 0; wr = 0; din = '0;
  endtask

  task automatic expect_len(input int f, input int s, input int c, input string what);
    check(fwlen == LEN_TAB[f] && swlen == LEN_TAB[s] && cwlen == LEN_TAB[c],
          $sformatf("%s: fw=%0d sw=%0d cw=%0d", what, fwlen, swlen, cwlen));
  endtask

  initial begin
    repeat (1000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic seen_srvc, seen_rst;
    repeat (2) @(negedge sysclk);
    rst_n = 1;
    @(negedge sysclk);
    expect_len(3, 3, 3, "power-on lengths");

    // while INIT is high any write sets the lengths, again and again
    wr_reg(fields(2, 2, 2));
    @(negedge sysclk);
    expect_len(2, 2, 2, "write during init");
    wr_reg(fields(1, 5, 6));
    @(negedge sysclk);
    expect_len(1, 5, 6, "second write during init");
    init = 0;

    // later write without unlock: lengths unchanged
    wr_reg(fields(7, 0, 2));
    @(negedge sysclk);
    expect_len(1, 5, 6, "locked write ignored");

    // with len_we high the write takes effect
    len_we = 1;
    wr_reg(fields(7, 0, 2));
    len_we = 0;
    @(negedge sysclk);
    expect_len(7, 0, 2, "unlocked write");

    // a key write never changes fields even when open
    len_we = 1; is_key = 1;
    wr_reg(16'h5555);
    len_we = 0; is_key = 0;
    @(negedge sysclk);
    expect_len(7, 0, 2, "key write changes nothing");

    // service command: pulse exactly in the cycle after the write
    @(negedge sysclk);
    cs = 1; wr = 1; din = fields(7, 0, 2) | 16'h0001;
    @(posedge sysclk); #1;
    check(wdsrvc && !wdrst, "WDSRVC pulse after service write");
    @(negedge sysclk);
    cs = 0; wr = 0;
    @(posedge sysclk); #1;
    check(!wdsrvc, "WDSRVC is one cycle");

    // restart command
    wr_reg(fields(7, 0, 2) | 16'h0002);
    check(wdrst && !wdsrvc, "WDRST pulse after restart write");
    @(negedge sysclk);
    check(!wdrst, "WDRST is one cycle");

    // key write with bit 0 set issues no service
    seen_srvc = 0;
    is_key = 1;
    wr_reg(16'h5555);
    is_key = 0;
    seen_srvc = wdsrvc;
    check(!seen_srvc, "0x5555 is not a service");

    // read-back
    wdfail = 1; fail_mode = FM_CTRL;
    @(negedge sysclk);
    cs = 1; rd = 1;
    #1 check(dout == (fields(7, 0, 2) | 16'h0038),
             $sformatf("read-back %h", dout));
    rd = 0;
    #1 check(dout == 16'h0000, "dout zero without read");
    cs = 0;

    // FWCLOSED: set by a fw_closed pulse, kept until a read, cleared by it
    @(negedge sysclk);
    fw_closed = 1;
    @(negedge sysclk);
    fw_closed = 0;
    repeat (3) @(negedge sysclk);
    cs = 1; rd = 1;
    #1 check(dout[2] == 1'b1, "FWCLOSED set after the pulse");
    @(negedge sysclk);
    #1 check(dout[2] == 1'b0, "FWCLOSED cleared by the read");
    cs = 0; rd = 0;
    // a pulse during the read cycle is not lost
    @(negedge sysclk);
    cs = 1; rd = 1; fw_closed = 1;
    @(negedge sysclk);
    cs = 0; rd = 0; fw_closed = 0;
    @(negedge sysclk);
    cs = 1; rd = 1;
    #1 check(dout[2] == 1'b1, "pulse in a read cycle kept");
    @(negedge sysclk);
    cs = 0; rd = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

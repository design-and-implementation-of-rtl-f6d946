// tb_wdt_pattern_cmp: drives write sequences into the unlock comparator and
// checks when the length fields become writable. With SYSCLK_MHZ = 1 the
// limits are KEY_US = 10 cycles for the second pattern and OPEN_US = 5
// cycles of open window. Covers: the correct sequence and the exact length
// of the open window, the second pattern at the last allowed cycle and one
// cycle late, the second pattern alone, a stray write between the patterns,
// reversed order, and the is_key flag.
module tb_wdt_pattern_cmp;
  localparam int unsigned KEY_US = 10, OPEN_US = 5;

  logic sysclk = 1'b0, rst_n = 1'b0;
  logic wr_stb = 1'b0;
  logic [15:0] din = '0;
  logic is_key, len_we;
  int checks = 0, failures = 0;

  always #5 sysclk = ~sysclk;

  wdt_pattern_cmp #(.SYSCLK_MHZ(1), .KEY_US(KEY_US), .OPEN_US(OPEN_US)) dut (
    .sysclk, .rst_n, .wr_stb, .din, .is_key, .len_we
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // one write in the next cycle; returns at the negedge after it
  task automatic wr(input logic [15:0] d);
    @(negedge sysclk);
    wr_stb = 1'b1;
    din    = d;
    @(negedge sysclk);
    wr_stb = 1'b0;
    din    = 16'h0123;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge sysclk);
  endtask

  // number of consecutive cycles len_we stays high, from now
  task automatic open_len(output int n);
    n = 0;
    while (len_we && n < 100) begin
      n++;
      @(negedge sysclk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    idle(2);
    rst_n = 1'b1;
    idle(2);
    check(!len_we, "locked after reset");

    // is_key
    din = 16'hAAAA; #1 check(is_key, "is_key for 0xAAAA");
    din = 16'h5555; #1 check(is_key, "is_key for 0x5555");
    din = 16'h5554; #1 check(!is_key, "no is_key for 0x5554");

    // correct sequence, second pattern 4 cycles after the first
    wr(16'hAAAA); idle(2); wr(16'h5555);
    check(len_we, "open after 0xAAAA, 0x5555");
    open_len(n);
    check(n == OPEN_US, $sformatf("open window %0d cycles, expected %0d", n, OPEN_US));
    idle(3);

    // second pattern exactly KEY_US cycles after the first: accepted
    // (wr() itself starts one cycle after it is called, so idle(n) between
    // two wr() calls puts n + 2 cycles between the writes)
    wr(16'hAAAA); idle(KEY_US - 2); wr(16'h5555);
    check(len_we, "second pattern at the last allowed cycle accepted");
    idle(OPEN_US + 2);
    check(!len_we, "locked again after the open window");

    // one cycle late: rejected
    wr(16'hAAAA); idle(KEY_US - 1); wr(16'h5555);
    check(!len_we, "second pattern one cycle late rejected");
    idle(3);

    // second pattern alone
    wr(16'h5555);
    check(!len_we, "0x5555 alone does not unlock");

    // stray write between the patterns
    wr(16'hAAAA); wr(16'h1234); wr(16'h5555);
    check(!len_we, "stray write between the patterns relocks");

    // reversed order
    wr(16'h5555); wr(16'hAAAA);
    check(!len_we, "reversed order does not unlock");
    idle(KEY_US + 2);

    // writes during the open window leave it open
    wr(16'hAAAA); wr(16'h5555); wr(16'hE000);
    check(len_we, "ordinary write keeps the window open");
    idle(OPEN_US + 1);
    check(!len_we, "window closes on time after a write in it");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

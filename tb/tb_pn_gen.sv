// tb_pn_gen: checks the default 16-bit PN generator. The sequence must
// repeat with period exactly 2^16 - 1 (a maximal-length polynomial), never
// reach zero, follow a Fibonacci-form reference of the same polynomial
// on its output bit, and hold when not enabled. A zero seed must be
// replaced by a working one.
module tb_pn_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] state, state0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pn_gen dut (.clk, .rst_n, .en, .state);
  pn_gen #(.SEED('0)) dut0 (.clk, .rst_n, .en, .state(state0));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seed;
    int period;
    bit zero_seen, bit_err;
    logic [15:0] out_hist [32];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    seed = state;
    check(seed == 16'hACE1, "seed after reset");
    check(state0 != 0, "zero seed replaced");
    repeat (3) @(negedge clk);
    check(state == seed, "holds while disabled");

    // period
    en = 1;
    period = 0; zero_seen = 0;
    do begin
      @(negedge clk);
      period++;
      if (state == 0) zero_seen = 1;
    end while (state != seed && period < 70000);
    check(period == 65535, $sformatf("period %0d expected 65535", period));
    check(!zero_seen, "never zero");
    check(state0 != 0, "zero-seed instance never zero");

    // Galois output bit s[0] obeys the linear recurrence of the
    // reciprocal polynomial: o[n+16] = o[n] ^ o[n+2] ^ o[n+3] ^ o[n+5]
    bit_err = 0;
    begin
      logic o [64];
      for (int i = 0; i < 64; i++) begin
        o[i] = state[0];
        @(negedge clk);
      end
      for (int n = 0; n + 16 < 64; n++)
        if (o[n+16] != (o[n] ^ o[n+2] ^ o[n+3] ^ o[n+5])) bit_err = 1;
    end
    check(!bit_err, "output bit follows the polynomial's recurrence");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

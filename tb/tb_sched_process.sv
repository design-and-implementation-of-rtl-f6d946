// tb_sched_process: clk_i has a 10 ns period; pulses are placed 3 ns after
// a clock edge so the two never coincide. The testbench counts clk_i edges
// itself and checks after every pulse that dat_o is the number of clock
// edges since the previous pulse, that prev_count holds the count at the
// pulse, and that err_o is set exactly when no clock edge separated the two
// pulses (pulse rate above clock rate).
module tb_sched_process;
  logic clk_i = 1'b0, pulse_i = 1'b0, rst_ni = 1'b1;
  logic [47:0] dat_o, curr_count, prev_count;
  logic err_o;
  int checks = 0, failures = 0;
  longint edges = 0, last_edges = 0;

  always #5 clk_i = ~clk_i;
  always @(posedge clk_i) if (rst_ni) edges++;

  sched_process dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic pulse(input int hi_ps);
    pulse_i = 1'b1;
    repeat (hi_ps) #1;
    pulse_i = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_ni = 1'b0;   // an edge, so the pulse-domain flops see the reset
    #11 rst_ni = 1'b1;
    for (int i = 0; i < 40; i++) begin
      int gap;
      gap = (i % 7 == 3) ? 0 : 1 + ($urandom % 20);
      @(posedge clk_i);
      repeat (gap > 0 ? gap - 1 : 0) @(posedge clk_i);
      #3;
      if (gap == 0) begin
        // two pulses 2 ns apart, no clock edge between
        pulse(1);
        #1;
        check(err_o == 1'b0 || edges != last_edges, "first pulse of a burst");
        last_edges = edges;
        pulse(1);
        #1;
        check(err_o === 1'b1, "err_o on a pulse with no clock edge since the last");
        check(dat_o == 0, "dat_o zero for back-to-back pulses");
      end else begin
        pulse(2);
        #1;
        check(dat_o == 48'(edges - last_edges),
              $sformatf("dat_o %0d expected %0d", dat_o, edges - last_edges));
        check(err_o === 1'b0, "no error at a slower pulse rate");
        check(prev_count == 48'(edges), $sformatf("prev_count %0d expected %0d", prev_count, edges));
        last_edges = edges;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

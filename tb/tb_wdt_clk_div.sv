// tb_wdt_clk_div: checks the three derived clocks and their ticks against
// the cycle count since reset: after n SYSCLK edges a divider by D must show
// its clock high when (n mod D) < D/2, and its tick exactly when n is a
// positive multiple of D. Small, unequal ratios are used so that a mix-up
// between the outputs shows.
module tb_wdt_clk_div;
  localparam int unsigned D [3] = '{8, 4, 6};

  logic sysclk = 1'b0, rst_n = 1'b0;
  logic [2:0] clk_o, tick_o;
  int checks = 0, failures = 0;
  int n = 0;

  always #5 sysclk = ~sysclk;

  wdt_clk_div #(.SW_DIV(D[0]), .FW_DIV(D[1]), .CW_DIV(D[2])) dut (
    .sysclk, .rst_n,
    .swclk(clk_o[0]), .fwclk(clk_o[1]), .cwclk(clk_o[2]),
    .swclk_tick(tick_o[0]), .fwclk_tick(tick_o[1]), .cwclk_tick(tick_o[2])
  );

  initial begin
    repeat (2000) @(posedge sysclk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    repeat (200) begin
      @(posedge sysclk);
      n++;
      @(negedge sysclk);
      for (int i = 0; i < 3; i++) begin
        logic exp_tick, exp_clk;
        exp_tick = (n % D[i] == 0);
        exp_clk  = (n % D[i]) < (D[i] / 2);
        checks += 2;
        if (tick_o[i] !== exp_tick) begin
          failures++;
          $display("n=%0d div%0d tick=%b expected %b", n, i, tick_o[i], exp_tick);
        end
        if (clk_o[i] !== exp_clk) begin
          failures++;
          $display("n=%0d div%0d clk=%b expected %b", n, i, clk_o[i], exp_clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// wdt_clk_div: frequency divider that derives the slow window clocks from
// SYSCLK.
//
// The watchdog runs its window main counters on derived clocks (SWCLK for
// the service window, FWCLK for the frame window, CWCLK for the controller
// window) that are much slower than SYSCLK, so that few counter bits and
// comparators are needed. Each divider is a free-running counter of SYSCLK
// cycles. Besides the square-wave clock it outputs a one-SYSCLK-cycle tick
// in the cycle where the derived clock rises, so that all logic stays in the
// SYSCLK domain and uses the ticks as clock enables; this single-domain
// scheme and the division ratios are this design's choice (the document
// names the derived clocks but gives no ratios).
//
// Timing: a derived clock is high for the first DIV/2 cycles of every DIV
// SYSCLK cycles; its tick is asserted in the cycle it goes high. After reset
// the first tick comes DIV cycles later.
module wdt_clk_div #(
  parameter int unsigned SW_DIV = 64,
  parameter int unsigned FW_DIV = 16,
  parameter int unsigned CW_DIV = 16
) (
  input  logic sysclk,
  input  logic rst_n,
  output logic swclk,
  output logic fwclk,
  output logic cwclk,
  output logic swclk_tick,
  output logic fwclk_tick,
  output logic cwclk_tick
);

  localparam int unsigned DIV [3] = '{SW_DIV, FW_DIV, CW_DIV};

  logic [2:0] clk_q;
  logic [2:0] tick_q;

  for (genvar i = 0; i < 3; i++) begin : g_div
    localparam int unsigned CW = (DIV[i] > 1) ? $clog2(DIV[i]) : 1;
    logic [CW-1:0] cnt;

    initial assert (DIV[i] >= 2) else $error("divide ratio must be at least 2");

    always_ff @(posedge sysclk or negedge rst_n) begin
      if (!rst_n) begin
        cnt       <= '0;
        tick_q[i] <= 1'b0;
        clk_q[i]  <= 1'b0;
      end else begin
        tick_q[i] <= (cnt == CW'(DIV[i] - 1));
        clk_q[i]  <= (cnt == CW'(DIV[i] - 1)) || (cnt < CW'(DIV[i] / 2 - 1));
        cnt       <= (cnt == CW'(DIV[i] - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

  assign {cwclk, fwclk, swclk}                = clk_q;
  assign {cwclk_tick, fwclk_tick, swclk_tick} = tick_q;

endmodule

// wdt_down_counter: turns the watchdog's fail flag into a reset.
//
// When WDFAIL rises, the counter is loaded with DELAY_CYC and counts down on
// SYSCLK; when it reaches zero it asserts RSTOUT for PULSE_CYC cycles and
// then pulses `done`. The time between the flag and the reset is left to
// software, for example to save debugging information to non-volatile
// memory. If WDFAIL falls before the count ends (software restarted the
// watchdog), no reset is issued. That the delay is a fixed number of SYSCLK
// cycles follows the document; both cycle counts, the pulse form of RSTOUT
// and the cancel on a falling WDFAIL are this design's choices.
//
// Timing: RSTOUT rises DELAY_CYC + 1 cycles after the first cycle WDFAIL is
// seen high, stays high PULSE_CYC cycles, and `done` is high in the cycle
// after it falls.
module wdt_down_counter #(
  parameter int unsigned DELAY_CYC = 1024,
  parameter int unsigned PULSE_CYC = 16
) (
  input  logic sysclk,
  input  logic rst_n,
  input  logic wdfail,
  output logic rstout,
  output logic done
);

  localparam int unsigned MAXC = (DELAY_CYC > PULSE_CYC) ? DELAY_CYC : PULSE_CYC;
  localparam int unsigned CW   = $clog2(MAXC + 1);

  typedef enum logic [1:0] {D_IDLE, D_COUNT, D_RESET, D_WAIT} dstate_e;
  dstate_e       state;
  logic [CW-1:0] cnt;

  assign rstout = (state == D_RESET);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (wdfail) begin
          state <= D_COUNT;
          cnt   <= CW'(DELAY_CYC);
        end
        D_COUNT: begin
          if (!wdfail) begin
            state <= D_IDLE;
          end else if (cnt == '0) begin
            state <= D_RESET;
            cnt   <= CW'(PULSE_CYC - 1);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        D_RESET: begin
          if (cnt == '0) begin
            state <= D_WAIT;
            done  <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        // wait for the flag to be cleared before arming again
        D_WAIT: if (!wdfail) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule

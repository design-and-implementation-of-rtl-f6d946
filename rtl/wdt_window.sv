// wdt_window: one window of the windowed watchdog. The watchdog uses three
// of them: the service window (on SWCLK), the frame window (on FWCLK) and
// the controller window (on CWCLK).
//
// A start request opens the window. Because the window clock is free
// running, the request generally falls between two of its edges: an offset
// counter clocked by SYSCLK counts the cycles from the request to the next
// rising edge of the window clock (the document's "offset up counter"), and
// only then does the main counter, clocked by the slow window clock, begin.
// The main counter needs only LEN_W bits and one comparator against the
// selected length. A service while the window is open stops both counters at
// once and pulses `closed`; if the main counter reaches the length first,
// the window pulses `expired`. Both end the window. The measured offset is
// kept on `offset` until the next start (saturating at its maximum) for
// software or debug use.
//
// The document describes an offset up/down counter pair for the service
// window but says only what the up counter measures; this design has the
// one offset counter per window. The slow clocks arrive as one-cycle ticks
// (see wdt_clk_div).
//
// Interface (SYSCLK domain): start, service, cancel are one-cycle pulses
// (cancel wins, then start, then service). tick is the window clock's rising
// edge. len is the length in window-clock ticks (0 is taken as 1).
// Timing: with the first window-clock edge after start at tick 0, the window
// expires at the len-th edge after it, i.e. len window-clock periods plus the
// offset after start; `closed` and `expired` come in the cycle after the
// service / the final tick.
module wdt_window
  import wdt_pkg::*;
#(
  parameter int unsigned OFS_W = 8
) (
  input  logic             sysclk,
  input  logic             rst_n,
  input  logic             cancel,
  input  logic             start,
  input  logic             tick,
  input  logic [LEN_W-1:0] len,
  input  logic             service,
  output logic             open,       // window open (offset or main phase)
  output logic             closed,     // serviced in time (pulse)
  output logic             expired,    // length reached without service (pulse)
  output logic [LEN_W-1:0] count,      // main counter
  output logic [OFS_W-1:0] offset      // SYSCLK cycles from start to first edge
);

  typedef enum logic [1:0] {W_IDLE, W_ALIGN, W_RUN} wstate_e;
  wstate_e state;

  logic [LEN_W-1:0] len_eff;
  assign len_eff = (len == '0) ? LEN_W'(1) : len;
  assign open    = (state != W_IDLE);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= W_IDLE;
      count   <= '0;
      offset  <= '0;
      closed  <= 1'b0;
      expired <= 1'b0;
    end else begin
      closed  <= 1'b0;
      expired <= 1'b0;
      if (cancel) begin
        state <= W_IDLE;
      end else if (start) begin
        state  <= W_ALIGN;
        count  <= '0;
        offset <= '0;
      end else begin
        unique case (state)
          W_IDLE: ;
          W_ALIGN: begin
            if (service) begin
              state  <= W_IDLE;
              closed <= 1'b1;
            end else if (tick) begin
              state <= W_RUN;
            end else if (offset != '1) begin
              offset <= offset + 1'b1;
            end
          end
          W_RUN: begin
            if (service) begin
              state  <= W_IDLE;
              closed <= 1'b1;
            end else if (tick) begin
              if (count + 1'b1 >= len_eff) begin
                state   <= W_IDLE;
                expired <= 1'b1;
              end
              count <= count + 1'b1;
            end
          end
          default: state <= W_IDLE;
        endcase
      end
    end
  end

  // closed and expired never coincide
  assert property (@(posedge sysclk) disable iff (!rst_n) !(closed && expired));

endmodule

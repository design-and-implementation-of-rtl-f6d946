// wdt_core: windowed watchdog timer built from three cascaded windows.
//
// Operation. A high-to-low transition on INIT opens the service window.
// Software services the watchdog by writing WDSRVC to the configuration
// register. A service inside the service window stops its counters at once
// and starts the frame window, aligned to the next FWCLK edge. A service
// inside the frame window closes it and opens the controller window (on
// CWCLK); a service inside the controller window starts a fresh frame
// window, so that from then on services alternate between frame and
// controller windows and each one resets the frame counters. If any window
// reaches its selected length without a service, or the parameter checker
// reports a value at its limit while a window is open, the watchdog raises
// WDFAIL and records the failure mode. After a fixed time the down counter
// asserts RSTOUT; when that reset pulse ends the watchdog is idle again and
// waits for the next INIT transition. Software may instead clear the failure
// in the time between WDFAIL and RSTOUT with a WDRST write, and `clr` does
// the same from a pin.
//
// Follows the document: the INIT start, the slow derived window clocks, the
// offset counter to the next FWCLK edge, services stopping the counters, the
// guarded length fields (0xAAAA / 0x5555), WDFAIL followed by a delayed
// reset, and a controller window after the frame window. This design's own
// choices: the alternation of frame and controller windows, free length
// writes while INIT is high, services outside an open window being ignored,
// the parameter-fault input, and all clock ratios and cycle counts.
//
// Interface: SYSCLK domain, rst_n asynchronous active low. The bus is the
// register port of wdt_config_reg. INIT is synchronised with two flops, so
// the service window opens 3 SYSCLK cycles after INIT falls (plus the offset
// to the next SWCLK edge).
module wdt_core
  import wdt_pkg::*;
#(
  parameter int unsigned SYSCLK_MHZ    = 50,
  parameter int unsigned KEY_US        = 10,
  parameter int unsigned OPEN_US       = 10,
  parameter int unsigned SW_DIV        = 64,
  parameter int unsigned FW_DIV        = 16,
  parameter int unsigned CW_DIV        = 16,
  parameter int unsigned RST_DELAY_CYC = 1024,
  parameter int unsigned RST_PULSE_CYC = 16
) (
  input  logic              sysclk,
  input  logic              rst_n,
  // register port
  input  logic              cs,
  input  logic              wr,
  input  logic              rd,
  input  logic [DBUS_W-1:0] din,
  output logic [DBUS_W-1:0] dout,
  // extra service source (program-counter model of the fault injector)
  input  logic              ext_service,
  input  logic              init,
  input  logic              clr,
  input  logic              param_fault,
  output logic              wdfail,
  output logic              rstout,
  output fail_mode_e        fail_mode,
  output stage_e            stage,
  output logic [LEN_W-1:0]  swlen,
  output logic [LEN_W-1:0]  fwlen,
  output logic [LEN_W-1:0]  cwlen,
  output logic              swclk,
  output logic              fwclk,
  output logic              cwclk,
  output logic [7:0]        fw_offset
);

  // ---------------- clocks, register, unlock ----------------
  logic [2:0] init_q;
  logic sw_tick, fw_tick, cw_tick;
  logic is_key, len_we, wdsrvc, wdrst, rst_done;
  logic fw_open, fw_closed, fw_expired;

  wdt_clk_div #(.SW_DIV(SW_DIV), .FW_DIV(FW_DIV), .CW_DIV(CW_DIV)) u_div (
    .sysclk, .rst_n, .swclk, .fwclk, .cwclk,
    .swclk_tick(sw_tick), .fwclk_tick(fw_tick), .cwclk_tick(cw_tick)
  );

  wdt_pattern_cmp #(.SYSCLK_MHZ(SYSCLK_MHZ), .KEY_US(KEY_US), .OPEN_US(OPEN_US)) u_cmp (
    .sysclk, .rst_n, .wr_stb(cs && wr), .din, .is_key, .len_we
  );

  wdt_config_reg u_reg (
    .sysclk, .rst_n, .cs, .wr, .rd, .din, .dout, .is_key, .len_we, .init(init_q[1]),
    .fw_closed, .wdfail, .fail_mode, .wdsrvc, .wdrst, .fwlen, .swlen, .cwlen
  );

  // ---------------- INIT edge ----------------
  logic       init_fall;
  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) init_q <= 3'b000;
    else        init_q <= {init_q[1:0], init};
  end
  assign init_fall = init_q[2] && !init_q[1];

  // ---------------- windows ----------------
  logic service, restart, fail_now;
  logic sw_open, sw_closed, sw_expired;
  logic cw_open, cw_closed, cw_expired;
  fail_mode_e fail_cause;

  assign service = wdsrvc || ext_service;
  assign restart = wdrst || clr || rst_done;

  always_comb begin
    fail_cause = FM_NONE;
    if (sw_expired)                            fail_cause = FM_SERVICE;
    else if (fw_expired)                       fail_cause = FM_FRAME;
    else if (cw_expired)                       fail_cause = FM_CTRL;
    else if (param_fault && stage != STG_IDLE) fail_cause = FM_PARAM;
  end
  assign fail_now = (fail_cause != FM_NONE);

  wdt_window u_sw (
    .sysclk, .rst_n, .cancel(restart || fail_now),
    .start(init_fall && stage == STG_IDLE && !wdfail),
    .tick(sw_tick), .len(swlen), .service(service && stage == STG_SERVICE),
    .open(sw_open), .closed(sw_closed), .expired(sw_expired),
    .count(), .offset()
  );

  wdt_window u_fw (
    .sysclk, .rst_n, .cancel(restart || fail_now),
    .start(sw_closed || cw_closed),
    .tick(fw_tick), .len(fwlen), .service(service && stage == STG_FRAME),
    .open(fw_open), .closed(fw_closed), .expired(fw_expired),
    .count(), .offset(fw_offset)
  );

  wdt_window u_cw (
    .sysclk, .rst_n, .cancel(restart || fail_now),
    .start(fw_closed),
    .tick(cw_tick), .len(cwlen), .service(service && stage == STG_CTRL),
    .open(cw_open), .closed(cw_closed), .expired(cw_expired),
    .count(), .offset()
  );

  // ---------------- stage and fail flag ----------------
  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      stage     <= STG_IDLE;
      wdfail    <= 1'b0;
      fail_mode <= FM_NONE;
    end else if (restart) begin
      stage  <= STG_IDLE;
      wdfail <= 1'b0;
    end else if (fail_now) begin
      stage     <= STG_IDLE;
      wdfail    <= 1'b1;
      fail_mode <= fail_cause;
    end else if (init_fall && stage == STG_IDLE && !wdfail) begin
      stage <= STG_SERVICE;
    end else if (sw_closed || cw_closed) begin
      stage <= STG_FRAME;
    end else if (fw_closed) begin
      stage <= STG_CTRL;
    end
  end

  wdt_down_counter #(.DELAY_CYC(RST_DELAY_CYC), .PULSE_CYC(RST_PULSE_CYC)) u_dcnt (
    .sysclk, .rst_n, .wdfail, .rstout, .done(rst_done)
  );

  // at most one window is open at a time
  assert property (@(posedge sysclk) disable iff (!rst_n)
    $onehot0({sw_open, fw_open, cw_open}));

endmodule

// wdt_pkg: types and constants shared by the windowed watchdog and its
// surroundings.
//
// The watchdog is programmed through one 16-bit configuration register. Its
// window-length fields FWLEN, SWLEN and CWLEN do not hold a length; they pick
// one of eight lengths hard-coded in the design (win_len below), as the
// design intends ("the possible sets of window lengths are hard-coded").
// The two unlock patterns 0xAAAA and 0x5555 are the design's own. The eight
// table values, the field widths and the bit positions are this design's
// choice.
//
// Register map (16 bits):
//   [15:13] FWLEN  frame window length select        (RW, guarded)
//   [12:10] SWLEN  service window length select      (RW, guarded)
//   [9:7]   CWLEN  controller window length select   (RW, guarded)
//   [6:4]   failure mode of the last failure          (RO, fail_mode_e)
//   [3]     WDFAIL                                    (RO)
//   [2]     reserved, reads 0
//   [1]     WDRST  write 1: abort and restart the watchdog
//   [0]     WDSRVC write 1: service the watchdog
// A write whose data equals an unlock pattern is taken by the pattern
// comparator only and is never decoded as a command.
package wdt_pkg;

  localparam int unsigned DBUS_W = 16;
  localparam int unsigned SEL_W  = 3;   // width of FWLEN / SWLEN / CWLEN
  localparam int unsigned LEN_W  = 8;   // window length in window-clock ticks

  localparam logic [DBUS_W-1:0] UNLOCK_KEY1 = 16'hAAAA;
  localparam logic [DBUS_W-1:0] UNLOCK_KEY2 = 16'h5555;

  // Register bit positions
  localparam int unsigned FWLEN_LSB = 13;
  localparam int unsigned SWLEN_LSB = 10;
  localparam int unsigned CWLEN_LSB = 7;
  localparam int unsigned FMODE_LSB = 4;
  localparam int unsigned WDFAIL_BIT = 3;
  localparam int unsigned FWCLOSED_BIT = 2;
  localparam int unsigned WDRST_BIT  = 1;
  localparam int unsigned WDSRVC_BIT = 0;

  // Selections in force after power-on (24 ticks for every window)
  localparam logic [SEL_W-1:0] FWLEN_RESET = 3'd3;
  localparam logic [SEL_W-1:0] SWLEN_RESET = 3'd3;
  localparam logic [SEL_W-1:0] CWLEN_RESET = 3'd3;

  // Which window is open
  typedef enum logic [1:0] {
    STG_IDLE    = 2'd0,   // waiting for a high-to-low transition on INIT
    STG_SERVICE = 2'd1,   // service window open
    STG_FRAME   = 2'd2,   // frame window open
    STG_CTRL    = 2'd3    // controller window open
  } stage_e;

  // Why WDFAIL was raised
  typedef enum logic [2:0] {
    FM_NONE    = 3'd0,
    FM_SERVICE = 3'd1,    // service window expired without a service
    FM_FRAME   = 3'd2,    // frame window expired without a service
    FM_CTRL    = 3'd3,    // controller window expired without a service
    FM_PARAM   = 3'd4     // a checked sensor parameter reached its limit
  } fail_mode_e;

  // Hard-coded window lengths, in ticks of the window's own clock.
  function automatic logic [LEN_W-1:0] win_len(input logic [SEL_W-1:0] sel);
    unique case (sel)
      3'd0: win_len = 8'd4;
      3'd1: win_len = 8'd8;
      3'd2: win_len = 8'd16;
      3'd3: win_len = 8'd24;
      3'd4: win_len = 8'd32;
      3'd5: win_len = 8'd64;
      3'd6: win_len = 8'd128;
      default: win_len = 8'd255;
    endcase
  endfunction

endpackage

// wdt_config_reg: the watchdog's software-visible configuration register.
//
// Holds the three window-length selects FWLEN, SWLEN and CWLEN, decodes the
// service (WDSRVC) and restart (WDRST) commands, and shows the fail flag and
// the failure mode reported by the windows. It also keeps FWCLOSED, a status
// bit set when a service closes the frame window and cleared when software
// reads the register. The bit map is in wdt_pkg.
//
// The length fields take the value of any ordinary write while the pattern
// comparator's len_we is high. While INIT is high (the system is still
// initialising and the watchdog has not been started) they can be written
// without the unlock sequence: the document lets software configure the
// window periods during initialisation and draws INIT into the register,
// and asks for the unlock sequence in order to change the lengths. Writes
// carrying an unlock pattern (is_key) change no field and issue no command.
//
// Interface: a write is cs && wr for one SYSCLK cycle; a read returns the
// register on dout combinationally while cs && rd, and FWCLOSED is cleared
// by the clock edge that ends the read cycle (a new fw_closed pulse in that
// cycle wins). init must already be synchronised to SYSCLK. wdsrvc and wdrst
// are one-cycle pulses in the cycle after the write. The length outputs are the
// selected lengths in window-clock ticks, registered.
module wdt_config_reg
  import wdt_pkg::*;
(
  input  logic              sysclk,
  input  logic              rst_n,
  input  logic              cs,
  input  logic              wr,
  input  logic              rd,
  input  logic [DBUS_W-1:0] din,
  output logic [DBUS_W-1:0] dout,
  input  logic              is_key,     // from the pattern comparator
  input  logic              len_we,     // from the pattern comparator
  input  logic              init,       // INIT level, synchronised
  input  logic              fw_closed,  // pulse: frame window closed
  input  logic              wdfail,
  input  fail_mode_e        fail_mode,
  output logic              wdsrvc,
  output logic              wdrst,
  output logic [LEN_W-1:0]  fwlen,
  output logic [LEN_W-1:0]  swlen,
  output logic [LEN_W-1:0]  cwlen
);

  logic [SEL_W-1:0] fw_sel, sw_sel, cw_sel;
  logic             cmd_wr;
  logic             fwc_q;

  assign cmd_wr = cs && wr && !is_key;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      fw_sel     <= FWLEN_RESET;
      sw_sel     <= SWLEN_RESET;
      cw_sel     <= CWLEN_RESET;
      wdsrvc     <= 1'b0;
      wdrst      <= 1'b0;
      fwc_q      <= 1'b0;
    end else begin
      if (fw_closed)     fwc_q <= 1'b1;
      else if (cs && rd) fwc_q <= 1'b0;
      wdsrvc <= cmd_wr && din[WDSRVC_BIT];
      wdrst  <= cmd_wr && din[WDRST_BIT];
      if (cmd_wr && (len_we || init)) begin
        fw_sel     <= din[FWLEN_LSB +: SEL_W];
        sw_sel     <= din[SWLEN_LSB +: SEL_W];
        cw_sel     <= din[CWLEN_LSB +: SEL_W];
      end
    end
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      fwlen <= win_len(FWLEN_RESET);
      swlen <= win_len(SWLEN_RESET);
      cwlen <= win_len(CWLEN_RESET);
    end else begin
      fwlen <= win_len(fw_sel);
      swlen <= win_len(sw_sel);
      cwlen <= win_len(cw_sel);
    end
  end

  always_comb begin
    dout = '0;
    if (cs && rd) begin
      dout[FWLEN_LSB +: SEL_W] = fw_sel;
      dout[SWLEN_LSB +: SEL_W] = sw_sel;
      dout[CWLEN_LSB +: SEL_W] = cw_sel;
      dout[FMODE_LSB +: 3]     = fail_mode;
      dout[WDFAIL_BIT]         = wdfail;
      dout[FWCLOSED_BIT]       = fwc_q;
    end
  end

endmodule

// wdt_pattern_cmp: unlock sequence that guards the window-length fields of
// the configuration register.
//
// To change the window lengths, software writes 0xAAAA and then 0x5555 to
// the configuration register. The second pattern must follow the first
// within KEY_US microseconds; after it, the length fields stay writable for
// OPEN_US microseconds. Any other order or a late second pattern leaves them
// locked. The patterns and both 10 us limits are the design's own. That a
// wrong write between the two patterns relocks, and that 0xAAAA always
// (re)starts the sequence, are this design's choices.
//
// Interface: wr_stb is a one-cycle write strobe on the SYSCLK domain with its
// data on din. len_we is high while the length fields may be written.
// is_key is high (combinationally) when the current write carries either
// pattern, so that the register does not decode it as a command.
//
// Timing: len_we rises in the cycle after the 0x5555 write and stays high
// for OPEN_US * SYSCLK_MHZ cycles. The 0x5555 write is accepted if it comes
// no more than KEY_US * SYSCLK_MHZ cycles after the 0xAAAA write.
module wdt_pattern_cmp
  import wdt_pkg::*;
#(
  parameter int unsigned SYSCLK_MHZ = 50,
  parameter int unsigned KEY_US     = 10,
  parameter int unsigned OPEN_US    = 10
) (
  input  logic              sysclk,
  input  logic              rst_n,
  input  logic              wr_stb,
  input  logic [DBUS_W-1:0] din,
  output logic              is_key,
  output logic              len_we
);

  localparam int unsigned KEY_CYC  = KEY_US * SYSCLK_MHZ;
  localparam int unsigned OPEN_CYC = OPEN_US * SYSCLK_MHZ;
  localparam int unsigned MAX_CYC  = (KEY_CYC > OPEN_CYC) ? KEY_CYC : OPEN_CYC;
  localparam int unsigned TW       = $clog2(MAX_CYC + 1);

  typedef enum logic [1:0] {LOCKED, ARMED, OPEN} state_e;

  state_e        state;
  logic [TW-1:0] timer;   // cycles left in ARMED or OPEN

  logic wr_key1, wr_key2;
  assign wr_key1 = wr_stb && (din == UNLOCK_KEY1);
  assign wr_key2 = wr_stb && (din == UNLOCK_KEY2);
  assign is_key  = (din == UNLOCK_KEY1) || (din == UNLOCK_KEY2);
  assign len_we  = (state == OPEN);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOCKED;
      timer <= '0;
    end else if (wr_key1) begin
      state <= ARMED;
      timer <= TW'(KEY_CYC - 1);
    end else begin
      unique case (state)
        LOCKED: ;
        ARMED: begin
          if (wr_key2) begin
            state <= OPEN;
            timer <= TW'(OPEN_CYC);
          end else if (wr_stb || timer == '0) begin
            state <= LOCKED;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        OPEN: begin
          if (timer == TW'(1)) state <= LOCKED;
          timer <= timer - 1'b1;
        end
        default: state <= LOCKED;
      endcase
    end
  end

endmodule

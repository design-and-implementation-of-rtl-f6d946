// fault_injector: random program-counter fault injection for testing the
// watchdog.
//
// A small program model stands for the software under watch: its program
// counter (PC) advances by one every SYSCLK cycle through an incrementer,
// and the program services the watchdog each time the PC passes SERVICE_PC,
// i.e. every 2^PC_W cycles. A multiplexer in front of the PC normally
// selects the incrementer. A random pulse, taken from a second PN sequence
// generator, switches the multiplexer for one cycle to the random fault
// generator (a first PN generator), so that the PC jumps to a random value,
// as a fault in the program flow would. A jump forward brings the next
// service earlier, a jump backward delays it and may make the watchdog fail.
// Two counters record how many faults were injected and how many of them the
// watchdog detected (WDFAIL rising while an injected fault is outstanding).
//
// The multiplexer, incrementer, the two PN generators and the detection
// counter are the document's. The program model (a PC that services at
// SERVICE_PC), the pulse rate and the counter widths are this design's
// choices. The random pulse fires when the low PULSE_BITS bits of the second
// PN generator are all ones, about once every 2^PULSE_BITS cycles.
//
// Interface: sys_reset (the watchdog's RSTOUT) restarts the program: PC goes
// to 0 and `init` is held high, and falls in the cycle after sys_reset ends,
// which starts the watchdog. After rst_n the same happens once. `enable`
// gates injection only; the program runs either way.
module fault_injector #(
  parameter int unsigned  PC_W       = 8,
  parameter logic [PC_W-1:0] SERVICE_PC = '1,
  parameter int unsigned  PULSE_BITS = 8,
  parameter int unsigned  CNT_W      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             sys_reset,
  input  logic             wdfail,
  output logic [PC_W-1:0]  pc,
  output logic             service,
  output logic             init,
  output logic             inject,
  output logic [CNT_W-1:0] inject_count,
  output logic [CNT_W-1:0] detect_count
);

  logic [15:0] rnd_fault, rnd_pulse;
  logic [PC_W-1:0] pc_inc, pc_next;
  logic pending, wdfail_q;

  pn_gen #(.SEED(16'hACE1)) u_fault_gen (.clk, .rst_n, .en(1'b1), .state(rnd_fault));
  pn_gen #(.SEED(16'h1D2B)) u_pulse_gen (.clk, .rst_n, .en(1'b1), .state(rnd_pulse));

  assign inject  = enable && !sys_reset && !init && (rnd_pulse[PULSE_BITS-1:0] == '1);
  assign pc_inc  = pc + 1'b1;                             // incrementer
  assign pc_next = inject ? rnd_fault[PC_W-1:0] : pc_inc;  // multiplexer
  assign service = !init && (pc == SERVICE_PC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      init <= 1'b1;
    end else if (sys_reset) begin
      pc   <= '0;
      init <= 1'b1;
    end else begin
      init <= 1'b0;
      if (!init) pc <= pc_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= 1'b0;
      wdfail_q     <= 1'b0;
      inject_count <= '0;
      detect_count <= '0;
    end else begin
      wdfail_q <= wdfail;
      if (inject) inject_count <= inject_count + 1'b1;
      if (wdfail && !wdfail_q && pending) begin
        detect_count <= detect_count + 1'b1;
        pending      <= 1'b0;
      end else if (inject) begin
        pending <= 1'b1;
      end else if (sys_reset) begin
        pending <= 1'b0;
      end
    end
  end

endmodule

// proposed_application: top level. A windowed watchdog guards a small FPGA
// system: sensor readings checked window by window, a program whose flow can
// be disturbed by injected faults, and a core of four scheduled processes
// each followed by a spare block feeding the embedded task.
//
// Blocks and wiring:
//   wdt_core        windowed watchdog: register port (cs/rd/wr/dbus), INIT,
//                   service / frame / controller windows, WDFAIL, RSTOUT.
//   param_checker   checks pressure, temp and heat, one per open window;
//                   a reading over its limit makes the watchdog fail.
//   fault_injector  program model whose PC can be made to jump by a random
//                   pulse. With prog_sel high it drives the watchdog's INIT
//                   and services it; with fi_enable high it injects faults.
//                   RSTOUT restarts it. Its counters report faults injected
//                   and detected.
//   sched_process   x4, the scheduling processes of the core, clocked by
//                   sysclk and measuring the task pulse trains task_pulse.
//   sbi_spare       x4, one spare block per process, in the four directions
//                   around the embedded task; each supplies stored data when
//                   its process errs or the watchdog fails.
// The embedded task process itself, the CPU that runs the software, and the
// peripherals around the core are outside this design; their connections
// are ports.
//
// The port names sysclk, sysreset, init, clr, enable1..3, pressure, temp,
// heat, dataout, swlen, fwlen, cwlen, wdfail and rstout follow the
// document's top-level symbol. There the window clocks are inputs; here they
// are made inside by the frequency divider, as the document's block diagram
// shows, and brought out as outputs. sysreset is active high and
// asynchronous; everything else is synchronous to sysclk.
module proposed_application
  import wdt_pkg::*;
#(
  parameter int unsigned SYSCLK_MHZ    = 50,
  parameter int unsigned KEY_US        = 10,
  parameter int unsigned OPEN_US       = 10,
  parameter int unsigned SW_DIV        = 64,
  parameter int unsigned FW_DIV        = 16,
  parameter int unsigned CW_DIV        = 16,
  parameter int unsigned RST_DELAY_CYC = 1024,
  parameter int unsigned RST_PULSE_CYC = 16,
  parameter int unsigned PC_W          = 8,
  parameter int unsigned PULSE_BITS    = 8,
  parameter int unsigned DAT_W         = 48,
  parameter int unsigned N_PROC        = 4
) (
  input  logic                        sysclk,
  input  logic                        sysreset,
  // watchdog
  input  logic                        init,
  input  logic                        clr,
  input  logic                        cs,
  input  logic                        rd,
  input  logic                        wr,
  input  logic [DBUS_W-1:0]           dbus_i,
  output logic [DBUS_W-1:0]           dbus_o,
  output logic                        wdfail,
  output logic                        rstout,
  output logic [2:0]                  fail_mode,
  output logic [1:0]                  stage,
  output logic [LEN_W-1:0]            swlen,
  output logic [LEN_W-1:0]            fwlen,
  output logic [LEN_W-1:0]            cwlen,
  output logic                        swclk,
  output logic                        fwclk,
  output logic                        cwclk,
  output logic [7:0]                  fw_offset,
  // sensor parameters
  input  logic                        enable1,
  input  logic                        enable2,
  input  logic                        enable3,
  input  logic [7:0]                  pressure,
  input  logic [7:0]                  temp,
  input  logic [7:0]                  heat,
  output logic [7:0]                  dataout,
  // fault injection
  input  logic                        prog_sel,
  input  logic                        fi_enable,
  output logic [PC_W-1:0]             fi_pc,
  output logic [15:0]                 fi_inject_count,
  output logic [15:0]                 fi_detect_count,
  // core process
  input  logic [N_PROC-1:0]           task_pulse,
  output logic [N_PROC-1:0][DAT_W-1:0] task_data,
  output logic [N_PROC-1:0]           task_spare,
  output logic [N_PROC-1:0]           task_err,
  output logic [N_PROC-1:0][15:0]     task_spare_count
);

  logic       rst_n;
  logic       param_fault, fi_service, fi_init;
  stage_e     stage_w;
  fail_mode_e fail_mode_w;

  assign rst_n     = !sysreset;
  assign stage     = stage_w;
  assign fail_mode = fail_mode_w;

  wdt_core #(
    .SYSCLK_MHZ(SYSCLK_MHZ), .KEY_US(KEY_US), .OPEN_US(OPEN_US),
    .SW_DIV(SW_DIV), .FW_DIV(FW_DIV), .CW_DIV(CW_DIV),
    .RST_DELAY_CYC(RST_DELAY_CYC), .RST_PULSE_CYC(RST_PULSE_CYC)
  ) u_wdt (
    .sysclk, .rst_n, .cs, .wr, .rd, .din(dbus_i), .dout(dbus_o),
    .ext_service(prog_sel && fi_service),
    .init(prog_sel ? fi_init : init),
    .clr, .param_fault, .wdfail, .rstout, .fail_mode(fail_mode_w), .stage(stage_w),
    .swlen, .fwlen, .cwlen, .swclk, .fwclk, .cwclk, .fw_offset
  );

  param_checker u_chk (
    .clk(sysclk), .rst_n, .stage(stage_w), .pressure, .temp, .heat,
    .enable1, .enable2, .enable3, .param_fault, .dataout
  );

  fault_injector #(.PC_W(PC_W), .PULSE_BITS(PULSE_BITS)) u_fi (
    .clk(sysclk), .rst_n, .enable(fi_enable && prog_sel), .sys_reset(rstout),
    .wdfail, .pc(fi_pc), .service(fi_service), .init(fi_init), .inject(),
    .inject_count(fi_inject_count), .detect_count(fi_detect_count)
  );

  for (genvar p = 0; p < N_PROC; p++) begin : g_core
    logic [DAT_W-1:0] dat;
    logic             err;

    sched_process #(.W(DAT_W)) u_proc (
      .clk_i(sysclk), .pulse_i(task_pulse[p]), .rst_ni(rst_n),
      .dat_o(dat), .err_o(err), .curr_count(), .prev_count()
    );

    sbi_spare #(.W(DAT_W)) u_sbi (
      .clk(sysclk), .rst_n, .data_i(dat), .err_i(err), .fail_i(wdfail),
      .data_o(task_data[p]), .spare_o(task_spare[p]),
      .spare_count(task_spare_count[p])
    );

    assign task_err[p] = err;
  end

endmodule

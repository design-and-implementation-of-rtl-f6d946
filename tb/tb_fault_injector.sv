// tb_fault_injector: runs the injector with a 4-bit PC and a random pulse
// about once in 8 cycles, next to a cycle-level reference written here: two
// Galois LFSRs with the same polynomial and seeds, a PC that increments or
// takes the fault value on a pulse, and the detection rule. Every cycle it
// compares PC, service, init and inject; at the end the injection and
// detection counts. The testbench raises WDFAIL at random times and pulses
// sys_reset to restart the program. Also checks that nothing is injected
// while disabled.
module tb_fault_injector;
  localparam int PC_W = 4, PULSE_BITS = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 0, sys_reset = 0, wdfail = 0;
  logic [PC_W-1:0] pc;
  logic service, init, inject;
  logic [15:0] inject_count, detect_count;
  int checks = 0, failures = 0;

  // reference
  logic [15:0] m_fault = 16'hACE1, m_pulse = 16'h1D2B;
  logic [PC_W-1:0] m_pc = '0;
  logic m_init = 1'b1, m_pending = 1'b0, m_wdfail_q = 1'b0;
  int m_inj = 0, m_det = 0;

  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return (s >> 1) ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  function automatic logic m_inject_f();
    return enable && !sys_reset && !m_init && (m_pulse[PULSE_BITS-1:0] == '1);
  endfunction

  always #5 clk = ~clk;

  fault_injector #(.PC_W(PC_W), .PULSE_BITS(PULSE_BITS)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    logic inj;
    inj = m_inject_f();
    if (inj) m_inj++;
    if (wdfail && !m_wdfail_q && m_pending) begin
      m_det++;
      m_pending = 1'b0;
    end else if (inj) m_pending = 1'b1;
    else if (sys_reset) m_pending = 1'b0;
    m_wdfail_q = wdfail;
    if (sys_reset) begin
      m_pc = '0; m_init = 1'b1;
    end else begin
      if (!m_init) m_pc = inj ? m_fault[PC_W-1:0] : m_pc + 1'b1;
      m_init = 1'b0;
    end
    m_fault = lfsr_step(m_fault);
    m_pulse = lfsr_step(m_pulse);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    check(pc == m_pc, $sformatf("pc %0d expected %0d", pc, m_pc));
    check(init == m_init, "init");
    check(service == (!m_init && m_pc == '1), "service at the last PC value");
    check(inject == m_inject_f(), "inject");
  end

  initial begin
    bit init_fell;
    int n_srv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(init, "init high out of reset");
    @(negedge clk);
    check(!init, "init falls after reset");

    // disabled: no injection, plain counting, one service per 16 cycles
    n_srv = 0;
    repeat (64) begin
      @(negedge clk);
      if (service) n_srv++;
    end
    check(n_srv == 4, $sformatf("%0d services in 64 cycles, expected 4", n_srv));
    check(inject_count == 0, "no injection while disabled");

    // enabled, with random WDFAIL pulses and restarts
    enable = 1;
    for (int i = 0; i < 60; i++) begin
      repeat ($urandom % 20) @(negedge clk);
      wdfail = 1;
      repeat (2) @(negedge clk);
      if ($urandom % 2 == 1) begin
        sys_reset = 1;
        repeat (3) @(negedge clk);
        sys_reset = 0;
      end
      wdfail = 0;
    end
    @(negedge clk);
    check(inject_count == 16'(m_inj), $sformatf("inject_count %0d expected %0d", inject_count, m_inj));
    check(detect_count == 16'(m_det), $sformatf("detect_count %0d expected %0d", detect_count, m_det));
    check(m_inj > 20 && m_det > 5 && m_det < m_inj, "enough injections and detections seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

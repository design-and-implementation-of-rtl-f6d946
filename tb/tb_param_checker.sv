// tb_param_checker: for each window stage it checks that only that stage's
// parameter (service: pressure, frame: temp, controller: heat) is tested,
// against limits written out here (0x7F, 0xBF, 0x7F), that the matching
// enable gates the test, that dataout shows the value under test when in
// range and zero otherwise, and that nothing is tested when idle. Includes
// the three sample readings of the reference waveforms.
module tb_param_checker;
  import wdt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  stage_e stage = STG_IDLE;
  logic [7:0] pressure = 0, temp = 0, heat = 0, dataout;
  logic enable1 = 1, enable2 = 1, enable3 = 1, param_fault;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_checker dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic apply(input stage_e s, input logic [7:0] p, input logic [7:0] t,
                       input logic [7:0] h, input logic [2:0] en);
    logic [7:0] v, lim;
    logic       e, exp_fault;
    @(negedge clk);
    stage = s; pressure = p; temp = t; heat = h;
    {enable3, enable2, enable1} = en;
    @(negedge clk);
    case (s)
      STG_SERVICE: begin v = p; lim = 8'h7F; e = en[0]; end
      STG_FRAME:   begin v = t; lim = 8'hBF; e = en[1]; end
      STG_CTRL:    begin v = h; lim = 8'h7F; e = en[2]; end
      default:     begin v = 0; lim = 8'hFF; e = 0;     end
    endcase
    exp_fault = e && (v > lim);
    check(param_fault == exp_fault,
          $sformatf("stage %s p=%h t=%h h=%h en=%b: fault %b expected %b",
                    s.name(), p, t, h, en, param_fault, exp_fault));
    check(dataout == ((e && !exp_fault) ? v : 8'h00),
          $sformatf("stage %s: dataout %h", s.name(), dataout));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // sample readings: 0x80 / 0xD0 / 0x2A
    apply(STG_SERVICE, 8'h80, 8'hD0, 8'h2A, 3'b111);
    check(param_fault, "pressure 0x80 over limit");
    apply(STG_FRAME,   8'h80, 8'hD0, 8'h2A, 3'b111);
    check(param_fault, "temp 0xD0 over limit");
    apply(STG_CTRL,    8'h80, 8'hD0, 8'h2A, 3'b111);
    check(!param_fault && dataout == 8'h2A, "heat 0x2A in range");
    // 0x00 / 0x10 / 0x6A pass everywhere
    apply(STG_SERVICE, 8'h00, 8'h10, 8'h6A, 3'b111);
    apply(STG_FRAME,   8'h00, 8'h10, 8'h6A, 3'b111);
    apply(STG_CTRL,    8'h00, 8'h10, 8'h6A, 3'b111);
    check(!param_fault && dataout == 8'h6A, "heat 0x6A passes");
    // pressure 0xC7 fails
    apply(STG_SERVICE, 8'hC7, 8'h80, 8'hD4, 3'b111);
    check(param_fault, "pressure 0xC7 over limit");
    // boundaries and random values
    apply(STG_SERVICE, 8'h7F, 8'hFF, 8'hFF, 3'b111);
    apply(STG_FRAME,   8'hFF, 8'hBF, 8'hFF, 3'b111);
    apply(STG_FRAME,   8'h00, 8'hC0, 8'h00, 3'b111);
    apply(STG_CTRL,    8'hFF, 8'hFF, 8'h80, 3'b111);
    apply(STG_IDLE,    8'hFF, 8'hFF, 8'hFF, 3'b111);
    check(!param_fault, "nothing checked when idle");
    for (int i = 0; i < 200; i++) begin
      stage_e s;
      s = stage_e'($urandom % 4);
      apply(s, 8'($urandom), 8'($urandom), 8'($urandom), 3'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sbi_spare: feeds data words and error events into one spare block and
// checks: a stable word reaches data_o three cycles later and is kept as
// the good word; on a process error or a watchdog failure the block
// switches to the stored good word with spare_o high and counts one event;
// live data is ignored while the malfunction lasts; it returns to live data
// afterwards; a word that changes every cycle is never stored.
module tb_sbi_spare;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [47:0] data_i = '0, data_o;
  logic err_i = 0, fail_i = 0, spare_o;
  logic [15:0] spare_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbi_spare dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] good;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // latency of a stable word
    data_i = 48'h1234_5678_9ABC;
    repeat (2) @(negedge clk);
    check(data_o != data_i, "not yet after 2 cycles");
    @(negedge clk);
    check(data_o == data_i, "passed after 3 cycles");
    check(!spare_o, "no spare in normal operation");
    good = data_i;

    // process error: spare data
    data_i = 48'hDEAD_0000_0001;
    err_i  = 1;
    repeat (3) @(negedge clk);
    check(spare_o, "spare_o on process error");
    check(data_o == good, $sformatf("spare data %h expected %h", data_o, good));
    data_i = 48'hDEAD_0000_0002;
    repeat (4) @(negedge clk);
    check(data_o == good, "live data ignored during malfunction");
    check(spare_count == 1, $sformatf("spare_count %0d expected 1", spare_count));
    err_i = 0;
    repeat (4) @(negedge clk);
    check(!spare_o && data_o == 48'hDEAD_0000_0002, "back to live data");
    good = data_o;

    // watchdog failure
    fail_i = 1;
    data_i = 48'h0BAD;
    repeat (2) @(negedge clk);
    check(spare_o && data_o == good, "spare data on WDFAIL");
    fail_i = 0;
    repeat (4) @(negedge clk);
    check(spare_count == 2, $sformatf("spare_count %0d expected 2", spare_count));
    check(data_o == 48'h0BAD, "live again after WDFAIL");

    // a word that never settles is not taken
    for (int i = 0; i < 8; i++) begin
      data_i = 48'(i * 3 + 100);
      @(negedge clk);
    end
    check(data_o == 48'h0BAD, "changing word not stored");
    data_i = 48'h0777;
    repeat (4) @(negedge clk);
    check(data_o == 48'h0777, "settled word taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sched_process: one scheduled process of the core: it measures the period
// of a pulse train in clock cycles and flags pulses that come faster than
// the clock.
//
// Two processes make it up, as in the document's schematic: one, clocked by
// clk_i, counts clock cycles in curr_count; the other, clocked by pulse_i,
// saves curr_count in prev_count at every pulse and puts the number of clock
// cycles since the previous pulse on dat_o. If two pulses arrive with no
// clock edge between them (curr_count has not moved), the pulse rate is
// higher than the clock rate and err_o is set for that pulse. The 48-bit
// data width, the port names and err_o's meaning follow the document; the
// active-low asynchronous reset is this design's addition.
//
// Timing: dat_o and err_o change at the rising edge of pulse_i. curr_count
// is read across clock domains, as in the original; a pulse within a
// flip-flop's setup window of a clk_i edge can capture a mixed value, so a
// user with unrelated clocks should feed curr_count through a Gray code or
// synchroniser.
module sched_process #(
  parameter int unsigned W = 48
) (
  input  logic         clk_i,
  input  logic         pulse_i,
  input  logic         rst_ni,
  output logic [W-1:0] dat_o,
  output logic         err_o,
  output logic [W-1:0] curr_count,
  output logic [W-1:0] prev_count
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) curr_count <= '0;
    else         curr_count <= curr_count + 1'b1;
  end

  always_ff @(posedge pulse_i or negedge rst_ni) begin
    if (!rst_ni) begin
      prev_count <= '0;
      dat_o      <= '0;
      err_o      <= 1'b0;
    end else begin
      prev_count <= curr_count;
      dat_o      <= curr_count - prev_count;
      err_o      <= (curr_count == prev_count);
    end
  end

endmodule

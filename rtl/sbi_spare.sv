// sbi_spare: spare block interface (SBI) between one scheduling process and
// the embedded task process.
//
// In normal operation the block passes the process's data word on to the
// task and keeps a copy of the last good word as temporary storage. When a
// malfunction is reported, either by the process itself (its error flag) or
// by the watchdog (WDFAIL), the block stops passing the live data and
// supplies the stored word as spare data instead, with `spare_o` high, so
// that the task keeps running on the last trusted value. It also counts the
// times it stepped in. The document says the spare blocks give scheduling
// help with temporary storage space and spare data when a malfunction
// occurs; how they do it (hold-last-good substitution) is this design's
// choice. The "delay clock" help the document also names is not modelled.
//
// Interface: data_i and err_i come from the scheduling process, which may
// run on another clock. Both pass through two flip-flops; a data word is
// taken only when it has been the same for two cycles, so a word caught
// while changing is never stored. data_o, spare_o and spare_count are
// registered on clk. Latency: a stable input reaches data_o 3 cycles later.
module sbi_spare #(
  parameter int unsigned W     = 48,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     data_i,
  input  logic             err_i,
  input  logic             fail_i,
  output logic [W-1:0]     data_o,
  output logic             spare_o,
  output logic [CNT_W-1:0] spare_count
);

  logic [W-1:0] d1, d2, good;
  logic [1:0]   err_s;
  logic         malfunction;

  assign malfunction = err_s[1] || fail_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1          <= '0;
      d2          <= '0;
      err_s       <= '0;
      good        <= '0;
      data_o      <= '0;
      spare_o     <= 1'b0;
      spare_count <= '0;
    end else begin
      d1    <= data_i;
      d2    <= d1;
      err_s <= {err_s[0], err_i};
      if (malfunction) begin
        data_o  <= good;
        spare_o <= 1'b1;
        if (!spare_o) spare_count <= spare_count + 1'b1;
      end else begin
        spare_o <= 1'b0;
        if (d1 == d2) begin
          good   <= d2;
          data_o <= d2;
        end
      end
    end
  end

endmodule

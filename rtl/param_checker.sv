// param_checker: checks the sensor readings (pressure, temperature, heat),
// one per watchdog window.
//
// Each window checks its own parameter: the service window checks pressure,
// the frame window temperature, the controller window heat. The parameter of
// the window that is open is compared with its extreme limit; a value above
// the limit, with that parameter's enable set, raises param_fault, which the
// watchdog turns into WDFAIL. dataout shows the value under check when it is
// within its limit and zero when it is not, or when no window is open or the
// parameter's check is disabled.
//
// The three parameters, their 8-bit width, the enables and the idea that
// each window checks one parameter follow the document. The window-to-
// parameter mapping and the limits are this design's choices; the limits
// (pressure and heat at most 0x7F, temperature at most 0xBF) were picked so
// that the sample readings in the document behave as printed there:
// 0x80/0xD0/0x2A fail, 0x00/0x10/0x6A pass, pressure 0xC7 fails.
//
// Timing: param_fault and dataout are registered, one cycle after the
// inputs or the stage change.
module param_checker
  import wdt_pkg::*;
#(
  parameter logic [7:0] PRESSURE_MAX = 8'h7F,
  parameter logic [7:0] TEMP_MAX     = 8'hBF,
  parameter logic [7:0] HEAT_MAX     = 8'h7F
) (
  input  logic       clk,
  input  logic       rst_n,
  input  stage_e     stage,
  input  logic [7:0] pressure,
  input  logic [7:0] temp,
  input  logic [7:0] heat,
  input  logic       enable1,   // pressure check
  input  logic       enable2,   // temperature check
  input  logic       enable3,   // heat check
  output logic       param_fault,
  output logic [7:0] dataout
);

  logic [7:0] value, limit;
  logic       en;

  always_comb begin
    unique case (stage)
      STG_SERVICE: begin value = pressure; limit = PRESSURE_MAX; en = enable1; end
      STG_FRAME:   begin value = temp;     limit = TEMP_MAX;     en = enable2; end
      STG_CTRL:    begin value = heat;     limit = HEAT_MAX;     en = enable3; end
      default:     begin value = '0;       limit = '1;           en = 1'b0;    end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      param_fault <= 1'b0;
      dataout     <= '0;
    end else begin
      param_fault <= en && (value > limit);
      dataout     <= (en && value <= limit) ? value : '0;
    end
  end

endmodule

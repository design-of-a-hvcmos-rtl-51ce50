// cml_ser: behavioural model of the full-custom current-mode-logic output
// serializer (the last 2:1 stage, double data rate).
//
// Not synthesizable logic on the chip: a full-custom CML cell. The model takes
// the 2-bit output of the serializer on each rising clock edge and drives
// d[1] on the line while the clock is high and d[0] while it is low, so two
// bits leave per clock period (1.6 Gbit/s at 800 MHz, 1.28 Gbit/s at
// 640 MHz). Differential signalling is modelled as a single logic level; the
// output lags by one clock cycle.
module cml_ser (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  output logic       q
);
  logic [1:0] hold;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) hold <= 2'b00;
    else        hold <= d;
  end

  assign q = clk ? hold[1] : hold[0];
endmodule

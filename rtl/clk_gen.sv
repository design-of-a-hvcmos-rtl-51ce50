// clk_gen: clock generation of the readout control unit.
//
// From the 800 MHz input clock the RCU derives 400, 200 and 160 MHz clocks
// with Johnson counters and a little combinational logic, as the chip
// description states. Here:
//   400 MHz  one-stage Johnson counter (toggle flop), output inverted so that
//            its rising edges line up with those of the slower clocks;
//   200 MHz  two-stage Johnson counter (00 01 11 10);
//   160 MHz  three-stage Johnson counter shortened to five states
//            (000 001 011 110 100); its 2/5 duty cycle is widened to 1/2 by
//            OR-ing it with a copy retimed on the falling edge.
// All three rise together every 20 input cycles. A 40 MHz bunch-crossing
// strobe is taken as every fourth 160 MHz cycle (25 ns at 800 MHz).
//
// Besides the clocks, the module outputs one-cycle strobes ce_* that are high
// in the 800 MHz cycle that ends with the rising edge of the matching clock.
// The rest of the periphery in this design is clocked by the 800 MHz clock
// and uses these strobes as clock enables, which keeps it a single timing
// domain with the same edge timing as the divided clocks (a design choice of
// this implementation; the chip clocks its domains directly).
module clk_gen (
  input  logic clk,       // 800 MHz
  input  logic rst_n,
  output logic clk_400,
  output logic clk_200,
  output logic clk_160,
  output logic ce_400,
  output logic ce_200,
  output logic ce_160,
  output logic ce_bc      // bunch crossing strobe (with a ce_160)
);
  logic       q2;
  logic [1:0] j4;
  logic [2:0] j5;
  logic       j5_neg;
  logic [1:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q2   <= 1'b0;
      j4   <= 2'b00;
      j5   <= 3'b000;
      wcnt <= 2'd0;
    end else begin
      q2 <= ~q2;
      j4 <= {j4[0], ~j4[1]};
      j5 <= {j5[1:0], ~j5[2] & ~j5[1]};
      if (ce_160) wcnt <= wcnt + 2'd1;
    end
  end

  // Falling-edge copy used to stretch the divide-by-5 output to 50 % duty.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) j5_neg <= 1'b0;
    else        j5_neg <= j5[1];
  end

  assign clk_400 = ~q2;
  assign clk_200 = j4[1];
  assign clk_160 = j5[1] | j5_neg;

  assign ce_400 = q2;
  assign ce_200 = (j4 == 2'b01);
  assign ce_160 = (j5 == 3'b001);
  assign ce_bc  = ce_160 && (wcnt == 2'd0);
endmodule

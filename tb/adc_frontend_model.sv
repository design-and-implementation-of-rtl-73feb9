// adc_frontend_model: behavioural model (not synthesizable) of the analog
// half of the sigma-delta ADC: a divider that scales the sensed voltage by
// 1/VFS, an RC integrator fed by the divided voltage and by the 1-bit
// feedback, and the comparator that compares the two.
//
// Each rising clock edge the integrator state moves by (vin/VFS - fb), the
// ideal first-order loop; cmp_o is high while the state is positive. With the
// digital half closing the loop the density of ones on fb equals vin/VFS.
module adc_frontend_model #(
  parameter real VFS = 25.0      // input voltage that gives all-ones
) (
  input  logic clk,
  input  real  vin,
  input  logic fb,
  output logic cmp_o
);
  real x = 0.0;

  always @(posedge clk) x <= x + vin / VFS - (fb ? 1.0 : 0.0);

  assign cmp_o = (x > 0.0);
endmodule

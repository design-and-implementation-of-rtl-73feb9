// boost_plant_model: behavioural model (not synthesizable) of the boost
// converter power stage: source E, inductor L with winding resistance RL, the
// switch driven by sw, the diode, output capacitor C and load R.
//
// The switched state equations are integrated with the forward Euler method
// once per rising clock edge, with time step DT:
//   switch closed: dvo/dt = -vo/(R C),            diL/dt = (E - RL iL)/L
//   switch open:   dvo/dt = (iL - vo/R)/C,        diL/dt = (E - vo - RL iL)/L
// The diode stops the inductor current at zero (discontinuous conduction).
// E and R are inputs so that a testbench can step the load.
module boost_plant_model #(
  parameter real L    = 250.0e-6,
  parameter real C    = 100.0e-6,
  parameter real RL   = 0.1,
  parameter real DT   = 5.0e-9,
  parameter real VO0  = 10.0
) (
  input  logic clk,
  input  logic sw,
  input  real  e_in,
  input  real  r_load,
  output real  vo,
  output real  il
);
  real v = VO0;
  real i = 0.0;

  always @(posedge clk) begin
    real dv, di, inew;
    if (sw) begin
      dv = -v / (r_load * C);
      di = (e_in - RL * i) / L;
    end else begin
      dv = (i - v / r_load) / C;
      di = (e_in - v - RL * i) / L;
    end
    inew = i + di * DT;
    if (inew < 0.0) inew = 0.0;
    v <= v + dv * DT;
    i <= inew;
  end

  assign vo = v;
  assign il = i;
endmodule

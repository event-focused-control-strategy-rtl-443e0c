// Behavioural model (not synthesizable) of the power stage and its sensors,
// for simulation only: a synchronous boost converter with a resistive load,
// its inductor-current and output-voltage sensor words, and the
// zero-current comparator.
//
// Every clock (DT seconds) it integrates
//   L dI/dt = Vsw - RS*I,  C dVo/dt = Iout - Vo/R
// (RS lumps the conduction losses of switches and inductor)
// with Vsw = Vi while S1 conducts and Vi - Vo while S2 conducts. During a
// dead-time the body diode that conducts depends on the current sign
// (S2's diode for positive current, S1's for negative); the resonance with
// the switch capacitance is not modelled. The comparator output is high while
// the current is positive and reaches the controller TDET clocks late,
// modelling the sensor and comparator delay t_det. Sensor words: current
// 10 mA/LSB, voltage 0.1 V/LSB. Defaults are those of the 400 V to 800 V
// prototype: 200 uH (three 600 uH branches in parallel), 12 uF output.
module boost_plant_model
  import boost_ctrl_pkg::*;
#(
  parameter real L    = 200.0e-6,
  parameter real C    = 12.0e-6,
  parameter real DT   = 10.0e-9,
  parameter real RS   = 0.2,    // lumped conduction-loss resistance, ohm
  parameter int  TDET = 30
) (
  input  logic     clk,
  input  logic     g1,
  input  logic     g2,
  input  real      vi,        // input (battery) voltage, V
  input  real      r_load,    // load resistance, ohm
  input  real      il_init,   // values loaded while init is high
  input  real      vo_init,
  input  logic     init,
  output real      il_a,      // inductor current, A
  output real      vo_v,      // output voltage, V
  output current_t il_code,
  output volt_t    vo_code,
  output logic     zcd_cmp
);

  logic [TDET-1:0] dly = '0;
  real vsw, iout;

  always @(posedge clk) begin
    if (init) begin
      il_a <= il_init;
      vo_v <= vo_init;
      dly  <= '0;
    end else begin
      if (g1) begin
        vsw = vi; iout = 0.0;
      end else if (g2 || il_a > 0.0) begin
        vsw = vi - vo_v; iout = il_a;
      end else begin
        vsw = vi; iout = 0.0;
      end
      il_a <= il_a + (vsw - RS * il_a) * DT / L;
      vo_v <= vo_v + (iout - vo_v / r_load) * DT / C;
      dly  <= {dly[TDET-2:0], il_a > 0.0};
    end
  end

  always_comb begin
    il_code = current_t'($rtoi(il_a * 100.0));
    vo_code = volt_t'($rtoi(vo_v * 10.0));
    zcd_cmp = dly[TDET-1];
  end

endmodule

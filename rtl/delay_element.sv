// delay_element: BEHAVIOURAL MODEL of the programmable asynchronous delay
// element (not synthesizable logic; the real part is a transistor circuit).
//
// The circuit is a current-starved inverter followed by a plain inverter, so
// the element is non-inverting. In the first stage the current-control
// transistor sits between the PMOS/NMOS switches and splits the output node:
// when the input rises, the internal node is discharged at once through the
// NMOS switch while the output stays at VDD, then the output capacitance is
// discharged at the constant bias current until the second inverter trips.
// A rising edge is therefore delayed by t = C * dV / I_bias. A falling input
// turns the PMOS switch on and recharges the output quickly, so falling edges
// (the return of the array to all-zero) pass after a short fixed delay.
//
// Model: vout follows vin with t_rise = CV_FF_MV / bias_na nanoseconds for a
// rising edge (fF * mV / nA = ns) and T_FALL_PS for a falling edge. The model
// is inertial: a pulse shorter than the pending delay is swallowed.
// With SIGMA_PERMIL > 0 every rising edge draws a fresh, approximately normal
// relative error of that standard deviation (per mille), which models
// process and mismatch variation the way a Monte Carlo run does. The charge
// C*dV and the fall delay are this design's own figures; the analog bias
// voltage V_CS is represented by the bias current it sets, in nA.
//
// Interface: vin, bias_na[BIAS_W-1:0] in; vout out. Timing: rise delay as
// above, at least 1 ps; fall delay T_FALL_PS.
`timescale 1ns / 1ps
module delay_element #(
  parameter int unsigned BIAS_W       = 16,
  parameter int unsigned CV_FF_MV     = 4500,  // C_out * voltage swing, fF*mV
  parameter int unsigned T_FALL_PS    = 20,    // falling-edge delay, ps
  parameter int unsigned SIGMA_PERMIL = 0      // rise-delay sigma, per mille
) (
  input  logic              vin,
  input  logic [BIAS_W-1:0] bias_na,
  output logic              vout
);

  int unsigned ev_id;  // identifies the latest input event (inertial delay)

  initial begin
    ev_id = 0;
    vout  = 1'b0;
  end

  // Approximately normal sample (mean 0, sigma 1): sum of 12 uniforms - 6
  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom() % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic real rise_delay_ns(logic [BIAS_W-1:0] i_na);
    real t;
    if (i_na == '0) t = 1.0e6;  // no bias current: the edge never arrives in practice
    else            t = real'(CV_FF_MV) / real'(i_na);
    if (SIGMA_PERMIL != 0) t = t * (1.0 + gauss() * real'(SIGMA_PERMIL) / 1000.0);
    if (t < 0.001) t = 0.001;
    return t;
  endfunction

  always @(vin) begin
    ev_id = ev_id + 1;
    fork
      automatic int unsigned my_id = ev_id;
      automatic logic        level = vin;
      automatic real         t = level ? rise_delay_ns(bias_na) : real'(T_FALL_PS) / 1000.0;
      begin
        #(t);
        if (my_id == ev_id) vout = level;
      end
    join_none
  end

endmodule

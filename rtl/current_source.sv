// current_source: BEHAVIOURAL MODEL of the op-amp based bias current source
// (analog; not synthesizable logic).
//
// An op-amp pins a fixed reference voltage across an off-chip variable
// resistor, so the resistor alone sets the current, largely independent of
// process and supply. The resulting bias is mirrored to every delay element
// of one delay class across the whole array. Three replicas exist, one per
// independent delay (indel, match, mismatch), each with its own resistor.
//
// Model: bias_na = VREF_MV * 1000 / res_kohm (mV / kOhm = uA, times 1000 gives
// nA), updated whenever the resistor setting changes, with a settling time of
// T_SETTLE_NS. A zero resistor setting is treated as open (no current). The
// reference voltage and settling time are this design's own figures; with the
// default delay-element charge, 100 kOhm gives a 1 ns delay unit, and the
// resistor range covers the order of magnitude of dynamic range the delay
// elements are meant for.
//
// Interface: res_kohm[RES_W-1:0] in (digital stand-in for the off-chip
// resistor); bias_na[BIAS_W-1:0] out (stand-in for the bias/cascode voltages).
`timescale 1ns / 1ps
module current_source #(
  parameter int unsigned RES_W       = 16,
  parameter int unsigned BIAS_W      = 16,
  parameter int unsigned VREF_MV     = 450,
  parameter int unsigned T_SETTLE_NS = 5
) (
  input  logic [RES_W-1:0]  res_kohm,
  output logic [BIAS_W-1:0] bias_na
);

  function automatic logic [BIAS_W-1:0] current_na(logic [RES_W-1:0] r);
    longint unsigned i;
    if (r == '0) return '0;
    i = (longint'(VREF_MV) * 1000) / longint'(r);
    if (i > (64'd1 << BIAS_W) - 1) i = (64'd1 << BIAS_W) - 1;
    return BIAS_W'(i);
  endfunction

  logic [BIAS_W-1:0] target;

  always_comb target = current_na(res_kohm);

  // Power-up: the output settles once to whatever the resistor is at time 0
  initial begin
    bias_na = '0;
    #(T_SETTLE_NS);
    bias_na = target;
  end

  // Later changes settle after T_SETTLE_NS; the value taken is the one
  // present at the end of the settling time.
  always @(target) begin
    #(T_SETTLE_NS);
    bias_na = target;
  end

endmodule

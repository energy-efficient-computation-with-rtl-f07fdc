// race_or3: the "pass the first" gate at the head of every unit cell.
//
// In an OR-type race the node output rises as soon as the first of its
// three inputs (top, left, diagonal) has risen, which computes the minimum
// of the three arrival times. The transistor-level gate is a NOR with three
// series PMOS stacks, each stack using the inputs in a different order so
// that every input sees the same position once, plus an output inverter; this
// symmetry equalises the input-to-output delay on all three paths. In RTL the
// function is a plain 3-input OR with no delay of its own.
// The gate and its symmetric structure follow the original circuit; giving it
// zero delay (all timing lives in the delay elements) is this model's choice.
//
// Interface: a (top), b (left), c (diagonal) in; y out. Purely combinational.
`timescale 1ns / 1ps
module race_or3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic nor_n;  // internal NOR node of the symmetric gate

  always_comb begin
    nor_n = ~(a | b | c);
    y     = ~nor_n;
  end

endmodule

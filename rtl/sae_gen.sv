`timescale 1ps/1ps
// sae_gen: behavioural model of the sense-amplifier enable generator
// (an AND gate, an inverter delay chain and a buffer; the delay is its
// function, so it carries a # delay).
//
// SAE = delayed(phi2 & wr_n): the sense amplifiers fire only in the access
// phase of a read, T_SAE after phi2 rises, which leaves the selected cell time
// to develop a bitline differential before the latch is isolated and fired.
// The delayed term is ANDed with the undelayed one, so SAE rises late but
// falls as soon as phi2 falls, before the next precharge starts.
//
// Interface: phi2, wr_n (inverse of the latched write enable), sae.
// Timing: sae rises T_SAE after phi2 & wr_n rises and falls with it.
// T_SAE defaults to the 38 ps measured from phi2 to SAE in the original
// circuit (its design target was 75-100 ps). Making the falling edge
// undelayed is this model's choice.
module sae_gen #(
  parameter int unsigned T_SAE = 38   // ps
) (
  input  logic phi2,
  input  logic wr_n,
  output logic sae
);
  logic arm, arm_d;
  assign arm = phi2 & wr_n;           // ANDmin
  assign #(T_SAE) arm_d = arm;        // inverter delay chain and buffer
  assign sae = arm & arm_d;
endmodule

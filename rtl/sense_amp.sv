`timescale 1ps/1ps
// sense_amp: behavioural model of the isolated latch-type sense amplifier.
//
// Two PMOS pass devices, on while SAE is low, connect BL and BLb to the
// internal nodes of a cross-coupled inverter pair, so while SAE is low the
// internal node on the BL side simply follows BL. When SAE rises the pass
// devices open, isolating the latch from the heavy bitlines, and the NMOS
// footer (enabled by en = not Wr) lets the latch regenerate: it resolves to 1
// if BL is above BLb and to 0 if BLb is above BL, and holds that until SAE
// falls. With no differential at the firing edge the previous decision is
// kept (a real latch would resolve by its offset). The output is the BL-side
// node through a tri-state buffer enabled by en; q_oe reports that enable.
//
// Interface: bl, blb, sae, en in; q, q_oe out.
// Timing: decision taken on the rising edge of sae; q = decision while sae
// is high, q = bl while sae is low. The topology follows the original
// circuit; the two-state resolution rule is this model's choice.
module sense_amp (
  input  logic bl,
  input  logic blb,
  input  logic sae,
  input  logic en,
  output logic q,
  output logic q_oe
);
  logic decision;

  always_ff @(posedge sae) begin
    if (en && (bl != blb)) decision <= bl;
  end

  assign q    = sae ? decision : bl;
  assign q_oe = en;
endmodule

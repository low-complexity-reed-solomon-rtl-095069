// rs_compensator: the common shortened-code compensator of the key-equation
// solver.
//
// For a shortened code n = 255 - io, Chien search must start at position
// n-1, i.e. evaluate the polynomials at alpha^(io+1) first. Instead of one
// multiplier per coefficient at the input of the Chien block, each
// coefficient Lambda_j or Omega_j is multiplied once, as it becomes valid,
// by (alpha^io)^j. The block has exactly two multipliers: one scales the
// selected coefficient by the running power `comp`, the other advances
// comp <- comp * alpha^io when `step` is pulsed. `init` sets comp to 1
// (the value for j = 0). A step and an init in the same cycle: init wins.
//
// Interface: sel_omega chooses the Omega input (1) or the Lambda input (0);
// coef_out = selected coefficient * comp, combinational. comp changes on the
// clock edge after `step`; it is internal and seen only through coef_out. The multiplexer, the two multipliers and the
// comp register follow the document's common-compensator figure.
module rs_compensator
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  gf_t  alpha_io,   // alpha^(255-n), fixed for the codeword
  input  logic init,
  input  logic step,
  input  logic sel_omega,
  input  gf_t  lam_in,
  input  gf_t  omg_in,
  output gf_t  coef_out
);
  gf_t comp;   // (alpha^io)^j for the coefficient being scaled

  always_comb coef_out = gf_mul(sel_omega ? omg_in : lam_in, comp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     comp <= 8'd1;
    else if (init)  comp <= 8'd1;
    else if (step)  comp <= gf_mul(comp, alpha_io);
  end
endmodule

// cf_pe: elementary processing element of the context-formation window.
//
// One PE sits on each sample position of the window and turns the registers
// of that sample into the significance it contributes to its neighbours:
//   phi_o  - contribution to a pass-1 or pass-2 sample: significant in an
//            upper bit-plane (d-hat) or made significant by pass 1 of this
//            plane (visited, bit 1, pass-1 flag);
//   sig3_o - contribution to a pass-3 sample: also counts a 1 decoded by
//            pass 3 of this plane, which precedes the pass-3 sample;
//   gam_o  - first-refinement indicator;
//   dhn_o  - d-hat of the plane below (d-hat OR decoded bit), only on the
//            PE1 type, which sits in the columns that are handed down.
// TYPE 0 and 1 are samples of the current stripe (PE0, PE1); TYPE 2 (PE2) is
// the sample of the previous stripe's last row, whose cell carries in p1 the
// flag "its first non-zero bit was decoded by pass 1" and is always visited.
// chi_o and gam_o are the cell's own bits, and dhn_o is 0 except on PE1:
// the PE only names them for its neighbours.
// Combinational.
//
// Origin: the three PE types and the significance each one reports follow the
// published context-formation element; the first-refinement flag is kept as
// its own bit here instead of being folded into a special code.
module cf_pe
  import ebcd_pkg::*;
#(
  parameter int TYPE = 0
) (
  input  cell_t cell_i,
  output logic  chi_o,
  output logic  phi_o,
  output logic  sig3_o,
  output logic  gam_o,
  output logic  dhn_o
);
  always_comb begin
    chi_o = cell_i.chi;
    if (TYPE == 2) begin
      phi_o  = cell_i.dh | (cell_i.d & cell_i.p1);
      sig3_o = cell_i.dh | cell_i.d;
      gam_o  = 1'b0;
    end else begin
      phi_o  = cell_i.dh | (cell_i.v & cell_i.d & cell_i.p1);
      sig3_o = cell_i.dh | (cell_i.v & cell_i.d);
      gam_o  = cell_i.gam;
    end
    dhn_o = (TYPE == 1) ? (cell_i.dh | cell_i.d) : 1'b0;
  end
endmodule

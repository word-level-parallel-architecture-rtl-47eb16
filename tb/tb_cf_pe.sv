// tb_cf_pe: exhaustive self-checking test of the context-formation
// processing element, for its three types (sample two columns away, sample
// of the window's own columns, sample of the previous stripe's last row).
//
// Every one of the 128 sample states is applied to each type and the outputs
// are compared with the significance a neighbour must see:
//   - by a pass-1/2 sample: significant in an upper plane, or found
//     significant by pass 1 of this plane (for the previous-stripe row, whose
//     plane is complete, "by pass 1" alone decides);
//   - by a pass-3 sample: significant above, or any 1 already decoded here;
//   - the sign, the first-refinement flag (window types) and, for type 1,
//     the significance handed to the plane below.
// Each output value 0 and 1 is counted and must occur. Cycle watchdog.
module tb_cf_pe;
  import ebcd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 10000) begin
      $display("ERROR watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  cell_t cl;
  logic chi [3], phi [3], sig3 [3], gam [3], dhn [3];

  cf_pe #(.TYPE(0)) u0 (.cell_i(cl), .chi_o(chi[0]), .phi_o(phi[0]), .sig3_o(sig3[0]), .gam_o(gam[0]), .dhn_o(dhn[0]));
  cf_pe #(.TYPE(1)) u1 (.cell_i(cl), .chi_o(chi[1]), .phi_o(phi[1]), .sig3_o(sig3[1]), .gam_o(gam[1]), .dhn_o(dhn[1]));
  cf_pe #(.TYPE(2)) u2 (.cell_i(cl), .chi_o(chi[2]), .phi_o(phi[2]), .sig3_o(sig3[2]), .gam_o(gam[2]), .dhn_o(dhn[2]));

  int checks = 0, failures = 0;
  int seen [2][2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("ERROR %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 2; t++) begin seen[t][0] = 0; seen[t][1] = 0; end
    for (int i = 0; i < 128; i++) begin
      bit e_phi, e_sig3, e_phi2, e_sig32;
      @(negedge clk);
      cl = cell_t'(7'(i));
      #1;
      if (cl.dh) begin e_phi = 1; e_sig3 = 1; end
      else begin
        e_phi  = cl.v && cl.d && cl.p1;
        e_sig3 = cl.v && cl.d;
      end
      e_phi2  = cl.dh || (cl.d && cl.p1);
      e_sig32 = cl.dh || cl.d;
      for (int t = 0; t < 3; t++)
        check(chi[t] == cl.chi, $sformatf("type %0d cl %0d: sign", t, i));
      for (int t = 0; t < 2; t++) begin
        check(phi[t] == e_phi, $sformatf("type %0d cl %0d: pass-1/2 significance", t, i));
        check(sig3[t] == e_sig3, $sformatf("type %0d cl %0d: pass-3 significance", t, i));
        check(gam[t] == cl.gam, $sformatf("type %0d cl %0d: first refinement", t, i));
      end
      check(phi[2] == e_phi2, $sformatf("type 2 cl %0d: pass-1/2 significance", i));
      check(sig3[2] == e_sig32, $sformatf("type 2 cl %0d: pass-3 significance", i));
      check(dhn[1] == (cl.dh || cl.d), $sformatf("type 1 cl %0d: significance handed down", i));
      seen[0][phi[1]]++; seen[1][sig3[1]]++;
    end
    for (int t = 0; t < 2; t++) check(seen[t][0] > 0 && seen[t][1] > 0, "an output never toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_area_model: checks the unit-gate area model of vedic_pkg, and the
// adder group schedule it walks, against the published gate counts of the
// four carry select adders (4 to 128 bits) and of the Vedic multipliers
// built on them (4x4 to 128x128). Units: AND, OR, NOT = 1, XOR = 5,
// 2:1 mux = 4, half adder = 6, full adder = 13.
//
// Two published figures do not follow from their own counting rule, and
// the check allows for exactly those offsets:
//   * the 5-bit modified SQRT group is listed as 113 where the rule
//     (13k-7 RCA + 6k BEC + 4(k+1) mux, k = 5) gives 112. Every 16-bit
//     modified SQRT adder is therefore 1 unit lower here, and the multiplier
//     counts lower by the same units carried through the recursion;
//   * the 64-bit regular linear adder is listed as 1742, twice the 32-bit
//     adder, where 4-bit grouping gives 52 + 15 * 117 = 1807. The 64x64 and
//     128x128 multiplier counts carry that difference.
// It also checks the 16-bit SQRT group boundaries (bits 0, 2, 4, 7, 11).
module tb_area_model;
  import vedic_pkg::*;

  int checks = 0, failures = 0;

  localparam int NSZ = 6;
  localparam int SZ [NSZ] = '{4, 8, 16, 32, 64, 128};

  // Published adder gate counts [kind][size], 16 to 128 bits (4 and 8 bits
  // follow from the 4x4 and 8x8 multiplier counts).
  localparam int PUB_CSLA [4][4] = '{
    '{403, 871, 1742, 3679},   // REG_LINEAR
    '{319, 675, 1387, 2811},   // MOD_LINEAR
    '{434, 868, 1736, 3472},   // REG_SQRT
    '{337, 674, 1348, 2696}    // MOD_SQRT
  };
  // Published multiplier gate counts [kind][size], 4x4 to 128x128.
  localparam longint PUB_VM [4][NSZ] = '{
    '{221, 1392, 6778, 29726, 124131, 507562},
    '{221, 1308, 6190, 26786, 111306, 453658},
    '{314, 1857, 8731, 37529, 155325, 631717},
    '{272, 1563, 7264, 31079, 128361, 521533}
  };

  // Units by which a published adder count exceeds the counting rule.
  function automatic int csla_offset(csla_kind_e kind, int w);
    if (kind == MOD_SQRT && w >= 16) return w / 16;
    if (kind == REG_LINEAR && w == 64) return 2 * csla_area(REG_LINEAR, 32) - csla_area(REG_LINEAR, 64);
    return 0;
  endfunction

  function automatic longint vm_offset(csla_kind_e kind, int n);
    if (n == 2) return 0;
    return 4 * vm_offset(kind, n / 2) + 3 * csla_offset(kind, n);
  endfunction

  task automatic check(string what, longint got, longint expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, expected);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Basic group counts worked in the text (group 2 of each 16-bit adder).
    check("regular 4-bit group",  group_area(1'b0, 4), 117);
    check("regular 2-bit group",  group_area(1'b0, 2), 57);
    check("modified 4-bit group", group_area(1'b1, 4), 89);
    check("modified 2-bit group", group_area(1'b1, 2), 43);

    // 16-bit SQRT schedule.
    check("sqrt groups", csla_num_groups(MOD_SQRT, 16), 5);
    check("sqrt lo 1", csla_group_lo(MOD_SQRT, 16, 1), 2);
    check("sqrt lo 2", csla_group_lo(MOD_SQRT, 16, 2), 4);
    check("sqrt lo 3", csla_group_lo(MOD_SQRT, 16, 3), 7);
    check("sqrt lo 4", csla_group_lo(MOD_SQRT, 16, 4), 11);

    for (int k = 0; k < 4; k++) begin
      csla_kind_e kind;
      kind = csla_kind_e'(k);
      for (int s = 2; s < NSZ; s++)
        check($sformatf("%s %0d-bit adder", kind.name(), SZ[s]),
              csla_area(kind, SZ[s]) + csla_offset(kind, SZ[s]), PUB_CSLA[k][s-2]);
      for (int s = 0; s < NSZ; s++) begin
        check($sformatf("%s %0dx%0d multiplier", kind.name(), SZ[s], SZ[s]),
              vm_area(kind, SZ[s]) + vm_offset(kind, SZ[s]), PUB_VM[k][s]);
        $display("%-10s %3dx%-3d multiplier: %0d units (published %0d)",
                 kind.name(), SZ[s], SZ[s], vm_area(kind, SZ[s]), PUB_VM[k][s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

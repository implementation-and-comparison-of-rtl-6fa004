// tb_vedic_csla_top: end-to-end test of the four Vedic multipliers side by
// side. Each operand pair is applied once; all four products must equal
// a * b (worked out here with the simulator's own wide multiply). The test
// runs at N = 32 (corner cases, a directed case for C2, and random
// operands); the default N = 128 makes a very large simulation model.
// It counts, per multiplier at its outermost level, how often:
//   - the C1 carry (cross products overflow) was set,
//   - the C2 carry (second adder overflow) was set,
//   - the last group of the first adder selected its carry-in-1 result
//     (second RCA or BEC word),
//   - the same group selected its carry-in-0 result,
// and counts a failure for any of these that never happened.
module tb_vedic_csla_top;
  import vedic_pkg::*;

  localparam int N     = 32;
  localparam int NRAND = 20000;
  localparam int LV    = $clog2(N);
  // index of the last group of an N-bit adder, per architecture
  localparam int LAST_LIN  = csla_num_groups(REG_LINEAR, N) - 1;
  localparam int LAST_SQRT = csla_num_groups(REG_SQRT, N) - 1;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_reg_linear, p_mod_linear, p_reg_sqrt, p_mod_sqrt;
  logic [2*N-1:0] expect_v;
  int checks = 0, failures = 0;

  // [kind][event]: 0 = C1, 1 = C2, 2 = select carry-in-1, 3 = select carry-in-0
  int seen [4][4];
  logic [3:0] c1, c2, sel;

  vedic_csla_top #(.N(N)) dut (
    .a(a), .b(b),
    .p_reg_linear(p_reg_linear), .p_mod_linear(p_mod_linear),
    .p_reg_sqrt(p_reg_sqrt), .p_mod_sqrt(p_mod_sqrt)
  );

  assign c1[0]  = dut.u_vm_reg_linear.g_lvl[LV].g_i[0].g_j[0].g_node.c1;
  assign c1[1]  = dut.u_vm_mod_linear.g_lvl[LV].g_i[0].g_j[0].g_node.c1;
  assign c1[2]  = dut.u_vm_reg_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.c1;
  assign c1[3]  = dut.u_vm_mod_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.c1;
  assign c2[0]  = dut.u_vm_reg_linear.g_lvl[LV].g_i[0].g_j[0].g_node.c2;
  assign c2[1]  = dut.u_vm_mod_linear.g_lvl[LV].g_i[0].g_j[0].g_node.c2;
  assign c2[2]  = dut.u_vm_reg_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.c2;
  assign c2[3]  = dut.u_vm_mod_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.c2;
  assign sel[0] = dut.u_vm_reg_linear.g_lvl[LV].g_i[0].g_j[0].g_node.u_csla1.c[LAST_LIN];
  assign sel[1] = dut.u_vm_mod_linear.g_lvl[LV].g_i[0].g_j[0].g_node.u_csla1.c[LAST_LIN];
  assign sel[2] = dut.u_vm_reg_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.u_csla1.c[LAST_SQRT];
  assign sel[3] = dut.u_vm_mod_sqrt.g_lvl[LV].g_i[0].g_j[0].g_node.u_csla1.c[LAST_SQRT];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string name, logic [2*N-1:0] got);
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h expected %h", name, a, b, got, expect_v);
    end
  endtask

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
    a = x;
    b = y;
    #1;
    expect_v = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    check_one("REG_LINEAR", p_reg_linear);
    check_one("MOD_LINEAR", p_mod_linear);
    check_one("REG_SQRT",   p_reg_sqrt);
    check_one("MOD_SQRT",   p_mod_sqrt);
    for (int k = 0; k < 4; k++) begin
      if (c1[k])  seen[k][0]++;
      if (c2[k])  seen[k][1]++;
      if (sel[k]) seen[k][2]++;
      else        seen[k][3]++;
    end
  endtask

  initial begin
    static string ev [4] = '{"C1 set", "C2 set", "carry-in-1 result selected",
                             "carry-in-0 result selected"};
    static string kn [4] = '{"REG_LINEAR", "MOD_LINEAR", "REG_SQRT", "MOD_SQRT"};
    foreach (seen[k, e]) seen[k][e] = 0;
    apply('1, '1);
    apply('0, '0);
    apply('1, '0);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    // lh + hl = 2^N - 1 exactly (no C1), so adding the upper half of ll
    // overflows CSLA2 and sets C2: a = {2, all ones}, b = all ones.
    apply({(N/2)'(2), {(N/2){1'b1}}}, '1);
    for (int i = 0; i < NRAND; i++) apply(N'($urandom), N'($urandom));
    for (int k = 0; k < 4; k++)
      for (int e = 0; e < 4; e++) begin
        $display("%s: %s %0d times", kn[k], ev[e], seen[k][e]);
        if (seen[k][e] == 0) begin
          failures++;
          $display("FAIL %s: %s never happened", kn[k], ev[e]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

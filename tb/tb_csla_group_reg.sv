// tb_csla_group_reg: group widths 2, 3, 4 and 5 (those of the 16-bit
// adders), each checked exhaustively over a, b and the select carry against
// {co, s} = a + b + sel. Counts how often each select value was seen.
module tb_csla_group_reg;
  int checks = 0, failures = 0;
  int sel_seen [2] = '{0, 0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 2; k <= 5; k++) begin : g_k
    logic [k-1:0] a, b, s;
    logic         sel, co;
    csla_group_reg #(.K(k)) dut (.a(a), .b(b), .sel(sel), .s(s), .co(co));
  end

  task automatic check(int k, int a, int b, int sel, int got);
    checks++;
    sel_seen[sel]++;
    if (got != a + b + sel) begin
      failures++;
      $display("FAIL K=%0d a=%0d b=%0d sel=%0d got %0d", k, a, b, sel, got);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << 5); i++) begin
      {g_k[2].sel, g_k[2].a, g_k[2].b} = 5'(i);
      #1 check(2, int'(g_k[2].a), int'(g_k[2].b), int'(g_k[2].sel), int'({g_k[2].co, g_k[2].s}));
    end
    for (int i = 0; i < (1 << 7); i++) begin
      {g_k[3].sel, g_k[3].a, g_k[3].b} = 7'(i);
      #1 check(3, int'(g_k[3].a), int'(g_k[3].b), int'(g_k[3].sel), int'({g_k[3].co, g_k[3].s}));
    end
    for (int i = 0; i < (1 << 9); i++) begin
      {g_k[4].sel, g_k[4].a, g_k[4].b} = 9'(i);
      #1 check(4, int'(g_k[4].a), int'(g_k[4].b), int'(g_k[4].sel), int'({g_k[4].co, g_k[4].s}));
    end
    for (int i = 0; i < (1 << 11); i++) begin
      {g_k[5].sel, g_k[5].a, g_k[5].b} = 11'(i);
      #1 check(5, int'(g_k[5].a), int'(g_k[5].b), int'(g_k[5].sel), int'({g_k[5].co, g_k[5].s}));
    end
    if (sel_seen[0] == 0 || sel_seen[1] == 0) begin
      failures++;
      $display("FAIL a select value was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

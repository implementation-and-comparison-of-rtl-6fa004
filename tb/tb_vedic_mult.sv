// tb_vedic_mult: the NxN Vedic multiplier with each of the four carry
// select adder architectures. 4x4 and 8x8 are checked for every operand
// pair, 16x16 and 32x32 with corner cases and random operands, all against
// a * b. The C3 output must stay 0. The test also counts, at the outermost
// level of each multiplier, how often the C1 and C2 carries (merged by the
// OR gate) were set; each must have been seen.
module tb_vedic_mult;
  import vedic_pkg::*;

  localparam int NRAND = 3000;
  localparam int NS    = 4;
  localparam int SIZES [NS] = '{4, 8, 16, 32};

  int checks = 0, failures = 0;
  int finished = 0;
  int c1_seen = 0, c2_seen = 0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar kd = 0; kd < 4; kd++) begin : g_kind
    for (genvar si = 0; si < NS; si++) begin : g_n
      localparam int         N    = SIZES[si];
      localparam csla_kind_e KIND = csla_kind_e'(kd);
      localparam int         LV   = $clog2(N);

      logic [N-1:0]   a, b;
      logic [2*N-1:0] p, expect_v;
      logic           c3;

      vedic_mult #(.N(N), .KIND(KIND)) dut (.a(a), .b(b), .p(p), .c3(c3));

      // C1 and C2 of the outermost level
      logic c1_top, c2_top;
      assign c1_top = dut.g_lvl[LV].g_i[0].g_j[0].g_node.c1;
      assign c2_top = dut.g_lvl[LV].g_i[0].g_j[0].g_node.c2;

      function automatic logic [N-1:0] rand_word();
        logic [N-1:0] r;
        for (int i = 0; i < N; i += 32) r[i +: 32 > N ? N : 32] = $urandom;
        return r;
      endfunction

      task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
        a = x;
        b = y;
        #1;
        expect_v = {{N{1'b0}}, x} * {{N{1'b0}}, y};
        checks++;
        if (c1_top) c1_seen++;
        if (c2_top) c2_seen++;
        if (p !== expect_v || c3 !== 1'b0) begin
          failures++;
          $display("FAIL %s N=%0d a=%h b=%h got p=%h c3=%0b expected %h",
                   KIND.name(), N, x, y, p, c3, expect_v);
        end
      endtask

      initial begin
        #1;
        if (N <= 8) begin
          for (int i = 0; i < (1 << N); i++)
            for (int j = 0; j < (1 << N); j++)
              apply(N'(i), N'(j));
        end else begin
          apply('1, '1);
          apply('1, '0);
          apply('0, '1);
          apply('1, {{(N-1){1'b0}}, 1'b1});
          for (int i = 0; i < NRAND; i++) apply(rand_word(), rand_word());
        end
        finished++;
      end
    end
  end

  initial begin
    wait (finished == 4 * NS);
    #1;
    if (c1_seen == 0) begin
      failures++;
      $display("FAIL carry C1 was never set");
    end
    if (c2_seen == 0) begin
      failures++;
      $display("FAIL carry C2 was never set");
    end
    $display("C1 set %0d times, C2 set %0d times", c1_seen, c2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

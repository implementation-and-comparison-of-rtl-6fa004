// tb_csla: every carry select adder architecture (regular/modified,
// linear/square-root) at 4, 8, 16, 32, 64 and 128 bits, checked against
// {cout, sum} = a + b + cin. Each adder gets corner cases (carry rippling
// through every group: a = all ones, b = 0, cin = 1, and a + b = all ones)
// and random operands. The test counts how many checks ended with a carry
// out and how many needed the carry to cross all groups; both must occur.
module tb_csla;
  import vedic_pkg::*;

  localparam int NRAND = 400;
  localparam int NW    = 6;
  localparam int WIDTHS [NW] = '{4, 8, 16, 32, 64, 128};

  int checks = 0, failures = 0;
  int finished = 0;
  int carry_out_seen = 0, full_ripple_seen = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar kd = 0; kd < 4; kd++) begin : g_kind
    for (genvar wi = 0; wi < NW; wi++) begin : g_w
      localparam int         W    = WIDTHS[wi];
      localparam csla_kind_e KIND = csla_kind_e'(kd);

      logic [W-1:0] a, b, sum;
      logic         cin, cout;
      logic [W:0]   expect_v;

      csla #(.WIDTH(W), .KIND(KIND)) dut (
        .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
      );

      function automatic logic [W-1:0] rand_word();
        logic [W-1:0] r;
        for (int i = 0; i < W; i += 32) r[i +: 32 > W ? W : 32] = $urandom;
        return r;
      endfunction

      task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
        a = x;
        b = y;
        cin = c;
        #1;
        expect_v = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
        checks++;
        if (cout) carry_out_seen++;
        if ((x ^ y) == '1 && c) full_ripple_seen++;
        if ({cout, sum} !== expect_v) begin
          failures++;
          $display("FAIL %s W=%0d a=%h b=%h cin=%0b got %h expected %h",
                   KIND.name(), W, x, y, c, {cout, sum}, expect_v);
        end
      endtask

      initial begin
        logic [W-1:0] r;
        #(10 * (kd * NW + wi) + 1);
        apply('1, '0, 1'b1);
        apply('0, '1, 1'b1);
        apply('1, '1, 1'b1);
        apply('0, '0, 1'b0);
        for (int i = 0; i < NRAND; i++) begin
          r = rand_word();
          if (i % 8 == 0) apply(r, ~r, 1'b1);  // carry crosses every group
          else apply(r, rand_word(), 1'($urandom));
        end
        finished++;
      end
    end
  end

  initial begin
    wait (finished == 4 * NW);
    #1;
    if (carry_out_seen == 0) begin
      failures++;
      $display("FAIL no carry out was produced");
    end
    if (full_ripple_seen == 0) begin
      failures++;
      $display("FAIL no carry crossed a whole adder");
    end
    $display("carry out %0d times, full-width carry propagation %0d times",
             carry_out_seen, full_ripple_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

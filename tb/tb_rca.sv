// tb_rca: a 4-bit ripple carry adder checked exhaustively (all a, b, ci)
// and a 16-bit one checked with random operands, both against a + b + ci.
module tb_rca;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        ci4, co4, ci16, co16;
  int checks = 0, failures = 0;

  rca #(.W(4))  dut4  (.a(a4),  .b(b4),  .ci(ci4),  .s(s4),  .co(co4));
  rca #(.W(16)) dut16 (.a(a16), .b(b16), .ci(ci16), .s(s16), .co(co16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL W=4 a=%h b=%h ci=%0b got %h", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 1000; i++) begin
      a16  = 16'($urandom);
      b16  = (i < 10) ? ~a16 : 16'($urandom);  // full carry propagation
      ci16 = 1'($urandom);
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) begin
        failures++;
        $display("FAIL W=16 a=%h b=%h ci=%0b got %h", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

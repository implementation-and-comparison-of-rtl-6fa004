// tb_bec: the 3-bit converter against the published function table
// (B -> X: 000->001, ..., 110->111, 111->000) and a 6-bit converter
// exhaustively against b + 1 modulo 64.
module tb_bec;
  logic [2:0] b3, x3;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  // X for B = 0 .. 7, least significant entry first.
  localparam logic [2:0] TABLE [8] = '{3'b001, 3'b010, 3'b011, 3'b100,
                                       3'b101, 3'b110, 3'b111, 3'b000};

  bec #(.W(3)) dut3 (.b(b3), .x(x3));
  bec #(.W(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      b3 = 3'(i);
      #1;
      checks++;
      if (x3 != TABLE[i]) begin
        failures++;
        $display("FAIL W=3 b=%b x=%b expected %b", b3, x3, TABLE[i]);
      end
    end
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      #1;
      checks++;
      if (x6 != 6'(i + 1)) begin
        failures++;
        $display("FAIL W=6 b=%b x=%b", b6, x6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mux2: drives random words on both data inputs of a 5-bit mux with
// both select values and checks the output against the chosen word.
module tb_mux2;
  localparam int W = 5;
  logic [W-1:0] d0, d1, y;
  logic         sel;
  int checks = 0, failures = 0;

  mux2 #(.W(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL d0=%h d1=%h sel=%0b y=%h", d0, d1, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

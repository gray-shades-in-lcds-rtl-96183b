// tb_controlled_inverter: exhaustive check of the controlled inverter for
// 3-bit codes: with inv = 1 every code must become its complement, which is
// the code of the symmetric gray shade (sum of the two codes is 7).
module tb_controlled_inverter;
  logic       inv;
  logic [2:0] din, dout;
  int checks = 0, failures = 0;

  controlled_inverter #(.X(3)) dut (.inv, .din, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      for (int d = 0; d < 8; d++) begin
        inv = i[0];
        din = d[2:0];
        #1;
        checks++;
        if (i == 0 && dout != d[2:0]) begin
          failures++; $display("FAIL inv=0 din=%0d dout=%0d", d, dout);
        end
        if (i == 1 && int'(dout) + d != 7) begin
          failures++; $display("FAIL inv=1 din=%0d dout=%0d", d, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_image_memory: writes random codes to a 16x16 frame store, then reads
// every address back and expects the written code one cycle after the read
// enable; a second pass overwrites half the words and reads again.
module tb_image_memory;
  localparam int RB = 4, CB = 4, X = 3;
  logic clk = 0, we = 0, re = 0;
  logic [RB+CB-1:0] waddr = '0, raddr = '0;
  logic [X-1:0] wdata = '0, rdata;
  logic [X-1:0] model [2**(RB+CB)];
  int checks = 0, failures = 0;

  image_memory #(.RB(RB), .CB(CB), .X(X)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2**(RB+CB); a++) begin
        if (pass == 0 || a[0]) begin
          @(negedge clk);
          we = 1; waddr = a[RB+CB-1:0]; wdata = X'($urandom);
          model[a] = wdata;
        end
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < 2**(RB+CB); a++) begin
        @(negedge clk); re = 1; raddr = a[RB+CB-1:0];
        @(negedge clk); re = 0;
        checks++;
        if (rdata != model[a]) begin failures++; $display("FAIL addr %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_column_driver: checks one column-driver chip of 6 stages, 8 shades.
// Random 3-bit codes are shifted in and latched at random times; the
// cascade output must replay the codes 6 shifts later, and every output must
// connect bus line number (latched code), or its complement while `cpl` is
// set. The bus is changed at random
// while the latch holds, as the common selection block does between slots.
module tb_column_driver;
  localparam int N = 6, G = 8, X = 3, VW = 4;
  logic clk = 0, rst_n = 0, shift = 0, latch = 0, cpl = 0;
  logic [X-1:0] din = '0, dout;
  logic [G-1:0][VW-1:0] bus;
  logic [N-1:0][X-1:0]  code;
  logic [N-1:0][VW-1:0] vout;
  logic [N-1:0][X-1:0]  m_sr, m_lat;
  int checks = 0, failures = 0;

  column_driver #(.N_C(N), .G(G), .X(X), .VW(VW)) dut (
    .clk, .rst_n, .shift, .din, .latch, .cpl, .bus, .dout, .code, .vout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int b = 0; b < 3; b++) begin
      for (int k = 0; k < G; k++) bus[k] = VW'($urandom_range(13));
      cpl = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (vout[i] != bus[m_lat[i] ^ {X{cpl}}] || code[i] != m_lat[i]) begin
          failures++; $display("FAIL output %0d", i);
        end
      end
    end
  endtask

  initial begin
    m_sr = '0; m_lat = '0;
    for (int k = 0; k < G; k++) bus[k] = VW'(k);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      shift = ($urandom_range(3) != 0);
      din = X'($urandom);
      latch = ($urandom_range(4) == 0);
      checks++;
      if (dout != m_sr[N-1]) begin failures++; $display("FAIL cascade %0d vs %0d", dout, m_sr[N-1]); end
      @(posedge clk); #1;
      if (latch) m_lat = m_sr;
      if (shift) m_sr = {m_sr[N-2:0], din};
      shift = 0; latch = 0;
      check_outputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_row_driver_stage: checks a single row-driver stage with its own 3:1
// switch. Random shift, latch and data inputs are applied; after every
// clock the stage's shift bit (seen on dout), its latch and the decoded
// level for all four Q1/Q2 combinations are compared with a model:
// latch 0 gives 0 V, latch 1 gives +Vr when Q1 xor Q2 = 0 and -Vr otherwise.
module tb_row_driver_stage;
  import am_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0, din = 0, latch = 0, q1 = 0, q2 = 0;
  logic dout;
  row_level_t level;
  logic m_sr, m_lat;
  int checks = 0, failures = 0;

  row_driver_stage dut (.clk, .rst_n, .shift, .din, .latch, .q1, .q2, .dout, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_sr = 0; m_lat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      shift = 1'($urandom); latch = 1'($urandom); din = 1'($urandom);
      @(posedge clk); #1;
      if (latch) m_lat = m_sr;
      if (shift) m_sr = din;
      shift = 0; latch = 0;
      checks++;
      if (dout != m_sr) begin failures++; $display("FAIL shift bit"); end
      for (int pq = 0; pq < 4; pq++) begin
        automatic row_level_t e;
        {q1, q2} = pq[1:0];
        #1;
        e = !m_lat ? ROW_ZERO : ((q1 ^ q2) ? ROW_NEG : ROW_POS);
        checks++;
        if (level != e) begin failures++; $display("FAIL level q1=%0d q2=%0d", q1, q2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

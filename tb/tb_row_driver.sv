// tb_row_driver: checks one row-driver chip of 8 stages.
// Random bit patterns are shifted in; after 8 shifts the cascade output
// must replay them in order. A latch pulse must copy the register into the
// output latch, and shifting without a latch pulse must leave the outputs
// unchanged. Every output is checked for all four Q1/Q2 combinations:
// selected rows take +Vr when Q1 xor Q2 = 0 and -Vr otherwise,
// unselected rows take 0 V. Two chips are checked side by side: one built
// with the common select bus, one from stages with their own 3:1 switch.
module tb_row_driver;
  import am_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, shift = 0, din = 0, latch = 0, q1 = 0, q2 = 0;
  logic dout, dout3;
  row_level_t [N-1:0] level, level3;
  logic [N-1:0] model_sr, model_lat;
  int checks = 0, failures = 0;

  row_driver #(.N_R(N)) dut (.clk, .rst_n, .shift, .din, .latch, .q1, .q2, .dout, .level);
  row_driver #(.N_R(N), .STAGE_MUX3(1'b1)) dut3 (.clk, .rst_n, .shift, .din, .latch, .q1, .q2,
                                                 .dout(dout3), .level(level3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int pq = 0; pq < 4; pq++) begin
      {q1, q2} = pq[1:0];
      #1;
      for (int i = 0; i < N; i++) begin
        automatic row_level_t e = !model_lat[i] ? ROW_ZERO : ((q1 ^ q2) ? ROW_NEG : ROW_POS);
        checks++;
        if (level[i] != e) begin
          failures++; $display("FAIL row %0d q1=%0d q2=%0d got %0d exp %0d", i, q1, q2, level[i], e);
        end
        checks++;
        if (level3[i] != e) begin
          failures++; $display("FAIL 3:1 row %0d q1=%0d q2=%0d got %0d exp %0d", i, q1, q2, level3[i], e);
        end
      end
    end
  endtask

  initial begin
    model_sr = '0; model_lat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_outputs();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      shift = 1; din = 1'($urandom); latch = 0;
      checks++;
      if (dout != model_sr[N-1]) begin failures++; $display("FAIL cascade output"); end
      checks++;
      if (dout3 != model_sr[N-1]) begin failures++; $display("FAIL 3:1 cascade output"); end
      @(posedge clk); #1;
      model_sr = {model_sr[N-2:0], din};
      shift = 0;
      check_outputs();  // latch must not have changed
      if (n % 5 == 4) begin
        @(negedge clk); latch = 1;
        @(posedge clk); #1; latch = 0;
        model_lat = model_sr;
        check_outputs();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

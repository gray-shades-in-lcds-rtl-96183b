// tb_common_select_4to1: checks the common selection block with 4:1
// multiplexers. Part 1: random inputs, every bus line must follow input
// {Q1, QS}. Part 2: with the generator lines wired as for schemes I, II,
// III and II/III (plain order), bus line k must carry the voltage code k
// needs, computed from g +/- sqrt(1-g^2), in both slots and polarities;
// scheme II is also held against its printed eight-shade values.
module tb_common_select_4to1;
  import am_pkg::*;
  import am_ref_pkg::*;
  localparam int G = 8;
  localparam int VW = 4;
  logic                      q1, qs;
  logic [G-1:0][3:0][VW-1:0] vin;
  logic [G-1:0][VW-1:0]      bus;
  int checks = 0, failures = 0;
  real t2_first[G]  = '{-1.0, -0.0144, 0.4750, 0.8470, 1.1326, 1.3320, 1.4141, 1.0};
  real t2_second[G] = '{1.0, 1.4141, 1.3320, 1.1326, 0.8470, 0.4750, -0.0144, -1.0};

  common_select_4to1 #(.G(G), .VW(VW)) dut (.q1, .qs, .vin, .bus);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < G; k++)
        for (int s = 0; s < 4; s++) vin[k][s] = VW'($urandom_range(13));
      {q1, qs} = n[1:0];
      #1;
      for (int k = 0; k < G; k++) begin
        checks++;
        if (bus[k] != vin[k][{q1, qs}]) begin
          failures++; $display("FAIL line %0d sel=%0d", k, {q1, qs});
        end
      end
    end
    for (int sc = 0; sc < 4; sc++) begin
      for (int k = 0; k < G; k++)
        for (int s = 0; s < 4; s++)
          vin[k][s] = VW'(column_level(G, scheme_t'(sc), 1'b0, k, s[0], s[1]));
      for (int sel = 0; sel < 4; sel++) begin
        {q1, qs} = sel[1:0];
        #1;
        for (int k = 0; k < G; k++) begin
          automatic real got   = vlg_volts(G, int'(bus[k]));
          automatic real exp_v = col_volts(G, sc, 1'b0, k, qs, q1);
          checks++;
          if (!near(got, exp_v, 1e-9)) begin
            failures++;
            $display("FAIL scheme %0d code %0d sel %0d: %f vs %f", sc, k, sel, got, exp_v);
          end
          if (sc == 1) begin
            automatic real tv = qs ? t2_second[k] : t2_first[k];
            checks++;
            if (!near(got, q1 ? -tv : tv, 5e-4)) begin
              failures++; $display("FAIL table II code %0d sel %0d", k, sel);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

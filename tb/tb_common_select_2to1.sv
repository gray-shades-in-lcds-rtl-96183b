// tb_common_select_2to1: checks the simplified common selection block.
// Part 1: random inputs, every bus line must follow input QS.
// Part 2: with the generator lines wired as for scheme I (swapped order for
// positive shades) and scheme II/III, the voltage a column reaches through
// the controlled-inverter code (code xor Q1) must equal the voltage the
// scheme prescribes, computed from g +/- sqrt(1-g^2), in both slots and
// both polarities; scheme I is also held against the printed eight-shade
// values (-1, -0.0144, 0.4750, 0.8470, then reversed order) of its table.
// Part 3: wired for the Q1-switched use (schemes II and III alone), the
// voltage reached through code k in slot 1 and code ~k in slot 2 must be
// the prescribed one at both polarities.
module tb_common_select_2to1;
  import am_pkg::*;
  import am_ref_pkg::*;
  localparam int G = 8;
  localparam int VW = 4;
  logic                      qs;
  logic                      sel;
  assign sel = qs;
  logic [G-1:0][1:0][VW-1:0] vin;
  logic [G-1:0][VW-1:0]      bus;
  int checks = 0, failures = 0;
  real table_first[G] = '{-1.0, -0.0144, 0.4750, 0.8470, -0.8470, -0.4750, 0.0144, 1.0};
  real table_second[G] = '{-1.0, -1.4141, -1.3320, -1.1326, 1.1326, 1.3320, 1.4141, 1.0};

  common_select_2to1 #(.G(G), .VW(VW)) dut (.sel, .vin, .bus);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < G; k++) begin
        vin[k][0] = VW'($urandom_range(13));
        vin[k][1] = VW'($urandom_range(13));
      end
      qs = n[0];
      #1;
      for (int k = 0; k < G; k++) begin
        checks++;
        if (bus[k] != vin[k][qs]) begin
          failures++; $display("FAIL line %0d qs=%0d", k, qs);
        end
      end
    end
    for (int sc = 0; sc < 4; sc += 3) begin
      for (int k = 0; k < G; k++)
        for (int s = 0; s < 2; s++)
          vin[k][s] = VW'(column_level(G, scheme_t'(sc), 1'b1, k, s[0], 1'b0));
      for (int s = 0; s < 2; s++) begin
        qs = s[0];
        #1;
        for (int q = 0; q < 2; q++) begin
          for (int k = 0; k < G; k++) begin
            automatic int  line = (q != 0) ? (G - 1 - k) : k;
            automatic real got  = vlg_volts(G, int'(bus[line]));
            automatic real exp_v = col_volts(G, sc, 1'b1, k, s[0], q[0]);
            checks++;
            if (!near(got, exp_v, 1e-9)) begin
              failures++;
              $display("FAIL scheme %0d code %0d slot %0d q1 %0d: %f vs %f", sc, k, s, q, got, exp_v);
            end
            if (sc == 0) begin
              automatic real tv = (s != 0) ? table_second[k] : table_first[k];
              checks++;
              if (!near(got, (q != 0) ? -tv : tv, 5e-4)) begin
                failures++;
                $display("FAIL table code %0d slot %0d q1 %0d: %f vs %f", k, s, q, got, tv);
              end
            end
          end
        end
      end
    end
    // Part 3: block switched by Q1 (sel = Q1), first-slot voltages at both
    // polarities, codes complemented in the second slot; schemes II and III.
    for (int sc = 1; sc < 3; sc++) begin
      for (int k = 0; k < G; k++)
        for (int p = 0; p < 2; p++)
          vin[k][p] = VW'(column_level(G, scheme_t'(sc), 1'b0, k, 1'b0, p[0]));
      for (int q = 0; q < 2; q++) begin
        qs = q[0];  // drives sel
        #1;
        for (int s = 0; s < 2; s++)
          for (int k = 0; k < G; k++) begin
            automatic int  line  = (s != 0) ? (G - 1 - k) : k;
            automatic real got   = vlg_volts(G, int'(bus[line]));
            automatic real exp_v = col_volts(G, sc, 1'b0, k, s[0], q[0]);
            checks++;
            if (!near(got, exp_v, 1e-9)) begin
              failures++;
              $display("FAIL Q1-switched scheme %0d code %0d slot %0d q1 %0d", sc, k, s, q);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

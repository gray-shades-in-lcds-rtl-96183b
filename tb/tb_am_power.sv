// tb_am_power: drive-energy workload. Pixels are modelled as equal
// capacitors C = 1 charged through the driver resistance, so each voltage
// step dV across a pixel costs C*dV^2/2. The testbench reads the row and
// column voltages the system produces (4:1 common block, plain voltage
// order, Vc = 1, Vr = sqrt(N)) and sums that energy over the pixels of a
// column during each row select time (the step at the row change and the
// one at the slot change). It compares the sum with
//   scheme I : N + N/2 (b^2 + 2c^2 + d^2 - 2bc - 2cd)
//   scheme II: 3N - 2 sqrt(N) (b + 2c + d) + N/2 (b^2 + 2c^2 + d^2 + 2bc + 2cd)
// with b = g(i-1) - sqrt(1-g(i-1)^2), c = g(i) + sqrt(1-g(i)^2) and
// d = g(i) - sqrt(1-g(i)^2). The image (17 rows x 8 columns, column k
// holding k,0,k,1,...,k,7,k) puts every pair of consecutive gray shades in
// some column. From the measured energies it counts the pairs for which
// scheme I costs less and expects it to equal the count from the formulas,
// and to be about half of the 64 pairs (between 40% and 60%). Both
// polarities are measured.
module tb_am_power;
  import am_pkg::*;
  import am_ref_pkg::*;
  localparam int G = 8, NR = 64, NC = 64, VW = 4, ROWS = 17, COLS = 8;

  logic clk = 0, rst_n = 0, img_we = 0, enable = 0;
  logic [7:0] img_row = '0, img_col = '0, rows_m1 = '0, pol_rows_m1 = '0, cols_m1 = '0;
  logic [2:0] img_code = '0;
  logic [8:0] slot_len = '0;
  scheme_t scheme = SCHEME_I;
  pol_mode_t pol_mode = POL_FRAME;
  row_level_t [NR-1:0] row_level;
  logic [NC-1:0][VW-1:0] col_vlg;
  logic q1, qs, q2, latch, disp_valid, frame_start, slot_clamped, row_cascade_out;
  logic [7:0] cur_row;
  logic [2:0] col_cascade_out;

  int checks = 0, failures = 0;
  int img [ROWS][COLS];
  real meas [2][G][G];   // [scheme I / II][g(i-1)][g(i)]
  int  seen [2][G][G];

  am_display_system #(.ROW_CHIPS(1), .COL_CHIPS(1), .COMMON_BLOCK(CB_4TO1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real formula(int sc, int gp, int gi, int n);
    real xp, xi, b, c, d;
    xp = shade(G, gp); xi = shade(G, gi);
    b = xp - $sqrt(1.0 - xp * xp);
    c = xi + $sqrt(1.0 - xi * xi);
    d = xi - $sqrt(1.0 - xi * xi);
    if (sc == 0) return n + n / 2.0 * (b*b + 2*c*c + d*d - 2*b*c - 2*c*d);
    return 3.0 * n - 2.0 * $sqrt(real'(n)) * (b + 2*c + d)
           + n / 2.0 * (b*b + 2*c*c + d*d + 2*b*c + 2*c*d);
  endfunction

  function automatic real row_volts(row_level_t l, real vr);
    return (l == ROW_POS) ? vr : (l == ROW_NEG) ? -vr : 0.0;
  endfunction

  task automatic run_scheme(int sidx, scheme_t sc);
    real vr, prev [ROWS][COLS], e [COLS], v;
    int n;
    bit first;
    vr = $sqrt(real'(ROWS));
    @(negedge clk);
    enable = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    rows_m1 = 8'(ROWS - 1); cols_m1 = 8'(COLS - 1); slot_len = 9'd6; scheme = sc;
    pol_mode = POL_FRAME;
    enable = 1;
    #1;
    n = 0; first = 1;
    foreach (e[j]) e[j] = 0.0;
    // frames 0 and 1: lines 1..2*ROWS
    while (n <= 2 * ROWS) begin
      if (disp_valid) begin
        for (int i = 0; i < ROWS; i++)
          for (int j = 0; j < COLS; j++) begin
            v = row_volts(row_level[i], vr) - vlg_volts(G, int'(col_vlg[j]));
            if (!first) e[j] += 0.5 * (v - prev[i][j]) * (v - prev[i][j]);
            prev[i][j] = v;
          end
        first = 0;
      end
      if (latch) begin
        // close the energy of displayed line n-1 (row r); row 0 of a frame
        // follows a polarity reversal and is left out
        if (n >= 2) begin
          automatic int r = (n - 1) % ROWS;
          if (r != 0) begin
            for (int j = 0; j < COLS; j++) begin
              automatic int gp = img[r - 1][j], gi = img[r][j];
              automatic real f = formula(sidx, gp, gi, ROWS);
              chk(near(e[j], f, 1e-9), $sformatf("energy scheme %0d row %0d col %0d: %f vs %f", sidx, r, j, e[j], f));
              meas[sidx][gp][gi] = e[j];
              seen[sidx][gp][gi]++;
            end
          end
        end
        n++;
        foreach (e[j]) e[j] = 0.0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int n_meas, n_form;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        img[i][j] = (i % 2 == 0) ? j : (i - 1) / 2;
    foreach (seen[s, a, b]) seen[s][a][b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        img_we = 1; img_row = 8'(i); img_col = 8'(j); img_code = 3'(img[i][j]);
        @(negedge clk);
      end
    img_we = 0;
    run_scheme(0, SCHEME_I);
    run_scheme(1, SCHEME_II);
    n_meas = 0; n_form = 0;
    for (int a = 0; a < G; a++)
      for (int b = 0; b < G; b++) begin
        chk(seen[0][a][b] > 0 && seen[1][a][b] > 0, "every shade pair measured");
        if (meas[0][a][b] < meas[1][a][b]) n_meas++;
        if (formula(0, a, b, ROWS) < formula(1, a, b, ROWS)) n_form++;
      end
    $display("scheme I cheaper for %0d of 64 shade pairs (formulas: %0d)", n_meas, n_form);
    chk(n_meas == n_form, "measured and formula comparison agree");
    chk(n_meas >= 26 && n_meas <= 38, "scheme I cheaper for about half of the pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

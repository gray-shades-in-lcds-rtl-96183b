// tb_am_display_q1sel: end-to-end test of the display system with the 2:1
// common selection block switched by Q1 (COMMON_BLOCK = CB_2TO1_Q1): the
// column drivers complement their latched codes in the second slot, and
// the scheme is II or III alone. Two row and two column chips (128 outputs
// each), row drivers built from stages with their own 3:1 switch. Same
// checks as the default-size system test: every row and column
// voltage in every cycle against g +/- sqrt(1-g^2), line period, QS, Q1,
// cur_row, pixel rms against (Vr^2 - 2 g Vr Vc + N Vc^2)/N and the 16-row
// selection ratio. Phases: A 16 x 8 scheme II per frame with slot clamp;
// B 80 x 100 scheme III, polarity every 3 rows; C 128 x 128 scheme II per
// frame; D 20 x 70, scheme I requested (runs scheme II), per frame.
module tb_am_display_q1sel;
  import am_pkg::*;
  import am_ref_pkg::*;
  localparam int G = 8, RB = 8, CB = 8, NROW = 128, NCOL = 128, VW = 4;

  logic clk = 0, rst_n = 0;
  logic img_we = 0;
  logic [RB-1:0] img_row = '0;
  logic [CB-1:0] img_col = '0;
  logic [2:0] img_code = '0;
  logic enable = 0;
  logic [RB-1:0] rows_m1 = '0, pol_rows_m1 = '0;
  logic [CB-1:0] cols_m1 = '0;
  logic [CB:0] slot_len = '0;
  scheme_t scheme = SCHEME_I;
  pol_mode_t pol_mode = POL_FRAME;
  row_level_t [NROW-1:0] row_level;
  logic [NCOL-1:0][VW-1:0] col_vlg;
  logic q1, qs, q2, latch, disp_valid, frame_start, slot_clamped, row_cascade_out;
  logic [RB-1:0] cur_row;
  logic [2:0] col_cascade_out;

  int checks = 0, failures = 0;
  int img [NROW][NCOL];
  real acc [NROW][NCOL];
  // mechanism counters
  int n_rev_frame = 0, n_rev_rows = 0, n_complement = 0, n_q2_toggle = 0;
  int n_clamp = 0, n_subst = 0, n_row_casc = 0, n_col_casc = 0;
  int code_seen [G][2];

  am_display_system #(.ROW_CHIPS(2), .COL_CHIPS(2), .COMMON_BLOCK(CB_2TO1_Q1),
                      .ROW_STAGE_MUX3(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_phase(int rows, int cols, int slen, scheme_t sc, pol_mode_t pm, int pr,
                           int frames, int rms_cols);
    int slot_eff, len, n, cyc, sref, r, total, lines, prev_q1, prev_q2;
    bit slot, pol;
    real vr, vrow, d, rms, expv, ratio;
    // clear the drivers and load the image
    @(negedge clk);
    enable = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < rows; i++)
      for (int j = 0; j < cols; j++) begin
        img[i][j] = (i == 0 && j < G) ? j : int'($urandom_range(G - 1));
        acc[i][j] = 0.0;
        img_we = 1; img_row = RB'(i); img_col = CB'(j); img_code = 3'(img[i][j]);
        @(negedge clk);
      end
    img_we = 0;
    rows_m1 = RB'(rows - 1); cols_m1 = CB'(cols - 1); slot_len = (CB+1)'(slen);
    scheme = sc; pol_mode = pm; pol_rows_m1 = RB'(pr - 1);
    slot_eff = (slen < (cols + 3) / 2) ? (cols + 3) / 2 : slen;
    len = 2 * slot_eff;
    sref = (sc == SCHEME_I || sc == SCHEME_II_III) ? 1 : int'(sc);
    if (sc == SCHEME_I || sc == SCHEME_II_III) n_subst++;
    vr = $sqrt(real'(rows));
    lines = frames * rows;
    n = 0; cyc = 0; prev_q1 = 0; prev_q2 = 0;
    enable = 1;
    #1;
    while (n <= lines) begin
      if (slot_clamped) n_clamp++;
      if (n > 0) begin
        r    = (n - 1) % rows;
        pol  = (pm == POL_FRAME) ? 1'(((n - 1) / rows) % 2) : 1'(((n - 1) / pr) % 2);
        slot = (cyc >= slot_eff);
        chk(disp_valid == 1'b1, "disp_valid");
        chk(int'(cur_row) == r, "cur_row");
        chk(q1 == pol, "q1");
        chk(qs == slot, "qs");
        if (q1 != 1'(prev_q1)) begin
          if (pm == POL_FRAME) n_rev_frame++; else n_rev_rows++;
        end
        if (q2 != 1'(prev_q2)) n_q2_toggle++;
        prev_q1 = int'(q1); prev_q2 = int'(q2);
        if (pol && cyc == 0) n_complement++;
        if (r >= 64 && cyc == 0) n_row_casc++;
        for (int i = 0; i < rows; i++) begin
          automatic row_level_t e = ROW_ZERO;
          if (i == r) e = (row_sign(sref, slot, pol) > 0) ? ROW_POS : ROW_NEG;
          chk(row_level[i] == e, "row level");
        end
        for (int j = 0; j < cols; j++) begin
          automatic real got = vlg_volts(G, int'(col_vlg[j]));
          automatic real ev  = col_volts(G, sref, 1'b0, img[r][j], slot, pol);
          chk(near(got, ev, 1e-9), "column voltage");
          code_seen[img[r][j]][slot]++;
          if (j >= 64 && cyc == 0) n_col_casc++;
        end
        // rms integration over the first frame
        if (n <= rows) begin
          for (int i = 0; i < rows; i++) begin
            vrow = 0.0;
            if (i == r) vrow = (row_sign(sref, slot, pol) > 0) ? vr : -vr;
            for (int j = 0; j < rms_cols; j++) begin
              d = vrow - vlg_volts(G, int'(col_vlg[j]));
              acc[i][j] += d * d;
            end
          end
        end
      end
      if (latch) begin
        chk(cyc == len - 1, "line period");
        chk(frame_start == (n % rows == 0), "frame_start");
        n++; cyc = 0;
      end else begin
        cyc++;
        chk(cyc < len, "latch missing");
      end
      @(negedge clk);
    end
    total = rows * len;
    for (int i = 0; i < rows; i++)
      for (int j = 0; j < rms_cols; j++) begin
        rms  = $sqrt(acc[i][j] / total);
        expv = $sqrt(2.0 - 2.0 * shade(G, img[i][j]) / vr);
        chk(near(rms, expv, 1e-9), "pixel rms");
      end
    if (rows == 16) begin
      ratio = $sqrt((2.0 + 2.0 / vr) / (2.0 - 2.0 / vr));
      chk(near(ratio, 1.29, 0.015 * 1.29), "selection ratio");
      // ON pixel (code 0) of row 0 against an OFF pixel (code 7) of row 0
      chk(near($sqrt(acc[0][0] / total) / $sqrt(acc[0][7] / total), ratio, 1e-9),
          "measured selection ratio");
      $display("16 rows: selection ratio %f", ratio);
    end
    enable = 0;
  endtask

  initial begin
    foreach (code_seen[i, s]) code_seen[i][s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_phase(16, 8, 0, SCHEME_II, POL_FRAME, 1, 2, 8);
    $display("phase A done, checks %0d failures %0d", checks, failures);
    run_phase(80, 100, 60, SCHEME_III, POL_ROWS, 3, 1, 100);
    $display("phase B done, checks %0d failures %0d", checks, failures);
    run_phase(128, 128, 70, SCHEME_II, POL_FRAME, 1, 1, 16);
    $display("phase C done, checks %0d failures %0d", checks, failures);
    run_phase(20, 70, 40, SCHEME_I, POL_FRAME, 1, 2, 70);
    $display("phase D done, checks %0d failures %0d", checks, failures);
    $display("reversals frame %0d rows %0d, reversed-polarity lines %0d, Q2 toggles %0d, clamp cycles %0d",
             n_rev_frame, n_rev_rows, n_complement, n_q2_toggle, n_clamp);
    chk(n_subst > 0, "scheme substitution happened");
    chk(n_rev_frame > 0, "polarity reversal per frame happened");
    chk(n_rev_rows > 0, "polarity reversal per rows happened");
    chk(n_complement > 0, "reversed polarity happened");
    chk(n_q2_toggle > 0, "Q2 toggled");
    chk(n_clamp > 0, "slot clamp happened");
    chk(n_row_casc > 0, "row token crossed a chip boundary");
    chk(n_col_casc > 0, "column data crossed a chip boundary");
    for (int k = 0; k < G; k++)
      for (int s = 0; s < 2; s++) chk(code_seen[k][s] > 0, "every code in both slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

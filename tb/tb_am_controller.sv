// tb_am_controller: checks the scan timing of the controller on a small
// display (RB = CB = 3) for four configurations: scheme I with polarity
// reversal every frame, scheme II with reversal every 3 rows, a slot length
// below the minimum (must be raised to (cols+3)/2 rounded down, i.e. 4 for
// 6 columns) and a 1-row, 8-column panel. For every line period it expects:
// period 2*slot_eff cycles closed by one latch pulse; exactly `cols` memory
// reads of the row being loaded, last column first; `cols` column shifts
// before the latch; one row shift whose data bit is 1 only when row 0 is
// loaded; QS = 0 during the first slot_eff cycles of a displayed row and 1
// after; Q2 = QS except in scheme I; Q1 and the loading polarity following
// the reversal rule; cur_row counting rows modulo the row count.
module tb_am_controller;
  import am_pkg::*;
  localparam int RB = 3, CB = 3, SW = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [RB-1:0] rows_m1 = '0, pol_rows_m1 = '0;
  logic [CB-1:0] cols_m1 = '0;
  logic [SW-1:0] slot_len = '0;
  scheme_t scheme = SCHEME_I;
  pol_mode_t pol_mode = POL_FRAME;
  logic mem_re, col_shift, row_shift, row_din, latch, q1, q1_load, qs, q2;
  logic disp_valid, frame_start, slot_clamped;
  logic [RB+CB-1:0] mem_raddr;
  logic [RB-1:0] cur_row;
  int checks = 0, failures = 0;
  int clamps_seen = 0, pol_flips = 0;

  am_controller #(.RB(RB), .CB(CB), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int pol_of(int n, int rows, int mode, int pr);
    return mode == 0 ? (n / rows) % 2 : (n / pr) % 2;
  endfunction

  task automatic run(int rows, int cols, int slen, scheme_t sc, pol_mode_t pm, int pr, int periods);
    int slot_eff, len, n, cyc, reads, shifts, rshifts, prev_q1;
    @(negedge clk);
    enable = 0;
    rows_m1 = RB'(rows - 1); cols_m1 = CB'(cols - 1); slot_len = SW'(slen);
    scheme = sc; pol_mode = pm; pol_rows_m1 = RB'(pr - 1);
    slot_eff = (slen < (cols + 3) / 2) ? (cols + 3) / 2 : slen;
    len = 2 * slot_eff;
    repeat (2) @(negedge clk);
    enable = 1;
    #1;
    n = 0; cyc = 0; reads = 0; shifts = 0; rshifts = 0; prev_q1 = 0;
    while (n < periods) begin
      chk(slot_clamped == (slen < (cols + 3) / 2), "slot_clamped");
      if (slot_clamped) clamps_seen++;
      if (mem_re) begin
        chk(mem_raddr == {RB'(n % rows), CB'(cols - 1 - reads)}, "read address");
        reads++;
      end
      if (col_shift) shifts++;
      if (row_shift) begin
        rshifts++;
        chk(row_din == (n % rows == 0), "row data bit");
      end
      chk(q1_load == 1'(pol_of(n, rows, int'(pm), pr)), "q1_load");
      chk(disp_valid == (n > 0), "disp_valid");
      if (n > 0) begin
        chk(int'(cur_row) == (n - 1) % rows, "cur_row");
        chk(q1 == 1'(pol_of(n - 1, rows, int'(pm), pr)), "q1");
        chk(qs == (cyc >= slot_eff), "qs");
        chk(q2 == ((sc != SCHEME_I) && qs), "q2");
      end
      if (latch) begin
        chk(cyc == len - 1, "period length");
        chk(reads == cols, "reads per line");
        chk(shifts == cols, "column shifts per line");
        chk(rshifts == 1, "row shifts per line");
        chk(frame_start == (n % rows == 0), "frame_start");
        if (pol_of(n, rows, int'(pm), pr) != prev_q1) pol_flips++;
        prev_q1 = pol_of(n, rows, int'(pm), pr);
        n++; cyc = 0; reads = 0; shifts = 0; rshifts = 0;
      end else begin
        cyc++;
        chk(cyc < len, "missing latch");
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 6, 5, SCHEME_I,   POL_FRAME, 1, 23);
    run(7, 6, 6, SCHEME_II,  POL_ROWS,  3, 30);
    run(4, 6, 2, SCHEME_III, POL_ROWS,  1, 12);
    run(1, 8, 9, SCHEME_I,   POL_FRAME, 1, 6);
    chk(clamps_seen > 0, "clamp exercised");
    chk(pol_flips > 10, "polarity reversals exercised");
    $display("clamped cycles %0d, polarity reversals %0d", clamps_seen, pol_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

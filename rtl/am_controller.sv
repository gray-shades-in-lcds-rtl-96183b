// am_controller: timing controller of the amplitude-modulation display
// system (line-by-line addressing, two time slots per row select time).
//
// The row select time is split into two equal slots of slot_eff clock
// cycles; QS is 0 in the first and 1 in the second. During the row select
// time of a row, the controller reads the next row's codes from the image
// memory and shifts them into the column driver, so that a single latch
// pulse at the end of the period switches row and column drivers to the
// next row together. Cycle t of a line period of L = 2*slot_eff cycles:
//   t = 0            row-driver shift; its data input is '1' only when the
//                    row being loaded is row 0 (start of a frame)
//   t = 0..M-1       memory read of column M-1-t of the row being loaded
//   t = 1..M         column-driver shift (memory data are valid one cycle
//                    after the read)
//   t = L-1          latch pulse; cur_row and Q1 advance with the latches
// Reading the columns last-first leaves column j in column-driver stage j.
// slot_len is raised to the smallest slot that holds the M shifts
// (slot_clamped then reads 1).
//
// Polarity: q1_load is the polarity of the row being loaded (it drives the
// controlled inverter), q1 that of the row being displayed. In POL_FRAME
// mode the polarity is inverted at every frame, in POL_ROWS mode after every
// pol_rows_m1+1 selected rows. Q2 (row-select sign) is 0 for scheme I and
// equals QS for the schemes II, III and II/III.
//
// Interface: configuration is sampled continuously and should only change
// while `enable` is low; lowering `enable` stops the scan and restarts it
// from row 0 with positive polarity. Up to 2^RB rows and 2^CB columns.
//
// From the document: the signals it generates (addresses, shift clocks, the
// single '1' for the first row, the synchronous latch pulse, row shift once
// per row, P/Q1 reversal after a frame or a few rows, QS, Q2), and loading
// the next row while the present one is shown. The exact cycle schedule,
// the slot clamp and the use of clock enables are this design's own.
module am_controller
  import am_pkg::*;
#(
  parameter int unsigned RB = 8,
  parameter int unsigned CB = 8,
  parameter int unsigned SW = CB + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [RB-1:0]     rows_m1,
  input  logic [CB-1:0]     cols_m1,
  input  logic [SW-1:0]     slot_len,
  input  scheme_t           scheme,
  input  pol_mode_t         pol_mode,
  input  logic [RB-1:0]     pol_rows_m1,
  output logic              mem_re,
  output logic [RB+CB-1:0]  mem_raddr,
  output logic              col_shift,
  output logic              row_shift,
  output logic              row_din,
  output logic              latch,
  output logic              q1,
  output logic              q1_load,
  output logic              qs,
  output logic              q2,
  output logic [RB-1:0]     cur_row,
  output logic              disp_valid,
  output logic              frame_start,
  output logic              slot_clamped
);

  logic [SW-1:0] min_slot;
  logic [SW-1:0] slot_eff;
  logic [SW:0]   line_len;
  logic [SW:0]   t;
  logic          last;
  logic [RB-1:0] nxt_row;
  logic [RB-1:0] nxt_row_inc;
  logic [RB-1:0] pol_cnt;
  logic          q1_nxt;
  logic          re_d;

  always_comb begin
    min_slot     = SW'((32'(cols_m1) + 32'd4) >> 1);
    slot_clamped = (slot_len < min_slot);
    slot_eff     = slot_clamped ? min_slot : slot_len;
    line_len     = {slot_eff, 1'b0};
    last         = enable && (t == line_len - 1'b1);
    nxt_row_inc  = (nxt_row == rows_m1) ? '0 : nxt_row + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t          <= '0;
      nxt_row    <= '0;
      cur_row    <= '0;
      pol_cnt    <= '0;
      q1_nxt     <= 1'b0;
      q1         <= 1'b0;
      disp_valid <= 1'b0;
      re_d       <= 1'b0;
    end else if (!enable) begin
      t          <= '0;
      nxt_row    <= '0;
      pol_cnt    <= '0;
      q1_nxt     <= 1'b0;
      disp_valid <= 1'b0;
      re_d       <= 1'b0;
    end else begin
      re_d <= mem_re;
      if (last) begin
        t          <= '0;
        disp_valid <= 1'b1;
        cur_row    <= nxt_row;
        q1         <= q1_nxt;
        nxt_row    <= nxt_row_inc;
        if (pol_mode == POL_FRAME) begin
          if (nxt_row_inc == '0) q1_nxt <= ~q1_nxt;
        end else begin
          if (pol_cnt == pol_rows_m1) begin
            pol_cnt <= '0;
            q1_nxt  <= ~q1_nxt;
          end else begin
            pol_cnt <= pol_cnt + 1'b1;
          end
        end
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  always_comb begin
    mem_re      = enable && (t <= (SW+1)'(cols_m1));
    mem_raddr   = {nxt_row, cols_m1 - t[CB-1:0]};
    col_shift   = re_d;
    row_shift   = enable && (t == '0);
    row_din     = (nxt_row == '0);
    latch       = last;
    frame_start = last && (nxt_row == '0);
    q1_load     = q1_nxt;
    qs          = (t >= (SW+1)'(slot_eff));
    q2          = (scheme != SCHEME_I) && qs;
  end

endmodule

// am_display_system: digital part of a passive-matrix LCD drive system that
// shows gray shades by amplitude modulation with line-by-line addressing.
//
// The controller scans the image memory row by row. Each code passes the
// controlled inverter (complemented while the polarity is reversed) into a
// chain of COL_CHIPS cascaded column-driver chips; a chain of ROW_CHIPS
// cascaded row-driver chips moves a single select token down the rows.
// A common selection block, shared by all columns, places on the column bus
// the g generator voltages that the present time slot needs, so every
// column output selects one of only g voltages.
//
// COMMON_BLOCK selects how the column voltages are organised:
// CB_2TO1_QS (default): common block of 2:1 multiplexers switched by QS,
//   codes complemented by Q1 before the shift register; supports scheme I
//   (voltages of the positive shades applied in swapped order) and the
//   combined scheme II/III; a request for II or III runs II/III.
// CB_4TO1: common block of 4:1 multiplexers switched by Q1 and QS, codes
//   not complemented; supports schemes I, II, III and II/III in the plain
//   voltage order.
// CB_2TO1_Q1: common block of 2:1 multiplexers switched by Q1, the column
//   drivers complement their latched codes in the second slot; supports
//   scheme II or scheme III alone; a request for I or II/III runs II.
//
// ROW_STAGE_MUX3 = 1 builds the row drivers from stages with their own
// 3:1 switch instead of a common select bus; the behaviour is the same.
//
// Outputs: row_level[i] is the voltage (0, +Vr or -Vr) row electrode i
// receives, col_vlg[j] the number of the voltage-level-generator line that
// column electrode j receives (see am_pkg for the numbering). The
// generator voltages, the panel and the clock source are outside this
// module. See am_controller for the timing.
//
// From the document: the block structure and its connections, the
// complement-before-shift data path, the three common block variants and
// the voltage wiring of each scheme. Chip sizes of 64 outputs, the
// representation of analog nets by line numbers, the scheme substitutions
// and the image write port are this design's own choices.
module am_display_system
  import am_pkg::*;
#(
  parameter int unsigned G           = am_pkg::G_DEFAULT,
  parameter int unsigned RB          = 8,
  parameter int unsigned CB          = 8,
  parameter int unsigned ROW_CHIPS   = 4,
  parameter int unsigned ROW_STAGES  = 64,
  parameter int unsigned COL_CHIPS   = 4,
  parameter int unsigned COL_STAGES  = 64,
  parameter common_block_t COMMON_BLOCK = CB_2TO1_QS,
  parameter bit          ROW_STAGE_MUX3 = 1'b0,
  localparam int unsigned X          = $clog2(G),
  localparam int unsigned VW         = $clog2(2*G-2),
  localparam int unsigned NROW       = ROW_CHIPS * ROW_STAGES,
  localparam int unsigned NCOL       = COL_CHIPS * COL_STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // image load port
  input  logic                    img_we,
  input  logic [RB-1:0]           img_row,
  input  logic [CB-1:0]           img_col,
  input  logic [X-1:0]            img_code,
  // configuration
  input  logic                    enable,
  input  logic [RB-1:0]           rows_m1,
  input  logic [CB-1:0]           cols_m1,
  input  logic [CB:0]             slot_len,
  input  scheme_t                 scheme,
  input  pol_mode_t               pol_mode,
  input  logic [RB-1:0]           pol_rows_m1,
  // electrode drive
  output row_level_t [NROW-1:0]   row_level,
  output logic [NCOL-1:0][VW-1:0] col_vlg,
  // status and control signals
  output logic                    q1,
  output logic                    qs,
  output logic                    q2,
  output logic                    latch,
  output logic [RB-1:0]           cur_row,
  output logic                    disp_valid,
  output logic                    frame_start,
  output logic                    slot_clamped,
  output logic                    row_cascade_out,
  output logic [X-1:0]            col_cascade_out
);

  scheme_t             scheme_eff;
  logic                mem_re;
  logic [RB+CB-1:0]    mem_raddr;
  logic [X-1:0]        mem_rdata;
  logic                col_shift;
  logic                row_shift;
  logic                row_din;
  logic                q1_load;
  logic                inv_ctl;
  logic                cpl_ctl;
  logic [X-1:0]        col_din;
  logic [G-1:0][VW-1:0] bus;

  always_comb begin
    scheme_eff = scheme;
    if (COMMON_BLOCK == CB_2TO1_QS && (scheme == SCHEME_II || scheme == SCHEME_III))
      scheme_eff = SCHEME_II_III;
    if (COMMON_BLOCK == CB_2TO1_Q1 && (scheme == SCHEME_I || scheme == SCHEME_II_III))
      scheme_eff = SCHEME_II;
  end

  am_controller #(.RB(RB), .CB(CB), .SW(CB+1)) u_ctrl (
    .clk, .rst_n, .enable, .rows_m1, .cols_m1, .slot_len,
    .scheme(scheme_eff), .pol_mode, .pol_rows_m1,
    .mem_re, .mem_raddr, .col_shift, .row_shift, .row_din, .latch,
    .q1, .q1_load, .qs, .q2, .cur_row, .disp_valid, .frame_start, .slot_clamped
  );

  image_memory #(.RB(RB), .CB(CB), .X(X)) u_mem (
    .clk, .we(img_we), .waddr({img_row, img_col}), .wdata(img_code),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  assign inv_ctl = (COMMON_BLOCK == CB_2TO1_QS) ? q1_load : 1'b0;
  assign cpl_ctl = (COMMON_BLOCK == CB_2TO1_Q1) ? qs : 1'b0;

  controlled_inverter #(.X(X)) u_inv (
    .inv(inv_ctl), .din(mem_rdata), .dout(col_din)
  );

  // Common selection block, fed by the voltage-level-generator lines that
  // the chosen scheme wires to its inputs.
  if (COMMON_BLOCK == CB_4TO1) begin : g_common4
    logic [G-1:0][3:0][VW-1:0] vin;
    always_comb begin
      for (int k = 0; k < G; k++)
        for (int s = 0; s < 4; s++)
          vin[k][s] = VW'(column_level(G, scheme_eff, 1'b0, k, s[0], s[1]));
    end
    common_select_4to1 #(.G(G), .VW(VW)) u_common (.q1, .qs, .vin, .bus);
  end else if (COMMON_BLOCK == CB_2TO1_Q1) begin : g_common2q1
    // input p: first-slot voltage at polarity p
    logic [G-1:0][1:0][VW-1:0] vin;
    always_comb begin
      for (int k = 0; k < G; k++)
        for (int p = 0; p < 2; p++)
          vin[k][p] = VW'(column_level(G, scheme_eff, 1'b0, k, 1'b0, p[0]));
    end
    common_select_2to1 #(.G(G), .VW(VW)) u_common (.sel(q1), .vin, .bus);
  end else begin : g_common2
    // input s: voltage of slot s at positive polarity
    logic [G-1:0][1:0][VW-1:0] vin;
    always_comb begin
      for (int k = 0; k < G; k++)
        for (int s = 0; s < 2; s++)
          vin[k][s] = VW'(column_level(G, scheme_eff, 1'b1, k, s[0], 1'b0));
    end
    common_select_2to1 #(.G(G), .VW(VW)) u_common (.sel(qs), .vin, .bus);
  end

  // Cascaded column-driver chips: chip 0 receives the memory data.
  logic [COL_CHIPS:0][X-1:0] col_chain;
  assign col_chain[0]    = col_din;
  assign col_cascade_out = col_chain[COL_CHIPS];

  for (genvar c = 0; c < COL_CHIPS; c++) begin : g_col
    column_driver #(.N_C(COL_STAGES), .G(G), .X(X), .VW(VW)) u_col (
      .clk, .rst_n, .shift(col_shift), .din(col_chain[c]), .latch, .cpl(cpl_ctl), .bus,
      .dout(col_chain[c+1]), .code(),
      .vout(col_vlg[c*COL_STAGES +: COL_STAGES])
    );
  end

  // Cascaded row-driver chips: chip 0 receives the select token.
  logic [ROW_CHIPS:0] row_chain;
  assign row_chain[0]    = row_din;
  assign row_cascade_out = row_chain[ROW_CHIPS];

  for (genvar c = 0; c < ROW_CHIPS; c++) begin : g_row
    row_driver #(.N_R(ROW_STAGES), .STAGE_MUX3(ROW_STAGE_MUX3)) u_row (
      .clk, .rst_n, .shift(row_shift), .din(row_chain[c]), .latch, .q1, .q2,
      .dout(row_chain[c+1]), .level(row_level[c*ROW_STAGES +: ROW_STAGES])
    );
  end

endmodule

// common_select_4to1: common selection block of the column driver with
// 4:1 multiplexers.
//
// Bus line k carries the voltage data code k needs in the present slot and
// polarity. Its 4:1 analog multiplexer chooses among
//   vin[k][0] first slot, vin[k][1] second slot           (Q1 = 0)
//   vin[k][2] first slot, vin[k][3] second slot, reversed (Q1 = 1)
// with select {Q1, QS}. Because Q1 and QS are common to all columns, each
// column output needs only a g:1 multiplexer. Works with the Table 2 wiring
// of schemes I, II and III; data need no complementing. Voltages are
// represented by VLG line numbers; combinational.
//
// From the document: g 4:1 multiplexers selected by Q1 and QS. The order of
// the four inputs is this design's own.
module common_select_4to1 #(
  parameter int unsigned G  = am_pkg::G_DEFAULT,
  parameter int unsigned VW = $clog2(2*G-2)
) (
  input  logic                         q1,
  input  logic                         qs,
  input  logic [G-1:0][3:0][VW-1:0]    vin,
  output logic [G-1:0][VW-1:0]         bus
);

  always_comb begin
    for (int k = 0; k < G; k++) bus[k] = vin[k][{q1, qs}];
  end

endmodule

// common_select_2to1: simplified common selection block of the column
// driver.
//
// One 2:1 analog multiplexer per bus line, all switched by `sel`, puts g of
// the 2g-2 generator voltages on the column bus: bus[k] = vin[k][sel].
// Two ways of use:
//  * sel = QS (main use): bus line k carries the voltage code k needs at
//    positive polarity, vin[k][0] in the first slot and vin[k][1] in the
//    second. Reversed polarity needs no extra inputs because the controlled
//    inverter complements the codes. Works for scheme I with the two
//    voltages swapped for the positive shades and for the combined scheme
//    II/III (see am_pkg::column_level).
//  * sel = Q1: bus line k carries the first-slot voltage of code k,
//    vin[k][0] at positive and vin[k][1] at reversed polarity; in the second
//    slot the column driver complements its latched codes. Works for scheme
//    II or scheme III alone.
// Voltages are represented by VLG line numbers; combinational.
//
// From the document: g 2:1 multiplexers controlled by QS, or by Q1 when the
// column driver can complement its shift-register outputs. The
// representation of analog lines by numbers is this design's own.
module common_select_2to1 #(
  parameter int unsigned G  = am_pkg::G_DEFAULT,
  parameter int unsigned VW = $clog2(2*G-2)
) (
  input  logic                         sel,
  input  logic [G-1:0][1:0][VW-1:0]    vin,
  output logic [G-1:0][VW-1:0]         bus
);

  always_comb begin
    for (int k = 0; k < G; k++) bus[k] = vin[k][sel];
  end

endmodule

// row_driver_stage: one stage of a row driver with its own 3:1 output
// switch.
//
// The stage holds one shift-register bit and one latch bit. The shift bit
// takes `din` (the previous stage's bit) on `shift` and is passed on as
// `dout`; a latch pulse copies it into the latch. A decoder turns the latch
// bit and the polarity P = Q1 xor Q2 into the control of a 3:1 analog
// switch: latch 0 -> 0 V, latch 1 and P = 0 -> +Vr, latch 1 and P = 1 ->
// -Vr. The output reports the level the switch connects.
//
// Interface: `shift` and `latch` are clock enables sampled on the rising
// edge of clk; `level` follows the latch one cycle after `latch` and
// follows q1/q2 combinationally.
//
// From the document: shift stage, latch, XOR of Q1 and Q2 into P, decoder
// and 3:1 switch among +Vr, 0 and -Vr. This design's own choices: which
// value of P gives +Vr, synchronous enables, and the reset.
module row_driver_stage
  import am_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        shift,
  input  logic        din,
  input  logic        latch,
  input  logic        q1,
  input  logic        q2,
  output logic        dout,
  output row_level_t  level
);

  logic sr_bit;
  logic lat_bit;
  logic p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_bit  <= 1'b0;
      lat_bit <= 1'b0;
    end else begin
      if (shift) sr_bit  <= din;
      if (latch) lat_bit <= sr_bit;
    end
  end

  assign dout = sr_bit;

  // Decoder of the 3:1 switch.
  always_comb begin
    p = q1 ^ q2;
    unique case ({lat_bit, p})
      2'b10:   level = ROW_POS;
      2'b11:   level = ROW_NEG;
      default: level = ROW_ZERO;
    endcase
  end

endmodule

// column_driver: one column (segment) driver chip for amplitude modulation
// with a common selection block.
//
// An X-bit wide shift register of N_C stages receives one gray-shade code
// per shift; a latch pulse copies all stages into the output latch. The
// latched code of each output selects one of the g voltages on the common
// column bus (a g:1 analog multiplexer per output), so each output switch
// needs only g inputs instead of 2g-2. Bus lines and outputs are represented
// by the number of the voltage-level-generator line they carry (see am_pkg).
//
// Input `cpl` complements the latched codes on their way to the output
// multiplexers (code ^ {X{cpl}}); it is tied to 0 unless the common block
// is switched by Q1, in which case it follows the slot signal QS.
//
// Interface: `shift` and `latch` are clock enables sampled on the rising
// edge of clk. New data enter stage 0 and move towards stage N_C-1; `dout`
// is the last stage, for cascading chips. `code` is the latched code and
// `vout` the bus line each output connects; vout follows `bus` and `cpl`
// combinationally.
//
// From the document: X-bit parallel shift register, latch, g:1 output
// multiplexers fed by a common bus, cascade outputs, and the option to
// complement the shift-register outputs internally. This design's own
// choices: synchronous enables and an active-low reset that clears
// register and latch.
module column_driver #(
  parameter int unsigned N_C = 64,
  parameter int unsigned G   = am_pkg::G_DEFAULT,
  parameter int unsigned X   = $clog2(G),
  parameter int unsigned VW  = $clog2(2*G-2)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift,
  input  logic [X-1:0]               din,
  input  logic                       latch,
  input  logic                       cpl,
  input  logic [G-1:0][VW-1:0]       bus,
  output logic [X-1:0]               dout,
  output logic [N_C-1:0][X-1:0]      code,
  output logic [N_C-1:0][VW-1:0]     vout
);

  logic [N_C-1:0][X-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      code <= '0;
    end else begin
      if (shift) sr   <= {sr[N_C-2:0], din};
      if (latch) code <= sr;
    end
  end

  assign dout = sr[N_C-1];

  // g:1 multiplexer of each output.
  always_comb begin
    for (int i = 0; i < N_C; i++) vout[i] = bus[code[i] ^ {X{cpl}}];
  end

endmodule

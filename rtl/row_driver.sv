// row_driver: one row (common) driver chip for amplitude-modulation
// addressing, as in a standard line-by-line row driver.
//
// A 1-bit shift register of N_R stages carries the row-select token; a latch
// pulse copies it into the output latch. A '1' in latch stage i selects row
// i, a '0' leaves it unselected. The selected rows take the voltage on the
// common "select" bus, which a 2:1 switch sets to +Vr or -Vr from the
// polarity signal P = Q1 xor Q2; the unselected rows take the "unselect" bus,
// whose two inputs are both 0 V for amplitude modulation. Each output is
// reported as the row_level_t its 2:1 analog switch connects.
//
// With STAGE_MUX3 = 1 the chip is built instead as a chain of
// row_driver_stage cells, each with its own XOR and 3:1 switch decoder; the
// outputs are the same.
//
// Interface: `shift` and `latch` are clock enables sampled on the rising
// edge of clk (the chip's shift clock and latch pulse); `dout` is the last
// shift stage, for cascading chips. Outputs follow the latch one cycle after
// `latch` is sampled, and follow q1/q2 combinationally.
//
// From the document: shift register, latch, common bus switched by P, 2:1
// output switches, P = Q1 xor Q2, cascade output. This design's own choices:
// synchronous enables instead of separate clock pins, and an active-low
// reset that clears register and latch (the document only says the row
// driver is cleared before the first row is selected).
module row_driver
  import am_pkg::*;
#(
  parameter int unsigned N_R        = 64,
  parameter bit          STAGE_MUX3 = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   shift,
  input  logic                   din,
  input  logic                   latch,
  input  logic                   q1,
  input  logic                   q2,
  output logic                   dout,
  output row_level_t [N_R-1:0]   level
);

  if (STAGE_MUX3) begin : g_stages
    logic [N_R:0] chain;
    assign chain[0] = din;
    assign dout     = chain[N_R];
    for (genvar i = 0; i < N_R; i++) begin : g_stage
      row_driver_stage u_stage (
        .clk, .rst_n, .shift, .din(chain[i]), .latch, .q1, .q2,
        .dout(chain[i+1]), .level(level[i])
      );
    end
  end else begin : g_common_bus
    logic [N_R-1:0] sr;
    logic [N_R-1:0] lat;
    logic           p;
    row_level_t     sel_bus;
    row_level_t     unsel_bus;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sr  <= '0;
        lat <= '0;
      end else begin
        if (shift) sr  <= {sr[N_R-2:0], din};
        if (latch) lat <= sr;
      end
    end

    assign dout = sr[N_R-1];

    // Common bus: the two 2:1 switches controlled by P.
    always_comb begin
      p         = q1 ^ q2;
      sel_bus   = p ? ROW_NEG : ROW_POS;
      unsel_bus = ROW_ZERO;  // both unselect inputs tied to 0 V
    end

    // Per-output 2:1 switch controlled by the latch bit.
    always_comb begin
      for (int i = 0; i < N_R; i++) level[i] = lat[i] ? sel_bus : unsel_bus;
    end
  end

endmodule

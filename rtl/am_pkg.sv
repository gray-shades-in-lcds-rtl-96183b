// am_pkg: types and constants shared by the amplitude-modulation LCD drive
// system.
//
// Analog voltages are represented by the number of the voltage-level
// generator (VLG) output that carries them. For g symmetrically spaced gray
// shades g_k = (2k-(g-1))/(g-1), k = 0..g-1 (data code k), every column
// voltage of every scheme is +a_k or -a_k with a_k = g_k + sqrt(1-g_k^2);
// the other term g_k - sqrt(1-g_k^2) equals -a_(g-1-k). Because a_0 = -1 and
// a_(g-1) = +1, there are 2g-2 distinct levels. They are numbered:
//   VLG line k       (0 <= k <= g-1) : +a_k
//   VLG line g+k-1   (1 <= k <= g-2) : -a_k
// The level set and the 2g-2 count follow the document; the numbering is
// this design's own choice. column_level() returns, for each scheme of
// Table 1 (and the row-reordered scheme I and combined II/III scheme of
// Table 3), the VLG line a column with data code k needs in a slot.
package am_pkg;

  localparam int unsigned G_DEFAULT = 8;   // gray shades of the prototype

  // Level applied to one row electrode (select inputs of its analog switch).
  typedef enum logic [1:0] {
    ROW_ZERO = 2'd0,   // unselected row, 0 V
    ROW_POS  = 2'd1,   // +Vr
    ROW_NEG  = 2'd2    // -Vr
  } row_level_t;

  // Addressing scheme. SCHEME_II_III uses scheme II for negative gray shades
  // and scheme III for positive ones (Table 3).
  typedef enum logic [1:0] {
    SCHEME_I      = 2'd0,
    SCHEME_II     = 2'd1,
    SCHEME_III    = 2'd2,
    SCHEME_II_III = 2'd3
  } scheme_t;

  // When the polarity signal Q1 is inverted.
  typedef enum logic {
    POL_FRAME = 1'b0,  // after every frame
    POL_ROWS  = 1'b1   // after every few selected rows
  } pol_mode_t;

  // Organisation of the column voltage selection.
  typedef enum logic [1:0] {
    CB_2TO1_QS = 2'd0,  // 2:1 common block on QS, data complemented by Q1
    CB_4TO1    = 2'd1,  // 4:1 common block on {Q1, QS}, no complementing
    CB_2TO1_Q1 = 2'd2   // 2:1 common block on Q1, latched codes complemented by QS
  } common_block_t;

  // VLG line carrying (neg ? -a_k : +a_k) for g gray shades.
  function automatic int unsigned vlg_index(int unsigned g, bit neg, int unsigned k);
    if (!neg)        return k;
    if (k == 0)      return g - 1;   // -a_0 = +1 = +a_(g-1)
    if (k == g - 1)  return 0;       // -a_(g-1) = -1 = +a_0
    return g + k - 1;
  endfunction

  // VLG line needed by a column with data code k in time slot `slot`
  // (0 = first) at polarity q1. With `reorder` set, scheme I applies its two
  // voltages in swapped order for the positive gray shades (Table 3).
  function automatic int unsigned column_level(int unsigned g, scheme_t s, bit reorder,
                                               int unsigned k, bit slot, bit q1);
    bit upper;
    bit neg;
    int unsigned m;
    upper = (k >= g / 2);
    neg   = 1'b0;
    m     = k;
    case (s)
      SCHEME_I: begin
        // first slot g+sqrt(1-g^2) = +a_k, second g-sqrt(1-g^2) = -a_(g-1-k)
        neg = slot ^ (reorder & upper);
        m   = neg ? (g - 1 - k) : k;
      end
      SCHEME_II: begin
        // first g+sqrt = +a_k, second -g+sqrt = +a_(g-1-k)
        neg = 1'b0;
        m   = slot ? (g - 1 - k) : k;
      end
      SCHEME_III: begin
        // first g-sqrt = -a_(g-1-k), second -g-sqrt = -a_k
        neg = 1'b1;
        m   = slot ? k : (g - 1 - k);
      end
      default: begin  // SCHEME_II_III
        neg = upper;
        if (upper) m = slot ? k : (g - 1 - k);
        else       m = slot ? (g - 1 - k) : k;
      end
    endcase
    return vlg_index(g, neg ^ q1, m);
  endfunction

endpackage

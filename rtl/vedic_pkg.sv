// vedic_pkg: types and elaboration-time functions shared by the carry select
// adders (CSLA) and the Vedic multiplier.
//
// csla_kind_e names the four CSLA architectures. REG_* groups use two ripple
// carry adders (carry in 0 and carry in 1). MOD_* groups use one RCA and a
// binary-to-excess-1 converter (BEC). LINEAR and SQRT choose how the word is
// cut into groups.
//
// Group schedule (functions csla_num_groups / csla_group_lo / csla_group_size):
//   * LINEAR: 4-bit groups at every width.
//   * SQRT, 16 bits: groups of 2, 2, 3, 4, 5 bits, least significant first.
//   * SQRT, wider than 16 bits: a chain of 16-bit SQRT blocks. Group 0 of
//     every block is a plain RCA that takes the previous block's carry.
//   * SQRT, narrower than 16 bits: the 2, 2, 3, 4, 5 sequence cut off at the
//     width, the last group taking what is left (4 = 2+2, 8 = 2+2+4,
//     12 = 2+2+3+5).
// The widths above 16 and below 16 bits are this design's reading, chosen so
// that the unit-gate area model below reproduces the published gate counts.
//
// Area model (csla_area, vm_area): every AND, OR and NOT is one unit, an XOR
// is 5 units, a 2:1 mux 4, a half adder 6 and a full adder 13. A (K+1)-bit
// BEC is 1 NOT, K-1 AND and K XOR. These functions only count; they describe
// the RTL in this package's modules and are used by the testbenches.
package vedic_pkg;

  typedef enum logic [1:0] {
    REG_LINEAR = 2'd0,
    MOD_LINEAR = 2'd1,
    REG_SQRT   = 2'd2,
    MOD_SQRT   = 2'd3
  } csla_kind_e;

  localparam int LINEAR_GROUP = 4;
  localparam int SQRT_BLOCK   = 16;

  // Unit-gate areas of the basic cells.
  localparam int AREA_XOR = 5;
  localparam int AREA_MUX = 4;
  localparam int AREA_HA  = 6;
  localparam int AREA_FA  = 13;

  function automatic bit is_sqrt(csla_kind_e kind);
    return kind == REG_SQRT || kind == MOD_SQRT;
  endfunction

  function automatic bit is_modified(csla_kind_e kind);
    return kind == MOD_LINEAR || kind == MOD_SQRT;
  endfunction

  // Size of group g of the 2,2,3,4,5 sequence (g = 0..4).
  function automatic int sqrt_seq(int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Number of groups of a SQRT schedule no wider than 16 bits.
  function automatic int sqrt_small_groups(int width);
    int used;
    int n;
    used = 0;
    n = 0;
    while (n < 5 && used + sqrt_seq(n) <= width) begin
      used += sqrt_seq(n);
      n++;
    end
    return n;
  endfunction

  // Size of group g of a SQRT schedule no wider than 16 bits.
  function automatic int sqrt_small_size(int width, int g);
    int n;
    int used;
    n = sqrt_small_groups(width);
    used = 0;
    for (int i = 0; i < n - 1; i++) used += sqrt_seq(i);
    return (g == n - 1) ? width - used : sqrt_seq(g);
  endfunction

  // True when the width can be built by the given architecture.
  function automatic bit csla_width_ok(csla_kind_e kind, int width);
    if (is_sqrt(kind))
      return (width >= 4 && width < SQRT_BLOCK && width % 4 == 0) ||
             (width >= SQRT_BLOCK && width % SQRT_BLOCK == 0);
    return width >= LINEAR_GROUP && width % LINEAR_GROUP == 0;
  endfunction

  function automatic int csla_num_groups(csla_kind_e kind, int width);
    if (!is_sqrt(kind)) return width / LINEAR_GROUP;
    if (width < SQRT_BLOCK) return sqrt_small_groups(width);
    return (width / SQRT_BLOCK) * 5;
  endfunction

  function automatic int csla_group_size(csla_kind_e kind, int width, int g);
    if (!is_sqrt(kind)) return LINEAR_GROUP;
    if (width < SQRT_BLOCK) return sqrt_small_size(width, g);
    return sqrt_seq(g % 5);
  endfunction

  // Least significant bit of group g.
  function automatic int csla_group_lo(csla_kind_e kind, int width, int g);
    int lo;
    lo = 0;
    for (int i = 0; i < g; i++) lo += csla_group_size(kind, width, i);
    return lo;
  endfunction

  // Group g is a plain RCA fed by the incoming carry (no carry select).
  function automatic bit csla_group_plain(csla_kind_e kind, int width, int g);
    if (is_sqrt(kind) && width >= SQRT_BLOCK) return (g % 5) == 0;
    return g == 0;
  endfunction

  // Unit-gate area of one carry-select group of k bits.
  function automatic int group_area(bit modified, int k);
    int rca0;
    rca0 = AREA_HA + (k - 1) * AREA_FA;
    if (modified)
      return rca0 + (1 + (k - 1) + k * AREA_XOR) + (k + 1) * AREA_MUX;
    return rca0 + k * AREA_FA + (k + 1) * AREA_MUX;
  endfunction

  function automatic int csla_area(csla_kind_e kind, int width);
    int area;
    int k;
    area = 0;
    for (int g = 0; g < csla_num_groups(kind, width); g++) begin
      k = csla_group_size(kind, width, g);
      if (csla_group_plain(kind, width, g)) area += k * AREA_FA;
      else area += group_area(is_modified(kind), k);
    end
    return area;
  endfunction

  // NxN multiplier: the 2x2 block is 4 AND + 2 HA; above that four half-size
  // multipliers, three N-bit CSLAs and one OR.
  function automatic longint vm_area(csla_kind_e kind, int n);
    if (n == 2) return 4 + 2 * AREA_HA;
    return 4 * vm_area(kind, n / 2) + 3 * csla_area(kind, n) + 1;
  endfunction

endpackage

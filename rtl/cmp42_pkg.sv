// Shared types for the approximate 4-2 compressor multipliers.
//
// cmp_kind_e names the three 4-2 compressor cells: the exact one and the two
// approximate designs.  mult_kind_e names the multiplier variants: the exact
// Dadda multiplier (reference) and approximate Multipliers 1 to 4.
// cmp_for_column() gives the compressor cell a variant uses in a given
// product column: Multipliers 1 and 2 use one approximate cell everywhere,
// Multipliers 3 and 4 use it in the N-1 least significant columns and the
// exact cell in the N most significant ones.
package cmp42_pkg;

  typedef enum logic [1:0] {
    CMP_EXACT = 2'd0,  // exact 4-2 compressor (two full adders)
    CMP_D1    = 2'd1,  // approximate Design 1 (keeps cin/cout)
    CMP_D2    = 2'd2   // approximate Design 2 (no cin/cout)
  } cmp_kind_e;

  typedef enum logic [2:0] {
    MULT_EXACT = 3'd0,  // exact Dadda multiplier, exact compressors only
    MULT_1     = 3'd1,  // Design 1 in all columns
    MULT_2     = 3'd2,  // Design 2 in all columns (own reduction layout)
    MULT_3     = 3'd3,  // Design 1 in LSB columns, exact in MSB columns
    MULT_4     = 3'd4   // Design 2 in LSB columns, exact in MSB columns
  } mult_kind_e;

  // Compressor cell of multiplier variant m in product column col of an
  // n x n multiplier.
  function automatic cmp_kind_e cmp_for_column(mult_kind_e m, int col, int n);
    case (m)
      MULT_1:  return CMP_D1;
      MULT_2:  return CMP_D2;
      MULT_3:  return (col < n - 1) ? CMP_D1 : CMP_EXACT;
      MULT_4:  return (col < n - 1) ? CMP_D2 : CMP_EXACT;
      default: return CMP_EXACT;
    endcase
  endfunction

endpackage

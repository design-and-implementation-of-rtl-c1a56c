// vedic_pkg: constants and types shared by the 4x4 Vedic multiplier.
//
// N is the operand width of the multiplier (4 bits). pp_t holds the full
// matrix of one-bit partial products: pp[i][j] is the product of operand
// bit A_i and operand bit B_j, which has weight 2^(i+j). Grouping the matrix
// by i+j gives the columns that the vertically-and-crosswise method adds.
package vedic_pkg;
  localparam int unsigned N = 4;          // operand width
  localparam int unsigned PW = 2 * N;     // product width

  typedef logic [N-1:0]             operand_t;
  typedef logic [PW-1:0]            product_t;
  typedef logic [N-1:0][N-1:0]      pp_t;   // pp[i][j] = A_i & B_j
endpackage

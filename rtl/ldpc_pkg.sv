// ldpc_pkg: constants and helpers shared by the LDPC decoder and its stream
// wrappers.
//
// The code is the CCSDS telecommand (128,64) binary LDPC code. Its 64x128
// parity-check matrix is a 4x8 array of 16x16 circulant blocks; each block
// row (a "layer") holds eight ones per check row, and two of them share a
// block column where the block is I + P^s. H_BASE lists, for each layer, the
// eight (block column, shift) pairs; P^s is the identity shifted right by s,
// so check row k of a layer meets variable bcol*16 + ((k + s) mod 16).
// The matrix entries come from the CCSDS standard, not from the verification
// flow that this design serves, which only names the code.
package ldpc_pkg;

  localparam int Z      = 16;          // circulant size
  localparam int NB_COL = 8;           // block columns
  localparam int NB_ROW = 4;           // block rows = layers
  localparam int CODE_N = Z * NB_COL;  // 128 code bits
  localparam int CODE_M = Z * NB_ROW;  // 64 parity checks
  localparam int DC     = 8;           // check-node degree

  typedef struct packed {
    logic [2:0] bcol;   // block column 0..7
    logic [3:0] shift;  // circulant shift 0..15
  } circ_t;

  // Layer-by-layer list of the nonzero circulants (I is shift 0).
  localparam circ_t H_BASE [NB_ROW][DC] = '{
    '{'{3'd0, 4'd0}, '{3'd0, 4'd7},  '{3'd1, 4'd2},  '{3'd2, 4'd14},
      '{3'd3, 4'd6}, '{3'd5, 4'd0},  '{3'd6, 4'd13}, '{3'd7, 4'd0}},
    '{'{3'd0, 4'd6}, '{3'd1, 4'd0},  '{3'd1, 4'd15}, '{3'd2, 4'd0},
      '{3'd3, 4'd1}, '{3'd4, 4'd0},  '{3'd6, 4'd0},  '{3'd7, 4'd7}},
    '{'{3'd0, 4'd4}, '{3'd1, 4'd1},  '{3'd2, 4'd0},  '{3'd2, 4'd15},
      '{3'd3, 4'd14}, '{3'd4, 4'd11}, '{3'd5, 4'd0}, '{3'd7, 4'd3}},
    '{'{3'd0, 4'd0}, '{3'd1, 4'd1},  '{3'd2, 4'd9},  '{3'd3, 4'd0},
      '{3'd3, 4'd13}, '{3'd4, 4'd14}, '{3'd5, 4'd1}, '{3'd6, 4'd0}}
  };

  // Variable node met by edge e of check row k in layer l.
  function automatic int unsigned vn_index(logic [1:0] l, int unsigned k, logic [2:0] e);
    return int'(H_BASE[l][e].bcol) * Z + ((k + int'(H_BASE[l][e].shift)) % Z);
  endfunction

  // Width of an iteration counter that can hold 0..max_iter.
  function automatic int unsigned iter_width(int unsigned max_iter);
    return (max_iter < 1) ? 1 : $clog2(max_iter + 1);
  endfunction

endpackage

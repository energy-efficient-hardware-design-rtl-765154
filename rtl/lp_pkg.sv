// Shared types and constants for the low-power test designs.
//
// alu_op_e numbers the eight operations of the ALU processor; the encoder turns
// a 3-bit SEL into a one-hot enable in this order. The zigzag order of an 8x8
// JPEG block is produced by a function rather than a stored table. The
// operation codes are this design's choice.
package lp_pkg;

  typedef enum logic [2:0] {
    OP_AND = 3'd0,
    OP_OR  = 3'd1,
    OP_ADD = 3'd2,
    OP_SUB = 3'd3,
    OP_SHL = 3'd4,
    OP_SHR = 3'd5,
    OP_MUL = 3'd6,
    OP_DIV = 3'd7
  } alu_op_e;

  // Row-major position (row*8+col) of the k-th coefficient in zigzag order.
  // Walks the anti-diagonals s = row+col, going up-right on even s and
  // down-left on odd s.
  function automatic logic [5:0] zigzag_pos(input int unsigned k);
    int unsigned n;
    int unsigned r;
    int unsigned c;
    n = 0;
    for (int s = 0; s < 15; s++) begin
      for (int t = 0; t < 8; t++) begin
        if (s % 2 == 0) begin
          r = (s < 8) ? s - t : 7 - t;
          c = s - r;
        end else begin
          c = (s < 8) ? s - t : 7 - t;
          r = s - c;
        end
        if (r < 8 && c < 8 && r <= s && c <= s && (r + c) == s) begin
          if (n == k) return 6'(r * 8 + c);
          n++;
        end
      end
    end
    return 6'd0;
  endfunction

endpackage

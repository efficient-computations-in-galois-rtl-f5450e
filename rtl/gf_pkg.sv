// gf_pkg: types shared by the GF(2^m) arithmetic blocks.
//
// The systolic divider's linear-equation array passes an elementary row
// operation between neighbouring processors as two wires, h and f:
//   (h,f) = (0,0)  leave the passing row unchanged
//   (h,f) = (1,0)  add the resident pivot row to the passing row
//   (h,f) = (1,1)  interchange the passing row and the resident row
// The encoding is the one of the elimination scheme; the packing into a
// struct is this design's choice.
package gf_pkg;

  typedef struct packed {
    logic h;
    logic f;
  } gj_op_t;

  localparam gj_op_t GJ_PASS = '{h: 1'b0, f: 1'b0};
  localparam gj_op_t GJ_ADD  = '{h: 1'b1, f: 1'b0};
  localparam gj_op_t GJ_SWAP = '{h: 1'b1, f: 1'b1};

  // Number change requests of the rate-adaptive generator-polynomial unit.
  typedef enum logic [1:0] {
    DR_HOLD = 2'b00,  // redundancy unchanged
    DR_INC  = 2'b10,  // one more parity symbol
    DR_DEC  = 2'b11   // one parity symbol fewer
  } del_r_t;

endpackage

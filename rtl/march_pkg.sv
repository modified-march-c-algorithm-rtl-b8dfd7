// march_pkg: types and constants shared by the Modified March C- memory BIST.
//
// The test runs the same six March elements on two halves of the memory at
// once. Subgroup M1 (lower half of the address space) receives the element's
// data value as written in the algorithm below; subgroup M2 (upper half)
// receives its complement, produced by a single inverter:
//
//   M1: { up(w0); up(r0,w1); up(r1); down(w0); down(r0,w1); down(r1) }
//   M2: { up(w1); up(r1,w0); up(r0); down(w1); down(r1,w0); down(r0) }
//
// The element table, the 256 x 8 default size and the M1/M2 split follow the
// algorithm description. The encoding of the table (one descriptor per
// element, at most two operations each) and the fault-injection types used by
// the memory model are choices of this implementation.
package march_pkg;

  // Memory under test: 256 words of 8 bits.
  localparam int unsigned MEM_ADDR_W = 8;
  localparam int unsigned MEM_DATA_W = 8;

  localparam int unsigned NUM_ELEMS = 6;

  typedef enum logic {
    DIR_UP   = 1'b0,
    DIR_DOWN = 1'b1
  } dir_e;

  typedef enum logic {
    OP_READ  = 1'b0,
    OP_WRITE = 1'b1
  } op_kind_e;

  // One primitive: read or write, with the value for subgroup M1.
  typedef struct packed {
    op_kind_e kind;
    logic     val;
  } march_op_t;

  // One March element: address order, number of operations (1 or 2) and
  // the operations applied to each address in turn.
  typedef struct packed {
    dir_e      dir;
    logic      two_ops;
    march_op_t op0;
    march_op_t op1;
  } march_elem_t;

  // Modified March C-, as seen from subgroup M1.
  function automatic march_elem_t elem_desc(input logic [2:0] idx);
    march_elem_t e;
    unique case (idx)
      3'd0:    e = '{dir: DIR_UP,   two_ops: 1'b0, op0: '{OP_WRITE, 1'b0}, op1: '{OP_READ,  1'b0}};
      3'd1:    e = '{dir: DIR_UP,   two_ops: 1'b1, op0: '{OP_READ,  1'b0}, op1: '{OP_WRITE, 1'b1}};
      3'd2:    e = '{dir: DIR_UP,   two_ops: 1'b0, op0: '{OP_READ,  1'b1}, op1: '{OP_READ,  1'b0}};
      3'd3:    e = '{dir: DIR_DOWN, two_ops: 1'b0, op0: '{OP_WRITE, 1'b0}, op1: '{OP_READ,  1'b0}};
      3'd4:    e = '{dir: DIR_DOWN, two_ops: 1'b1, op0: '{OP_READ,  1'b0}, op1: '{OP_WRITE, 1'b1}};
      default: e = '{dir: DIR_DOWN, two_ops: 1'b0, op0: '{OP_READ,  1'b1}, op1: '{OP_READ,  1'b0}};
    endcase
    return e;
  endfunction

  // Faults the memory model can be made to show, one cell bit at a time.
  typedef enum logic [1:0] {
    FLT_SA0     = 2'd0,  // bit always reads 0
    FLT_SA1     = 2'd1,  // bit always reads 1
    FLT_TF_UP   = 2'd2,  // bit cannot make a 0 -> 1 transition
    FLT_TF_DOWN = 2'd3   // bit cannot make a 1 -> 0 transition
  } fault_kind_e;

endpackage

// tinker_pkg: types and constants shared by the silo-cache instruction fetch unit.
//
// A TINKER Op is a 64-bit word. Its fields, from the most significant bit down, are:
// header bit H (first Op of a MultiOp), tail bit T (last Op of a MultiOp), SP (1 bit), PAUSE
// (5 bits), FUT (2 bits, the functional-unit type the Op is destined for), a 47-bit operation
// encoding and a 7-bit predicate field PRED. The field widths and their order are the TINKER
// format; placing H at bit 63 is this design's choice, as is the numeric code of each FUType.
//
// The machine is TINKER-8: eight functional-unit slots, IALU, IALU, PRED, FPADD, FPMUL, LD, ST
// and BR. Slots 0-2 take integer/predicate Ops, 3-4 floating-point, 5-6 memory and 7 branch.
// In a rigid silo cache silo c feeds FU slot c.
//
// A silo does not keep H, T or FUT: it stores the remaining 60 bits (silo_op_t). A flexible
// silo keeps FUT as well, because its hit-path expander needs it.
package tinker_pkg;

  localparam int unsigned N_FU      = 8;   // TINKER-8 issue width
  localparam int unsigned OP_BYTES  = 8;   // bytes per Op
  localparam int unsigned ADDR_BITS = 32;  // byte address width

  typedef logic [ADDR_BITS-1:0] addr_t;

  typedef enum logic [1:0] {
    FUT_INT = 2'd0,   // integer computation and predicate handling
    FUT_FP  = 2'd1,   // floating point add/mul/div/convert
    FUT_MEM = 2'd2,   // loads and stores
    FUT_BR  = 2'd3    // branch
  } fut_e;

  // One TINKER Op as held in memory.
  typedef struct packed {
    logic        h;       // header: first Op of its MultiOp
    logic        t;       // tail: last Op of its MultiOp
    logic        sp;
    logic [4:0]  pause;
    fut_e        fut;
    logic [46:0] enc;     // operation encoding
    logic [6:0]  pred;
  } op_t;

  // Integer add Op: layout of the 47-bit operation encoding.
  typedef struct packed {
    logic [5:0] opcode;
    logic [7:0] s1;
    logic [7:0] s2;
    logic [1:0] bhwx;
    logic [7:0] imm;      // IMM[8:15]
    logic [5:0] rsvd;
    logic [7:0] dst;
    logic       l1;
  } int_add_enc_t;

  // The part of an Op that a silo stores (H, T and FUT dropped).
  typedef struct packed {
    logic        sp;
    logic [4:0]  pause;
    logic [46:0] enc;
    logic [6:0]  pred;
  } silo_op_t;

  // FUType of each FU slot.
  localparam fut_e FU_TYPE [N_FU] = '{FUT_INT, FUT_INT, FUT_INT, FUT_FP,
                                      FUT_FP,  FUT_MEM, FUT_MEM, FUT_BR};

  function automatic silo_op_t strip_op(op_t op);
    silo_op_t s;
    s.sp    = op.sp;
    s.pause = op.pause;
    s.enc   = op.enc;
    s.pred  = op.pred;
    return s;
  endfunction

  // Position of FU slot f among the slots of its own FUType (0 for the first IALU, 1 for the
  // second, ...).
  function automatic int unsigned rank_in_type(int unsigned f);
    int unsigned r;
    r = 0;
    for (int unsigned g = 0; g < N_FU; g++)
      if (g < f && FU_TYPE[g] == FU_TYPE[f]) r++;
    return r;
  endfunction

endpackage

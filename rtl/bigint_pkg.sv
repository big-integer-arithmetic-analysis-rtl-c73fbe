// bigint_pkg: types and constants shared by the vectorised big-integer core.
//
// The core executes five element operations, each looped over VL elements
// in strict element order: adde and subfe (64-bit add/subtract with the 1-bit
// carry XER.CA), maddedu (multiply-add with the 64-bit high half as output),
// dsrd (double shift right with the 64-bit shifted-out bits as output) and
// divmod2du (128/64 divide with the remainder as output). The three 3-in
// 2-out operations have a second destination RS, which is either RC itself
// (RS=RC mode) or RT+MAXVL (RS=RT+MAXVL mode), chosen by one mode bit.
//
// The instruction reaches the core already decoded (sv_instr_t): the prefix
// bit layout is outside this design. Register numbers are 7 bits (r0-r127).
package bigint_pkg;

  localparam int unsigned XLEN    = 64;   // element / digit width
  localparam int unsigned NREGS   = 128;  // r0..r127
  localparam int unsigned RIDX_W  = 7;    // register number width
  localparam int unsigned VL_W    = 8;    // VL and MAXVL field width (0..128)

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [2:0] {
    OP_ADDE      = 3'd0,  // RT = RA + RB + CA,  CA = carry out
    OP_SUBFE     = 3'd1,  // RT = ~RA + RB + CA, CA = carry out
    OP_MADDEDU   = 3'd2,  // RT,RS = lo,hi (RA*RB + RC)
    OP_DSRD      = 3'd3,  // RT,RS = double shift right of RA by RB[5:0], RC merged
    OP_DIVMOD2DU = 3'd4   // RT,RS = (RC||RA) / RB, (RC||RA) % RB
  } sv_op_e;

  // Where the second result of a 3-in 2-out operation goes.
  typedef enum logic {
    RS_IS_RC       = 1'b0,
    RS_IS_RT_MAXVL = 1'b1
  } rs_mode_e;

  // A decoded SVP64 big-integer instruction. *_v marks an operand as a
  // vector (register number steps by one per element) or a scalar (same
  // register for every element). RC is unused by adde and subfe.
  typedef struct packed {
    sv_op_e              op;
    ridx_t               rt;
    ridx_t               ra;
    ridx_t               rb;
    ridx_t               rc;
    logic                rt_v;
    logic                ra_v;
    logic                rb_v;
    logic                rc_v;
    rs_mode_e            rs_mode;
    logic                reverse;  // element order VL-1 down to 0
    logic [VL_W-1:0]     vl;       // number of elements, 1..MAXVL
    logic [VL_W-1:0]     maxvl;    // offset of RS in RS=RT+MAXVL mode
  } sv_instr_t;

  // Register number of element i of an operand (wraps modulo 128).
  function automatic ridx_t elem_reg(ridx_t base, logic vec, logic [VL_W-1:0] i);
    return vec ? ridx_t'(base + ridx_t'(i)) : base;
  endfunction

  // Does register r fall inside the registers an operand touches over VL?
  function automatic logic touches(ridx_t base, logic vec, logic [VL_W-1:0] vl, ridx_t r);
    logic [VL_W-1:0] off;
    off = {1'b0, ridx_t'(r - base)};
    return vec ? (off < vl) : (r == base);
  endfunction

endpackage

// vl_pkg: types and helpers shared by the value-locality register management blocks.
//
// The design reserves physical registers P0..P(NUM_STATIC-1) for the statically
// determined values 0..NUM_STATIC-1 (P0 holds 0, P1 holds 1). Operands carry a
// two-bit value state that says whether their value is one of these constants
// (and which) or must be read from the register file. The two-bit encoding with
// room for 0, 1, 2 and "unknown" follows the document; the numeric code points
// are this design's choice.
package vl_pkg;

  // Two-bit operand value state. VS_REG means "unknown: read the register file".
  typedef enum logic [1:0] {
    VS_REG  = 2'd0,
    VS_ZERO = 2'd1,
    VS_ONE  = 2'd2,
    VS_TWO  = 2'd3
  } vstate_e;

  // Outcome of the writeback reuse check.
  typedef enum logic [1:0] {
    RU_NONE    = 2'd0,  // new value: keep the allocated register
    RU_STATIC  = 2'd1,  // value is 0/1: result lives in a reserved register
    RU_DYNAMIC = 2'd2   // duplicate found in the Value Cache
  } reuse_e;

  // Value state of a result, given how many small constants are reserved (at most 3).
  function automatic vstate_e classify(input logic [63:0] value, input int unsigned nstatic);
    if (nstatic > 0 && value == 64'd0) return VS_ZERO;
    if (nstatic > 1 && value == 64'd1) return VS_ONE;
    if (nstatic > 2 && value == 64'd2) return VS_TWO;
    return VS_REG;
  endfunction

  // Constant carried by a known value state (VS_REG yields 0 and is never used as a value).
  function automatic logic [63:0] vstate_value(input vstate_e vs);
    case (vs)
      VS_ONE:  return 64'd1;
      VS_TWO:  return 64'd2;
      default: return 64'd0;
    endcase
  endfunction

endpackage

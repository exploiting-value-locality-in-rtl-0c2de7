// reuse_ctrl: decides, for each produced result, where its value will live.
//
// Three outcomes, checked in this order:
//   RU_STATIC  - the value is one of the reserved constants (0 or 1): the result
//                "lives" in P0/P1, nothing is written to the register file, the
//                destination is re-mapped to the reserved register, and the
//                register allocated for the result is given up to the normal
//                partition of the free list (its consumers take the value from
//                their state bits and never read it);
//   RU_DYNAMIC - the Value Cache found the value in another register: that
//                register's count is incremented, the destination is re-mapped
//                to it, an Alias Table entry <allocated, found> is created, and
//                the allocated register is still written (its waiting consumers
//                read it) and then given up to the second free-list partition;
//   RU_NONE    - the value is new: it is written to the allocated register and
//                entered in the Value Cache.
// The static and dynamic outcomes are the document's two schemes; running them
// together, and skipping dynamic reuse when the allocated register still has a
// live Alias Table entry, are this design's choices. DYNAMIC_REUSE=0 leaves only
// the static 0/1 scheme. SKIP_DUP_WRITE=1 is the document's alternative of not
// writing a dynamic duplicate at all; its waiting consumers must then read the
// found register through the Alias Table (the top wakes them with the alias bit).
// ALIAS_FREE=1 is the document's plain Alias Table scheme: the allocated register
// is not written either, and goes straight back to the normal free-list partition.
//
// Purely combinational; the registered structures act on its outputs at the
// next rising edge.
module reuse_ctrl
  import vl_pkg::*;
#(
  parameter int unsigned NUM_PREGS     = 60,
  parameter int unsigned XLEN          = 64,
  parameter int unsigned NUM_STATIC    = 2,
  parameter bit          DYNAMIC_REUSE = 1'b1,
  parameter bit          SKIP_DUP_WRITE = 1'b0,
  parameter bit          ALIAS_FREE     = 1'b0,
  localparam int unsigned TAGW         = $clog2(NUM_PREGS)
) (
  input  logic            wb_valid,
  input  logic [TAGW-1:0] wb_preg,
  input  logic [XLEN-1:0] wb_value,
  input  logic            vc_hit,
  input  logic [TAGW-1:0] vc_preg,
  input  logic            alias_live,
  output reuse_e          kind,
  output logic [TAGW-1:0] final_preg,
  output vstate_e         vstate,
  output logic            prf_write,
  output logic            vc_insert,
  output logic            remap_req,
  output logic            rc_inc,
  output logic            rc_drop,
  output logic            drop_to_p2,
  output logic            alias_create
);

  always_comb begin
    vstate     = classify(64'(wb_value), NUM_STATIC);
    kind       = RU_NONE;
    final_preg = wb_preg;
    if (wb_valid) begin
      if (vstate != VS_REG) begin
        kind       = RU_STATIC;
        final_preg = TAGW'(vstate) - TAGW'(1);
      end else if (DYNAMIC_REUSE && vc_hit && !alias_live) begin
        kind       = RU_DYNAMIC;
        final_preg = vc_preg;
      end
    end
    prf_write    = wb_valid && (kind == RU_NONE ||
                                (kind == RU_DYNAMIC && !SKIP_DUP_WRITE && !ALIAS_FREE));
    vc_insert    = DYNAMIC_REUSE && wb_valid && kind == RU_NONE;
    remap_req    = kind != RU_NONE;
    rc_inc       = kind == RU_DYNAMIC;
    rc_drop      = kind != RU_NONE;
    drop_to_p2   = kind == RU_DYNAMIC && !ALIAS_FREE;
    alias_create = kind == RU_DYNAMIC;
  end

endmodule

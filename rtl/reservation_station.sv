// reservation_station: instruction window whose operands carry value-state bits.
//
// Each entry holds an instruction id and two source operands. Per operand it keeps
// the physical register tag, a ready bit, a two-bit value state (REG = read the
// register file, or a known constant 0/1/2) and an alias bit. The wakeup broadcast
// of a completing result carries, besides its register tag, the value state of the
// result, so a consumer waiting for a 0 or a 1 learns the value itself and will
// never read the register file for it (document). A re-allocation broadcast names
// a register that was given up by re-mapping and is now handed to a new
// instruction; waiting consumers of it set their alias bit and will read through
// the Alias Table (document: "Instructions waiting in reservation stations ... are
// informed to consult the Alias Table").
// With TAG_UPDATE set, the broadcast instead carries the register now holding the
// value, and those consumers take it as their new tag: the alternative the document
// describes of updating source tags in the reservation stations, which removes the
// Alias Table from the read path.
// A wakeup with wk_alias set (a duplicate result that was not written) marks the
// woken operands as aliased at once (or, with TAG_UPDATE, gives them wk_new).
// With ALIAS_PENALTY set, the Alias Table costs a cycle (the slower table of the
// evaluation): an entry with an operand to be read through the table holds the
// issue slot for one cycle, without issuing, the first time it is selected.
//
// This design's choices: one insert and one issue per cycle; the lowest-numbered
// ready entry issues; an operand inserted in the same cycle as the wakeup of its
// tag is caught by the wakeup; flush empties the window.
//
// Timing: ins_ready and the issue outputs are combinational from the state; the
// inserted entry, wakeups and the removal of an issued entry (is_valid && is_ack)
// take effect at the next rising edge.
module reservation_station
  import vl_pkg::*;
#(
  parameter int unsigned NUM_PREGS = 60,
  parameter int unsigned ENTRIES   = 128,
  parameter int unsigned IDW       = 8,
  parameter bit          TAG_UPDATE = 1'b0,
  parameter bit          ALIAS_PENALTY = 1'b0,
  localparam int unsigned TAGW     = $clog2(NUM_PREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // insert
  input  logic            ins_valid,
  output logic            ins_ready,
  input  logic [IDW-1:0]  ins_id,
  input  logic [TAGW-1:0] ins_tag   [2],
  input  logic            ins_rdy   [2],
  input  vstate_e         ins_vs    [2],
  // wakeup broadcast
  input  logic            wk_valid,
  input  logic [TAGW-1:0] wk_tag,
  input  vstate_e         wk_vstate,
  input  logic            wk_alias,   // result not written: read wk_new instead
  input  logic [TAGW-1:0] wk_new,
  // re-allocation of a register taken from the second free-list partition
  input  logic            ra_valid,
  input  logic [TAGW-1:0] ra_tag,
  input  logic [TAGW-1:0] ra_new,
  // issue
  output logic            is_valid,
  input  logic            is_ack,
  output logic [IDW-1:0]  is_id,
  output logic [TAGW-1:0] is_tag    [2],
  output vstate_e         is_vs     [2],
  output logic            is_alias  [2],
  output logic            is_alias_wait,   // slot held for an Alias Table access
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  typedef struct packed {
    logic [TAGW-1:0] tag;
    logic            rdy;
    vstate_e         vs;
    logic            alias_b;
  } opnd_t;

  typedef struct packed {
    logic           valid;
    logic           al_done;   // Alias Table access already paid (ALIAS_PENALTY)
    logic [IDW-1:0] id;
    opnd_t [1:0]    src;
  } entry_t;

  localparam int unsigned IW = $clog2(ENTRIES);

  entry_t        ent_q [ENTRIES];
  logic          free_hit, sel_hit, al_wait;
  logic [IW-1:0] free_idx, sel_idx;

  always_comb begin
    free_hit = 1'b0; free_idx = '0;
    sel_hit  = 1'b0; sel_idx  = '0;
    occupancy = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!ent_q[i].valid) begin free_hit = 1'b1; free_idx = IW'(i); end
      if (ent_q[i].valid && ent_q[i].src[0].rdy && ent_q[i].src[1].rdy) begin
        sel_hit = 1'b1; sel_idx = IW'(i);
      end
      occupancy = occupancy + ($clog2(ENTRIES+1))'(ent_q[i].valid);
    end
    ins_ready = free_hit;
    al_wait   = ALIAS_PENALTY && sel_hit && !ent_q[sel_idx].al_done &&
                ((ent_q[sel_idx].src[0].alias_b && ent_q[sel_idx].src[0].vs == VS_REG) ||
                 (ent_q[sel_idx].src[1].alias_b && ent_q[sel_idx].src[1].vs == VS_REG));
    is_valid  = sel_hit && !al_wait;
    is_alias_wait = al_wait;
    is_id     = ent_q[sel_idx].id;
    for (int s = 0; s < 2; s++) begin
      is_tag[s]   = ent_q[sel_idx].src[s].tag;
      is_vs[s]    = ent_q[sel_idx].src[s].vs;
      is_alias[s] = ent_q[sel_idx].src[s].alias_b;
    end
  end

  entry_t new_ent;

  function automatic opnd_t snoop(input opnd_t o, input logic wv, input logic [TAGW-1:0] wt,
                                  input vstate_e wvs, input logic wa, input logic [TAGW-1:0] wn,
                                  input logic rv, input logic [TAGW-1:0] rt,
                                  input logic [TAGW-1:0] rn);
    opnd_t r = o;
    if (wv && !o.rdy && o.tag == wt) begin
      r.rdy = 1'b1;
      r.vs  = wvs;
      if (wa) begin
        if (TAG_UPDATE) r.tag = wn;
        else            r.alias_b = 1'b1;
      end
    end
    if (rv && o.rdy && o.vs == VS_REG && o.tag == rt) begin
      if (TAG_UPDATE) r.tag = rn;
      else            r.alias_b = 1'b1;
    end
    return r;
  endfunction

  // entry written by an insert, catching a same-cycle wakeup of its operands
  always_comb begin
    new_ent.valid = 1'b1;
    new_ent.al_done = 1'b0;
    new_ent.id    = ins_id;
    for (int s = 0; s < 2; s++) begin
      opnd_t o;
      o.tag     = ins_tag[s];
      o.rdy     = ins_rdy[s];
      o.vs      = ins_rdy[s] ? ins_vs[s] : VS_REG;
      o.alias_b = 1'b0;
      new_ent.src[s] = snoop(o, wk_valid, wk_tag, wk_vstate, wk_alias, wk_new, 1'b0, '0, '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i].valid <= 1'b0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        for (int s = 0; s < 2; s++)
          ent_q[i].src[s] <= snoop(ent_q[i].src[s], wk_valid, wk_tag, wk_vstate, wk_alias, wk_new,
                                     ra_valid, ra_tag, ra_new);
      end
      if (al_wait) ent_q[sel_idx].al_done <= 1'b1;
      if (is_valid && is_ack) ent_q[sel_idx].valid <= 1'b0;
      if (ins_valid && ins_ready) ent_q[free_idx] <= new_ent;
    end
  end

endmodule

// vl_regmgr: register renaming and physical register file that exploit value
// locality.
//
// A result that is already present in some physical register does not keep a
// register of its own. At writeback the value is classified:
//  * 0 or 1: the destination is re-mapped to the reserved register P0/P1, which
//    has no storage; the register file write is suppressed and consumers learn the
//    value from the value state carried by the wakeup broadcast, so they never read
//    the register file for it;
//  * a value the Value Cache finds in register M: the destination is re-mapped to
//    M, M's reference count is incremented, the allocated register is written (its
//    waiting consumers read it) and given up to the second free-list partition,
//    and an Alias Table entry redirects those consumers to M should the register
//    be handed out again before they read it;
//  * a new value: written normally and entered in the Value Cache.
// The re-mapping writes the rename map only if no later instruction has renamed the
// destination since. Commit releases the committed mapping the instruction
// overwrites by decrementing its reference count; at zero the register returns to
// the first free-list partition, its Value Cache entry is invalidated and Alias
// Table entries pointing at it are freed.
//
// Sub-blocks: rename_map, refcount_table, partitioned_free_list, value_cache,
// alias_table, reuse_ctrl, reservation_station, phys_regfile, plus a ready bit per
// physical register used at rename.
//
// Interface (one operation of each kind per cycle, this design's choice; the core
// around it is outside):
//  rename    rn_valid, rn_id, rn_lsrc[2], rn_ldest -> rn_preg, accepted when
//            !rn_stall (no free register or no window slot stalls);
//  issue     is_valid, is_id, is_opnd[2] (operand values), is_ack from execution;
//  writeback wb_valid, wb_preg (allocated register), wb_ldest, wb_value ->
//            wb_final_preg (register now holding the result, to be kept by the
//            core for commit) and wb_kind;
//  commit    cm_valid, cm_ldest, cm_preg (the final register), in program order;
//  flush     discards every uncommitted instruction; other inputs are ignored in
//            that cycle.
// Timing: all lookups are combinational, all state changes at the rising edge. An
// instruction renamed in cycle t can issue at t+1; a consumer woken by a writeback
// in cycle t can issue at t+1 and reads the written value.
// The mechanisms follow the document; the single-ported interface, combining the
// static and Value-Cache schemes, reset to P0 and the flush are this design's.
// TAG_UPDATE selects the document's alternative to reading through the Alias
// Table: on re-allocation the window rewrites the affected source tags to the
// register now holding the value (looked up in the Alias Table at rename).
// ALIAS_PENALTY models an Alias Table that takes a cycle: an instruction that reads
// through it holds the issue slot one extra cycle (counted in stat_alias_stalls).
// SKIP_DUP_WRITE does not write a Value-Cache duplicate either; its waiting
// consumers are woken with the alias bit set and read the found register.
// ALIAS_FREE selects the document's plain Alias Table scheme instead of the
// partitioned free list: such a register is also not written, and is freed at
// once to the first partition; its consumers read through the Alias Table.
module vl_regmgr
  import vl_pkg::*;
#(
  parameter int unsigned NUM_PREGS     = 60,
  parameter int unsigned XLEN          = 64,
  parameter int unsigned NUM_STATIC    = 2,
  parameter int unsigned NUM_LREGS     = 32,
  parameter int unsigned ENTRIES       = 128,
  parameter int unsigned IDW           = 8,
  parameter bit          DYNAMIC_REUSE = 1'b1,
  parameter bit          TAG_UPDATE    = 1'b0,
  parameter bit          ALIAS_PENALTY = 1'b0,
  parameter bit          SKIP_DUP_WRITE = 1'b0,
  parameter bit          ALIAS_FREE     = 1'b0,
  localparam int unsigned TAGW         = $clog2(NUM_PREGS),
  localparam int unsigned LW           = $clog2(NUM_LREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // rename
  input  logic            rn_valid,
  input  logic [IDW-1:0]  rn_id,
  input  logic [LW-1:0]   rn_lsrc [2],
  input  logic [LW-1:0]   rn_ldest,
  output logic            rn_stall,
  output logic [TAGW-1:0] rn_preg,
  // issue
  output logic            is_valid,
  input  logic            is_ack,
  output logic [IDW-1:0]  is_id,
  output logic [XLEN-1:0] is_opnd [2],
  // writeback
  input  logic            wb_valid,
  input  logic [TAGW-1:0] wb_preg,
  input  logic [LW-1:0]   wb_ldest,
  input  logic [XLEN-1:0] wb_value,
  output logic [TAGW-1:0] wb_final_preg,
  output reuse_e          wb_kind,
  // commit
  input  logic            cm_valid,
  input  logic [LW-1:0]   cm_ldest,
  input  logic [TAGW-1:0] cm_preg,
  // statistics
  output logic [31:0]     stat_rf_writes,
  output logic [31:0]     stat_rf_writes_saved,
  output logic [31:0]     stat_rf_reads,
  output logic [31:0]     stat_rf_reads_saved,
  output logic [31:0]     stat_map_writes_rename,
  output logic [31:0]     stat_map_writes_remap,
  output logic [31:0]     stat_reuse_static,
  output logic [31:0]     stat_reuse_dynamic,
  output logic [31:0]     stat_alloc_p2,
  output logic [31:0]     stat_alias_reads,
  output logic [31:0]     stat_alias_stalls,
  output logic [TAGW:0]   free_count1,
  output logic [TAGW:0]   free_count2,
  output logic [$clog2(ENTRIES+1)-1:0] rs_occupancy
);

  // ---------------- gating ----------------
  logic rn_go, wb_go, cm_go;
  logic fl_valid, fl_p2, rs_ins_ready;
  assign rn_stall = !fl_valid || !rs_ins_ready;
  assign rn_go    = rn_valid && !rn_stall && !flush;
  assign wb_go    = wb_valid && !flush;
  assign cm_go    = cm_valid && !flush;

  // ---------------- writeback decision ----------------
  logic            vc_hit;
  logic [TAGW-1:0] vc_preg;
  logic [NUM_PREGS-1:0] alias_live;
  reuse_e          kind;
  logic [TAGW-1:0] final_preg;
  vstate_e         wb_vs;
  logic prf_write, vc_insert, remap_req, rc_inc, rc_drop, drop_to_p2, alias_create;

  reuse_ctrl #(.NUM_PREGS(NUM_PREGS), .XLEN(XLEN), .NUM_STATIC(NUM_STATIC),
               .DYNAMIC_REUSE(DYNAMIC_REUSE), .SKIP_DUP_WRITE(SKIP_DUP_WRITE),
               .ALIAS_FREE(ALIAS_FREE)) u_reuse (
    .wb_valid(wb_go), .wb_preg, .wb_value, .vc_hit, .vc_preg,
    .alias_live(alias_live[wb_preg]), .kind, .final_preg, .vstate(wb_vs), .prf_write,
    .vc_insert, .remap_req, .rc_inc, .rc_drop, .drop_to_p2, .alias_create);

  assign wb_final_preg = final_preg;
  assign wb_kind       = kind;

  // ---------------- rename map ----------------
  logic [TAGW-1:0] src_preg [2];
  logic            rm_done, cm_old_valid;
  logic [TAGW-1:0] cm_old_preg;
  logic [TAGW-1:0] commit_map [NUM_LREGS];

  rename_map #(.NUM_PREGS(NUM_PREGS), .NUM_LREGS(NUM_LREGS)) u_map (
    .clk, .rst_n, .rs_lreg(rn_lsrc), .rs_preg(src_preg),
    .rn_valid(rn_go), .rn_lreg(rn_ldest), .rn_preg,
    .rm_valid(remap_req), .rm_lreg(wb_ldest), .rm_expect(wb_preg), .rm_preg(final_preg),
    .rm_done, .cm_valid(cm_go), .cm_lreg(cm_ldest), .cm_preg, .cm_old_valid, .cm_old_preg,
    .flush, .commit_map);

  // ---------------- reference counts and free list ----------------
  logic [NUM_PREGS-1:0] free_normal, free_remap, flush_free, freed;

  refcount_table #(.NUM_PREGS(NUM_PREGS), .NUM_STATIC(NUM_STATIC), .NUM_LREGS(NUM_LREGS)) u_rc (
    .clk, .rst_n, .alloc_valid(rn_go), .alloc_preg(rn_preg),
    .inc_valid(rc_inc), .inc_preg(vc_preg), .drop_valid(rc_drop), .drop_preg(wb_preg),
    .rel_valid(cm_go && cm_old_valid), .rel_preg(cm_old_preg),
    .flush, .commit_map, .free_normal, .free_remap, .flush_free, .count());

  assign freed = free_normal | free_remap;

  partitioned_free_list #(.NUM_PREGS(NUM_PREGS), .NUM_STATIC(NUM_STATIC)) u_fl (
    .clk, .rst_n, .alloc_req(rn_valid && rs_ins_ready && !flush), .alloc_valid(fl_valid),
    .alloc_preg(rn_preg), .alloc_from_p2(fl_p2),
    .free1_mask(free_normal | (drop_to_p2 ? '0 : free_remap)),
    .free2_mask(drop_to_p2 ? free_remap : '0),
    .flush, .flush_free, .count1(free_count1), .count2(free_count2));

  // ---------------- value cache and alias table ----------------
  value_cache #(.NUM_PREGS(NUM_PREGS), .XLEN(XLEN), .NUM_STATIC(NUM_STATIC)) u_vc (
    .clk, .rst_n, .lookup_value(wb_value), .lookup_hit(vc_hit), .lookup_preg(vc_preg),
    .ins_valid(vc_insert), .ins_preg(wb_preg), .ins_value(wb_value),
    .inv_mask(flush ? flush_free : freed));

  logic [TAGW-1:0] is_tag [2];
  vstate_e         is_vs [2];
  logic            is_alias [2];
  logic            is_alias_wait;
  logic            al_hit [3];
  logic [TAGW-1:0] al_new [3];
  logic [TAGW-1:0] al_tag [3];

  // ports 0/1: aliased operand reads at issue; port 2: the register being
  // re-allocated at rename (used only with TAG_UPDATE)
  assign al_tag[0] = is_tag[0];
  assign al_tag[1] = is_tag[1];
  assign al_tag[2] = rn_preg;

  alias_table #(.NUM_PREGS(NUM_PREGS), .NPORTS(3)) u_alias (
    .clk, .rst_n, .create_valid(alias_create), .create_old(wb_preg), .create_new(vc_preg),
    .free_mask(freed), .flush, .lk_tag(al_tag), .lk_hit(al_hit), .lk_new(al_new),
    .live(alias_live));

  // ---------------- ready bits (producer has written back) ----------------
  logic [NUM_PREGS-1:0] ready_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_q <= '1;
    end else if (flush) begin
      ready_q <= '1;
    end else begin
      if (wb_go) ready_q[wb_preg] <= 1'b1;
      if (rn_go) ready_q[rn_preg] <= 1'b0;
    end
  end

  // ---------------- reservation station ----------------
  logic [TAGW-1:0] ins_tag [2];
  logic            ins_rdy [2];
  vstate_e         ins_vs  [2];
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      ins_tag[s] = src_preg[s];
      if (src_preg[s] < TAGW'(NUM_STATIC)) begin
        ins_rdy[s] = 1'b1;
        ins_vs[s]  = vstate_e'(2'(src_preg[s]) + 2'd1);
      end else begin
        ins_rdy[s] = ready_q[src_preg[s]];
        ins_vs[s]  = VS_REG;
      end
    end
  end

  reservation_station #(.NUM_PREGS(NUM_PREGS), .ENTRIES(ENTRIES), .IDW(IDW),
                        .TAG_UPDATE(TAG_UPDATE), .ALIAS_PENALTY(ALIAS_PENALTY)) u_rs (
    .clk, .rst_n, .flush, .ins_valid(rn_go), .ins_ready(rs_ins_ready), .ins_id(rn_id),
    .ins_tag, .ins_rdy, .ins_vs,
    .wk_valid(wb_go), .wk_tag(wb_preg), .wk_vstate(wb_vs),
    .wk_alias((SKIP_DUP_WRITE || ALIAS_FREE) && kind == RU_DYNAMIC), .wk_new(final_preg),
    .ra_valid(rn_go && fl_p2 && (!TAG_UPDATE || al_hit[2])), .ra_tag(rn_preg), .ra_new(al_new[2]),
    .is_valid, .is_ack(is_ack && !flush), .is_id, .is_tag, .is_vs, .is_alias,
    .is_alias_wait, .occupancy(rs_occupancy));

  // ---------------- register file ----------------
  logic            rd_valid [2];
  logic [TAGW-1:0] rd_tag   [2];
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      rd_valid[s] = is_valid && is_ack && !flush;
      rd_tag[s]   = is_alias[s] ? al_new[s] : is_tag[s];
    end
  end

  phys_regfile #(.NUM_PREGS(NUM_PREGS), .XLEN(XLEN), .NUM_STATIC(NUM_STATIC)) u_prf (
    .clk, .rst_n, .wr_valid(wb_go), .wr_preg(wb_preg), .wr_value(wb_value),
    .wr_static(!prf_write), .rd_valid, .rd_vstate(is_vs), .rd_tag, .rd_data(is_opnd),
    .n_wr(stat_rf_writes), .n_wr_supp(stat_rf_writes_saved),
    .n_rd(stat_rf_reads), .n_rd_elim(stat_rf_reads_saved));

  // ---------------- statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_map_writes_rename <= '0; stat_map_writes_remap <= '0;
      stat_reuse_static <= '0; stat_reuse_dynamic <= '0;
      stat_alloc_p2 <= '0; stat_alias_reads <= '0; stat_alias_stalls <= '0;
    end else begin
      if (rn_go)                    stat_map_writes_rename <= stat_map_writes_rename + 32'd1;
      if (rm_done && !flush)        stat_map_writes_remap  <= stat_map_writes_remap + 32'd1;
      if (kind == RU_STATIC)        stat_reuse_static      <= stat_reuse_static + 32'd1;
      if (kind == RU_DYNAMIC)       stat_reuse_dynamic     <= stat_reuse_dynamic + 32'd1;
      if (rn_go && fl_p2)           stat_alloc_p2          <= stat_alloc_p2 + 32'd1;
      if (is_alias_wait && !flush)  stat_alias_stalls      <= stat_alias_stalls + 32'd1;
      if (rd_valid[0])
        stat_alias_reads <= stat_alias_reads + 32'(is_alias[0] && is_vs[0] == VS_REG)
                                             + 32'(is_alias[1] && is_vs[1] == VS_REG);
    end
  end

  // An aliased read always finds its Alias Table entry.
  for (genvar s = 0; s < 2; s++) begin : g_alias_chk
    a_alias_hit: assert property (@(posedge clk) disable iff (!rst_n)
      (!flush && is_valid && is_ack && is_alias[s] && is_vs[s] == VS_REG) |-> al_hit[s])
      else $error("aliased read of P%0d without entry", is_tag[s]);
  end

endmodule

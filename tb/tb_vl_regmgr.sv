// tb_vl_regmgr: end-to-end test of the value-locality register manager at its
// default size (60 physical registers, 128-entry window).
//
// The test plays the out-of-order core around the block. It renames a random
// instruction stream over 32 logical registers, issues when the window offers an
// instruction (execution accepts at random, so operands pile up), writes results
// back after 1-3 cycles in any order, and commits in program order. A golden model
// executes the same stream in program order at rename, so every operand value the
// block delivers at issue is compared with the value it must have. The values are
// chosen so that 0s, 1s and repeated large values are common. Flushes discard all
// uncommitted work at intervals.
//
// Further checks: the reuse kind and final register reported at writeback agree
// with the value (0/1 go to P0/P1, duplicates to another register, new values stay
// put), and after each flush and at the end no physical register has leaked (free
// registers plus registers held by the committed map add up to all registers).
// Coverage: each mechanism must occur at least once - static reuse, Value-Cache
// reuse, a re-mapping that is skipped because a later instruction renamed the
// register, allocation from the second free-list partition, a read through the
// Alias Table, a stall for lack of registers, suppressed writes, eliminated reads
// and a flush.
module tb_vl_regmgr;
  import vl_pkg::*;
  localparam int unsigned NP = 60, NL = 32, NS = 2, XL = 64, IDW = 8;
  localparam int unsigned TW = $clog2(NP), LW = $clog2(NL);
  localparam int CYCLES = 30000;

  logic clk = 0, rst_n = 0, flush;
  logic rn_valid, rn_stall, is_valid, is_ack, wb_valid, cm_valid;
  logic [IDW-1:0] rn_id, is_id;
  logic [LW-1:0] rn_lsrc [2];
  logic [LW-1:0] rn_ldest, wb_ldest, cm_ldest;
  logic [TW-1:0] rn_preg, wb_preg, wb_final_preg, cm_preg;
  logic [XL-1:0] is_opnd [2], wb_value;
  reuse_e wb_kind;
  logic [31:0] stat_rf_writes, stat_rf_writes_saved, stat_rf_reads, stat_rf_reads_saved;
  logic [31:0] stat_map_writes_rename, stat_map_writes_remap, stat_reuse_static, stat_reuse_dynamic;
  logic [31:0] stat_alloc_p2, stat_alias_reads, stat_alias_stalls;
  logic [TW:0] free_count1, free_count2;
  logic [$clog2(128+1)-1:0] rs_occupancy;

  vl_regmgr dut (.*);

  // ---------------- test state ----------------
  typedef struct {
    int ldest; logic [XL-1:0] opa, opb, res;
    int preg, fin; bit issued, done;
  } rec_t;
  rec_t rec [256];
  int rob [$];                 // ids in program order
  int exq_id [$], exq_at [$];  // executing: id and earliest writeback cycle
  logic [XL-1:0] spec_v [NL], comm_v [NL];
  int comm_p [NL];
  int seq = 0, now = 0;
  int checks = 0, failures = 0;
  int n_stall_regs = 0, n_flush = 0, n_commit = 0, n_remap_skip = 0;
  bit draining = 0;
  logic [XL-1:0] pool [4] = '{64'h0000_0001_4000_1230, 64'h0000_0001_2000_0038, 64'd65536, 64'd101};

  always #5 clk = ~clk;
  initial begin
    repeat (CYCLES + 5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  function automatic logic [XL-1:0] execute(input int op, input logic [XL-1:0] a, b, input int imm);
    case (op)
      0: return XL'(imm % 4);
      1: return a + b;
      2: return a - b;
      3: return (a == b) ? 1 : 0;
      4: return pool[imm % 4];
      5: return a + 1;
      6: return a & b;
      default: return a ^ {32'h5a5a_0000 + imm, 32'(imm)};
    endcase
  endfunction

  // registers held by the committed map must account for every register not free
  task automatic leak_check();
    bit used [NP];
    int n; n = 0;
    foreach (used[p]) used[p] = 0;
    foreach (comm_p[l]) if (comm_p[l] >= NS && !used[comm_p[l]]) begin used[comm_p[l]] = 1; n++; end
    check("no register leaked", int'(free_count1) + int'(free_count2) + n == NP - NS);
    if (int'(free_count1) + int'(free_count2) + n != NP - NS)
      $display("  free %0d+%0d held %0d", free_count1, free_count2, n);
  endtask

  initial begin
    flush = 0; rn_valid = 0; is_ack = 0; wb_valid = 0; cm_valid = 0;
    rn_id = '0; rn_lsrc[0] = '0; rn_lsrc[1] = '0; rn_ldest = '0;
    wb_preg = '0; wb_ldest = '0; wb_value = '0; cm_ldest = '0; cm_preg = '0;
    foreach (spec_v[l]) begin spec_v[l] = 0; comm_v[l] = 0; comm_p[l] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;

    for (now = 0; now < CYCLES || rob.size() != 0; now++) begin
      int rn_new, wb_i, wb_id, cm_id;
      bit is_take;
      logic [XL-1:0] ra, rb, rr;
      int ld, ls0, ls1;
      if (now > CYCLES + 3000) break;
      draining = now >= CYCLES;
      @(negedge clk);
      rn_valid = 0; wb_valid = 0; cm_valid = 0; is_ack = 0; flush = 0;
      rn_new = -1; wb_i = -1; cm_id = -1; is_take = 0;

      if (!draining && now % 2500 == 2499) begin
        // ---------------- flush ----------------
        flush = 1;
        @(posedge clk);
        while (rob.size() != 0 && !rec[rob[$]].done) void'(rob.pop_back());
        // everything uncommitted is dropped (committed ones have left the queue)
        rob.delete();
        exq_id.delete(); exq_at.delete();
        spec_v = comm_v;
        n_flush++;
        #1 leak_check();
        continue;
      end

      // ---------------- rename ----------------
      if (!draining && rob.size() < 200 && ($urandom % 100) < 85) begin
        int op, imm;
        ld  = $urandom % 12; ls0 = $urandom % 12; ls1 = ($urandom % 4 == 0) ? ($urandom % NL) : ($urandom % 12);
        op  = $urandom % 8; imm = $urandom % 64;
        ra = spec_v[ls0]; rb = spec_v[ls1];
        rr = execute(op, ra, rb, imm);
        rn_valid = 1; rn_id = IDW'(seq % 256);
        rn_lsrc[0] = LW'(ls0); rn_lsrc[1] = LW'(ls1); rn_ldest = LW'(ld);
      end

      // ---------------- writeback: first executed instruction that is due ----------------
      foreach (exq_id[k]) if (wb_i < 0 && exq_at[k] <= now) wb_i = k;
      if (wb_i >= 0) begin
        wb_id = exq_id[wb_i];
        wb_valid = 1; wb_preg = TW'(rec[wb_id].preg); wb_ldest = LW'(rec[wb_id].ldest);
        wb_value = rec[wb_id].res;
      end

      // ---------------- commit: oldest, if written back in an earlier cycle ----------------
      if (rob.size() != 0 && rec[rob[0]].done && ($urandom % 100) < 90) begin
        cm_id = rob[0];
        cm_valid = 1; cm_ldest = LW'(rec[cm_id].ldest); cm_preg = TW'(rec[cm_id].fin);
      end

      // ---------------- issue acceptance ----------------
      is_ack = ($urandom % 100) < ((now % 3000) < 1500 ? 30 : 60);

      #1;
      if (rn_valid && rn_stall && int'(free_count1) + int'(free_count2) == 0) n_stall_regs++;
      if (is_valid && is_ack) begin
        int id; id = int'(is_id);
        check("issued instruction is in flight", !rec[id].issued);
        check("operand A value", is_opnd[0] == rec[id].opa);
        check("operand B value", is_opnd[1] == rec[id].opb);
        if (is_opnd[0] != rec[id].opa || is_opnd[1] != rec[id].opb)
          $display("  id %0d got %h %h exp %h %h", id, is_opnd[0], is_opnd[1], rec[id].opa, rec[id].opb);
        is_take = 1;
      end
      if (wb_valid) begin
        int r; r = wb_id;
        if (rec[r].res <= 1) check("0/1 results go to P0/P1", wb_kind == RU_STATIC && int'(wb_final_preg) == int'(rec[r].res));
        else if (wb_kind == RU_DYNAMIC) check("duplicate goes to another register",
                                              int'(wb_final_preg) != rec[r].preg && int'(wb_final_preg) >= NS);
        else check("new value stays in its register", wb_kind == RU_NONE && int'(wb_final_preg) == rec[r].preg);
      end
      begin
        int remap_cnt0; remap_cnt0 = int'(stat_map_writes_remap);
        @(posedge clk);
        if (wb_valid && wb_kind != RU_NONE && int'(stat_map_writes_remap) == remap_cnt0) n_remap_skip++;
      end
      // ---------------- update the model ----------------
      if (rn_valid && !rn_stall) begin
        int id; id = seq % 256;
        rec[id].ldest = ld; rec[id].opa = ra; rec[id].opb = rb; rec[id].res = rr;
        rec[id].preg = int'(rn_preg); rec[id].fin = -1; rec[id].issued = 0; rec[id].done = 0;
        rob.push_back(id); seq++;
        spec_v[ld] = rr;
      end
      if (is_take) begin
        rec[int'(is_id)].issued = 1;
        exq_id.push_back(int'(is_id)); exq_at.push_back(now + 1 + $urandom % 3);
      end
      if (wb_valid) begin
        rec[wb_id].done = 1; rec[wb_id].fin = int'(wb_final_preg);
        exq_id.delete(wb_i); exq_at.delete(wb_i);
      end
      if (cm_valid) begin
        comm_v[rec[cm_id].ldest] = rec[cm_id].res;
        comm_p[rec[cm_id].ldest] = rec[cm_id].fin;
        void'(rob.pop_front());
        n_commit++;
      end
    end

    @(negedge clk);
    rn_valid = 0; wb_valid = 0; cm_valid = 0; is_ack = 0; flush = 0;
    #1;
    check("drained", rob.size() == 0);
    leak_check();
    check("window empty at end", rs_occupancy == 0);
    // mechanism coverage
    check("static 0/1 reuse happened", stat_reuse_static > 0);
    check("Value Cache reuse happened", stat_reuse_dynamic > 0);
    check("re-mapping skipped after later rename", n_remap_skip > 0);
    check("rename map re-mapped", stat_map_writes_remap > 0);
    check("allocation from partition 2", stat_alloc_p2 > 0);
    check("read through Alias Table", stat_alias_reads > 0);
    check("stall for lack of registers", n_stall_regs > 0);
    check("writes suppressed", stat_rf_writes_saved > 0);
    check("reads eliminated", stat_rf_reads_saved > 0);
    check("flush", n_flush > 0);
    check("committed", n_commit > 1000);
    $display("committed %0d, rf writes %0d saved %0d, rf reads %0d saved %0d",
             n_commit, stat_rf_writes, stat_rf_writes_saved, stat_rf_reads, stat_rf_reads_saved);
    $display("map writes: rename %0d re-map %0d (skipped %0d); reuse static %0d dynamic %0d",
             stat_map_writes_rename, stat_map_writes_remap, n_remap_skip, stat_reuse_static, stat_reuse_dynamic);
    $display("partition-2 allocations %0d, alias reads %0d, register stalls %0d, flushes %0d",
             stat_alloc_p2, stat_alias_reads, n_stall_regs, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

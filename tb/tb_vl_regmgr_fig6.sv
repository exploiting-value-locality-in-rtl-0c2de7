// tb_vl_regmgr_fig6: directed test of the register file example in which twelve
// results 0, 1, 1, 0, -1, 0, 32768, 0, 1, 2, 3, 2 are produced into twelve
// different logical registers. Without reuse they occupy twelve registers; with
// reuse only four registers stay in use (-1, 32768, 2, 3) besides the reserved P0
// and P1, and the register holding 2 is shared by two logical registers (count 2).
//
// The test renames the twelve producers (sources from r0, which is 0), issues
// them, writes them back in order, and checks the reuse decision of each, the
// reference counts, the free-list occupancy (including the one register given up
// to the second partition), and that twelve consumers renamed afterwards read the
// right values. Finally everything commits and no register may be leaked.
// Also checked: an instruction renamed in cycle t issues in cycle t+1 when its
// operands are ready, and a consumer woken by a writeback in cycle t issues in
// cycle t+1.
module tb_vl_regmgr_fig6;
  import vl_pkg::*;
  localparam int unsigned NP = 60, NL = 32, NS = 2, XL = 64, IDW = 8;
  localparam int unsigned TW = $clog2(NP), LW = $clog2(NL);

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

  localparam logic [XL-1:0] VALS [12] = '{64'd0, 64'd1, 64'd1, 64'd0, '1, 64'd0, 64'd32768,
                                          64'd0, 64'd1, 64'd2, 64'd3, 64'd2};
  int checks = 0, failures = 0, cyc = 0;
  int preg [12], fin [12], cpreg [12];
  int iss_cyc [256];
  logic [XL-1:0] iss_a [256], iss_b [256];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && is_valid && is_ack) begin
    iss_cyc[is_id] <= cyc; iss_a[is_id] <= is_opnd[0]; iss_b[is_id] <= is_opnd[1];
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    rn_valid = 0; wb_valid = 0; cm_valid = 0; flush = 0;
  endtask

  task automatic rename(input int id, input int s0, input int s1, input int d, output int p, output int at);
    @(negedge clk); idle();
    rn_valid = 1; rn_id = IDW'(id); rn_lsrc[0] = LW'(s0); rn_lsrc[1] = LW'(s1); rn_ldest = LW'(d);
    #1 check("no stall", !rn_stall);
    p = int'(rn_preg); at = cyc;
    @(posedge clk); #1 idle();
  endtask

  task automatic writeback(input int p, input int d, input logic [XL-1:0] v, output int f, output reuse_e k, output int at);
    @(negedge clk); idle();
    wb_valid = 1; wb_preg = TW'(p); wb_ldest = LW'(d); wb_value = v;
    #1 f = int'(wb_final_preg); k = wb_kind; at = cyc;
    @(posedge clk); #1 idle();
  endtask

  task automatic commit(input int d, input int p);
    @(negedge clk); idle();
    cm_valid = 1; cm_ldest = LW'(d); cm_preg = TW'(p);
    @(posedge clk); #1 idle();
  endtask

  initial begin
    int at, two_reg, held;
    reuse_e k;
    idle(); is_ack = 1;
    rn_id = '0; rn_lsrc[0] = '0; rn_lsrc[1] = '0; rn_ldest = '0;
    wb_preg = '0; wb_ldest = '0; wb_value = '0; cm_ldest = '0; cm_preg = '0;
    foreach (iss_cyc[i]) iss_cyc[i] = -1;
    repeat (3) @(posedge clk); rst_n = 1;

    // twelve producers r1..r12, sources r0 (= 0, ready)
    for (int i = 0; i < 12; i++) begin
      rename(i, 0, 0, i + 1, preg[i], at);
      @(posedge clk); #1;
      check("producer issues the cycle after rename", iss_cyc[i] == at + 1);
    end
    check("twelve distinct registers allocated", free_count1 == NP - NS - 12);
    // a consumer of r12 renamed before r12 is written back, to check wakeup timing
    rename(100, 12, 12, 20, cpreg[0], at);
    // results written back in order
    for (int i = 0; i < 12; i++) begin
      int wat;
      writeback(preg[i], i + 1, VALS[i], fin[i], k, wat);
      if (VALS[i] <= 1) check("0/1 go to the reserved registers", k == RU_STATIC && fin[i] == int'(VALS[i]));
      else if (i == 11) check("second 2 reuses the first 2's register", k == RU_DYNAMIC && fin[i] == fin[9]);
      else check("new value keeps its register", k == RU_NONE && fin[i] == preg[i]);
      if (i == 11) begin
        @(posedge clk); #1;
        check("woken consumer issues the cycle after writeback", iss_cyc[100] == wat + 1);
        check("woken consumer reads the value", iss_a[100] == 64'd2 && iss_b[100] == 64'd2);
      end
    end
    two_reg = fin[9];
    check("count of the register holding 2 is 2", dut.u_rc.count[two_reg] == 8'd2);
    check("count of the register holding -1 is 1", dut.u_rc.count[fin[4]] == 8'd1);
    check("count of the register holding 32768 is 1", dut.u_rc.count[fin[6]] == 8'd1);
    check("count of the register holding 3 is 1", dut.u_rc.count[fin[10]] == 8'd1);
    // 12 allocated, 7 given back for 0/1 and 1 for the duplicate: 4 + the consumer held
    check("registers held after reuse", int'(free_count1) + int'(free_count2) == NP - NS - 4 - 1);
    check("duplicate's register in partition 2", free_count2 == 1);
    check("writes suppressed for seven 0/1 results", stat_rf_writes_saved == 7);
    check("five results written", stat_rf_writes == 5);

    // consumers of r1..r12 read the right values
    for (int i = 0; i < 12; i++) begin
      int cp;
      rename(144 + i, i + 1, 0, 21 + (i % 10), cp, at);
      @(posedge clk); #1;
      check("consumer operand", iss_a[144 + i] == VALS[i] && iss_b[144 + i] == 64'd0);
    end
    check("reads of 0/1 operands served without the array", stat_rf_reads_saved >= 7 + 12 + 2 * 12);

    // commit the producers in order: nothing leaks, all twelve mappings retained
    for (int i = 0; i < 12; i++) commit(i + 1, fin[i]);
    held = 4;
    check("after commit only the consumers' and four value registers are held",
          int'(free_count1) + int'(free_count2) == NP - NS - held - 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

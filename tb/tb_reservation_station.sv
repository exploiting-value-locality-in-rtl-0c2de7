// tb_reservation_station: random self-checking test of the window with value-state
// and alias bits. The model holds the same entries: insertion into the lowest free
// slot, wakeup that sets ready and the broadcast value state, re-allocation that
// sets the alias bit of ready register operands, issue of the lowest ready entry,
// flush. Outputs are compared every cycle; a small window (16) makes it fill up.
// A second window with TAG_UPDATE set sees the same inputs; its model keeps one
// extra tag per operand that the re-allocation broadcast rewrites. A third window
// with ALIAS_PENALTY set has its own model, since it issues later: an entry with an
// aliased register operand is held for one cycle the first time it is selected.
module tb_reservation_station;
  import vl_pkg::*;
  localparam int unsigned NP = 60, EN = 16, IDW = 8, TW = $clog2(NP);
  logic clk = 0, rst_n = 0, flush;
  logic ins_valid, ins_ready, wk_valid, ra_valid, is_valid, is_ack;
  logic [IDW-1:0] ins_id, is_id;
  logic [TW-1:0] ins_tag [2], is_tag [2], wk_tag, ra_tag, ra_new;
  logic tu_valid, tu_alias [2];
  logic [IDW-1:0] tu_id;
  logic [TW-1:0] tu_tag [2];
  vstate_e tu_vs [2];
  logic [$clog2(EN+1)-1:0] tu_occ;
  int mt [EN][2];
  int n_rewrite = 0, n_hold = 0;
  logic is_alias_wait, tu_wait, ap_ins_ready, ap_valid, ap_alias [2], ap_wait;
  logic [IDW-1:0] ap_id;
  logic [TW-1:0] ap_tag [2];
  vstate_e ap_vs [2];
  logic [$clog2(EN+1)-1:0] ap_occ;
  logic ins_rdy [2], is_alias [2];
  vstate_e ins_vs [2], is_vs [2], wk_vstate;
  logic wk_alias;
  logic [TW-1:0] wk_new;
  logic [$clog2(EN+1)-1:0] occupancy;
  int checks = 0, failures = 0, n_full = 0, n_alias = 0, n_known = 0;

  typedef struct { bit v; int id; int tag [2]; bit rdy [2]; vstate_e vs [2]; bit al [2]; } ment_t;
  ment_t m [EN], ma [EN];
  bit    ma_done [EN];

  reservation_station #(.NUM_PREGS(NP), .ENTRIES(EN), .IDW(IDW)) dut (.*);
  reservation_station #(.NUM_PREGS(NP), .ENTRIES(EN), .IDW(IDW), .TAG_UPDATE(1'b1)) dut_tu (
    .clk, .rst_n, .flush, .ins_valid, .ins_ready(), .ins_id, .ins_tag, .ins_rdy, .ins_vs,
    .wk_valid, .wk_tag, .wk_vstate, .wk_alias, .wk_new, .ra_valid, .ra_tag, .ra_new,
    .is_valid(tu_valid), .is_ack, .is_id(tu_id), .is_tag(tu_tag), .is_vs(tu_vs),
    .is_alias(tu_alias), .is_alias_wait(tu_wait), .occupancy(tu_occ));
  reservation_station #(.NUM_PREGS(NP), .ENTRIES(EN), .IDW(IDW), .ALIAS_PENALTY(1'b1)) dut_ap (
    .clk, .rst_n, .flush, .ins_valid, .ins_ready(ap_ins_ready), .ins_id, .ins_tag, .ins_rdy,
    .ins_vs, .wk_valid, .wk_tag, .wk_vstate, .wk_alias, .wk_new, .ra_valid, .ra_tag, .ra_new,
    .is_valid(ap_valid), .is_ack, .is_id(ap_id), .is_tag(ap_tag), .is_vs(ap_vs),
    .is_alias(ap_alias), .is_alias_wait(ap_wait), .occupancy(ap_occ));

  // model of one window: ready, value state and alias bits; returns the free slot
  // and the selected entry
  function automatic void scan(input ment_t mm [EN], output int fi, output int si, output int occ);
    fi = -1; si = -1; occ = 0;
    for (int i = EN - 1; i >= 0; i--) begin
      if (!mm[i].v) fi = i;
      if (mm[i].v && mm[i].rdy[0] && mm[i].rdy[1]) si = i;
      occ += mm[i].v;
    end
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    flush = 0; ins_valid = 0; wk_valid = 0; ra_valid = 0; is_ack = 0;
    ins_id = '0; wk_tag = '0; ra_tag = '0; ra_new = '0; wk_vstate = VS_REG; wk_alias = 0; wk_new = '0;
    for (int s = 0; s < 2; s++) begin ins_tag[s] = '0; ins_rdy[s] = 0; ins_vs[s] = VS_REG; end
    foreach (m[i]) begin m[i].v = 0; ma[i].v = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int fi, si, occ, fa, sa, occa;
      bit hold;
      @(negedge clk);
      ins_valid = ($urandom % 100) < ((cyc % 400) < 200 ? 70 : 30);
      ins_id = IDW'($urandom);
      for (int s = 0; s < 2; s++) begin
        ins_tag[s] = TW'(2 + $urandom % 10);
        ins_rdy[s] = $urandom % 2;
        ins_vs[s]  = ins_rdy[s] ? vstate_e'($urandom % 3) : VS_REG;
      end
      wk_valid = $urandom % 2; wk_tag = TW'(2 + $urandom % 10); wk_vstate = vstate_e'($urandom % 3);
      wk_alias = wk_vstate == VS_REG && ($urandom % 3) == 0; wk_new = TW'(2 + $urandom % 10);
      ra_valid = ($urandom % 4) == 0; ra_tag = TW'(2 + $urandom % 10);
      ra_new = TW'(2 + $urandom % 10);
      is_ack = ($urandom % 100) < ((cyc % 400) < 200 ? 30 : 70);
      flush = (cyc % 2000) == 1999;
      #1;
      fi = -1; si = -1; occ = 0;
      for (int i = EN - 1; i >= 0; i--) begin
        if (!m[i].v) fi = i;
        if (m[i].v && m[i].rdy[0] && m[i].rdy[1]) si = i;
        occ += m[i].v;
      end
      check("ins_ready", ins_ready == (fi >= 0));
      check("occupancy", int'(occupancy) == occ);
      check("is_valid", is_valid == (si >= 0));
      check("tag-update is_valid", tu_valid == (si >= 0));
      check("no hold without penalty", !is_alias_wait && !tu_wait);
      scan(ma, fa, sa, occa);
      hold = sa >= 0 && !ma_done[sa] &&
             ((ma[sa].al[0] && ma[sa].vs[0] == VS_REG) || (ma[sa].al[1] && ma[sa].vs[1] == VS_REG));
      check("penalty ins_ready", ap_ins_ready == (fa >= 0));
      check("penalty occupancy", int'(ap_occ) == occa);
      check("penalty is_valid", ap_valid == (sa >= 0 && !hold));
      check("penalty hold", ap_wait == hold);
      if (hold) n_hold++;
      if (sa >= 0 && !hold) begin
        check("penalty is_id", int'(ap_id) == ma[sa].id);
        for (int s = 0; s < 2; s++) begin
          check("penalty is_tag", int'(ap_tag[s]) == ma[sa].tag[s]);
          check("penalty is_vs", ap_vs[s] == ma[sa].vs[s]);
          check("penalty is_alias", ap_alias[s] == ma[sa].al[s]);
        end
      end
      check("tag-update occupancy", int'(tu_occ) == occ);
      if (fi < 0) n_full++;
      if (si >= 0) begin
        check("is_id", int'(is_id) == m[si].id);
        check("tag-update is_id", int'(tu_id) == m[si].id);
        for (int s = 0; s < 2; s++) begin
          check("is_tag", int'(is_tag[s]) == m[si].tag[s]);
          check("is_vs", is_vs[s] == m[si].vs[s]);
          check("is_alias", is_alias[s] == m[si].al[s]);
          if (m[si].al[s]) n_alias++;
          if (m[si].vs[s] != VS_REG) n_known++;
          check("tag-update is_tag", int'(tu_tag[s]) == mt[si][s]);
          check("tag-update is_vs", tu_vs[s] == m[si].vs[s]);
          check("tag-update no alias", tu_alias[s] == 1'b0);
        end
      end
      @(posedge clk);
      if (flush) foreach (m[i]) begin m[i].v = 0; ma[i].v = 0; end
      else begin
        for (int i = 0; i < EN; i++)
          for (int s = 0; s < 2; s++) begin
            bit was_rdy; was_rdy = m[i].rdy[s];
            if (wk_valid && !was_rdy && m[i].tag[s] == int'(wk_tag)) begin
              m[i].rdy[s] = 1; m[i].vs[s] = wk_vstate;
              if (wk_alias) begin m[i].al[s] = 1; mt[i][s] = int'(wk_new); end
            end
            if (ra_valid && was_rdy && m[i].vs[s] == VS_REG && m[i].tag[s] == int'(ra_tag)) m[i].al[s] = 1;
            if (ra_valid && was_rdy && m[i].vs[s] == VS_REG && mt[i][s] == int'(ra_tag)) begin
              mt[i][s] = int'(ra_new); if (m[i].v) n_rewrite++;
            end
          end
        if (si >= 0 && is_ack) m[si].v = 0;
        for (int i = 0; i < EN; i++)
          for (int s = 0; s < 2; s++) begin
            bit was_rdy; was_rdy = ma[i].rdy[s];
            if (wk_valid && !was_rdy && ma[i].tag[s] == int'(wk_tag)) begin
              ma[i].rdy[s] = 1; ma[i].vs[s] = wk_vstate; if (wk_alias) ma[i].al[s] = 1;
            end
            if (ra_valid && was_rdy && ma[i].vs[s] == VS_REG && ma[i].tag[s] == int'(ra_tag)) ma[i].al[s] = 1;
          end
        if (hold) ma_done[sa] = 1;
        if (sa >= 0 && !hold && is_ack) ma[sa].v = 0;
        if (ins_valid && fa >= 0) begin
          ma[fa].v = 1; ma[fa].id = int'(ins_id); ma_done[fa] = 0;
          for (int s = 0; s < 2; s++) begin
            ma[fa].tag[s] = int'(ins_tag[s]); ma[fa].rdy[s] = ins_rdy[s]; ma[fa].vs[s] = ins_vs[s]; ma[fa].al[s] = 0;
            if (wk_valid && !ins_rdy[s] && ins_tag[s] == wk_tag) begin
              ma[fa].rdy[s] = 1; ma[fa].vs[s] = wk_vstate; if (wk_alias) ma[fa].al[s] = 1;
            end
          end
        end
        if (ins_valid && fi >= 0) begin
          m[fi].v = 1; m[fi].id = int'(ins_id);
          for (int s = 0; s < 2; s++) begin
            m[fi].tag[s] = int'(ins_tag[s]); mt[fi][s] = int'(ins_tag[s]); m[fi].rdy[s] = ins_rdy[s]; m[fi].vs[s] = ins_vs[s]; m[fi].al[s] = 0;
            if (wk_valid && !ins_rdy[s] && ins_tag[s] == wk_tag) begin
              m[fi].rdy[s] = 1; m[fi].vs[s] = wk_vstate;
              if (wk_alias) begin m[fi].al[s] = 1; mt[fi][s] = int'(wk_new); end
            end
          end
        end
      end
    end
    check("window filled", n_full > 50);
    check("alias bits seen", n_alias > 20);
    check("known values seen", n_known > 100);
    check("tags rewritten", n_rewrite > 20);
    check("issue held for Alias Table access", n_hold > 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

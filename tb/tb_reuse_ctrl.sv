// tb_reuse_ctrl: self-checking test of the writeback reuse decision, for both the
// combined scheme (DYNAMIC_REUSE=1), the 0/1-only scheme (DYNAMIC_REUSE=0) and the
// combined scheme without writes of dynamic duplicates (SKIP_DUP_WRITE=1), and the
// plain Alias Table scheme (ALIAS_FREE=1: not written, freed to partition 1).
// Random results (0, 1, small and large values) with random Value Cache and Alias
// Table inputs are applied and every output is compared with the expected
// classification.
module tb_reuse_ctrl;
  import vl_pkg::*;
  localparam int unsigned NP = 60, XL = 64, NS = 2, TW = $clog2(NP);
  logic wb_valid, vc_hit, alias_live;
  logic [TW-1:0] wb_preg, vc_preg;
  logic [XL-1:0] wb_value;
  reuse_e kind [4];
  logic [TW-1:0] final_preg [4];
  vstate_e vstate [4];
  logic prf_write [4], vc_insert [4], remap_req [4], rc_inc [4], rc_drop [4], drop_to_p2 [4], alias_create [4];
  int checks = 0, failures = 0, seen [3];

  for (genvar g = 0; g < 4; g++) begin : g_dut
    reuse_ctrl #(.NUM_PREGS(NP), .XLEN(XL), .NUM_STATIC(NS), .DYNAMIC_REUSE(g != 0),
                 .SKIP_DUP_WRITE(g == 2), .ALIAS_FREE(g == 3)) dut (
      .wb_valid, .wb_preg, .wb_value, .vc_hit, .vc_preg, .alias_live,
      .kind(kind[g]), .final_preg(final_preg[g]), .vstate(vstate[g]), .prf_write(prf_write[g]),
      .vc_insert(vc_insert[g]), .remap_req(remap_req[g]), .rc_inc(rc_inc[g]), .rc_drop(rc_drop[g]),
      .drop_to_p2(drop_to_p2[g]), .alias_create(alias_create[g]));
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: value %0d hit %0d live %0d", what, wb_value, vc_hit, alias_live); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    seen = '{0, 0, 0};
    for (int n = 0; n < 3000; n++) begin
      wb_valid   = ($urandom % 8) != 0;
      wb_preg    = TW'(NS + $urandom % (NP - NS));
      vc_hit     = $urandom % 2;
      vc_preg    = TW'(NS + $urandom % (NP - NS));
      alias_live = ($urandom % 4) == 0;
      case ($urandom % 4)
        0: wb_value = 0;
        1: wb_value = 1;
        2: wb_value = XL'($urandom % 8);
        default: wb_value = {$urandom, $urandom};
      endcase
      #1;
      for (int g = 0; g < 4; g++) begin
        reuse_e ek; int ef; vstate_e ev;
        ev = wb_value == 0 ? VS_ZERO : wb_value == 1 ? VS_ONE : VS_REG;
        ek = RU_NONE; ef = int'(wb_preg);
        if (wb_valid && wb_value <= 1) begin ek = RU_STATIC; ef = int'(wb_value); end
        else if (wb_valid && g != 0 && vc_hit && !alias_live) begin ek = RU_DYNAMIC; ef = int'(vc_preg); end
        seen[ek]++;
        check("vstate", vstate[g] == ev);
        check("kind", kind[g] == ek);
        check("final_preg", int'(final_preg[g]) == ef);
        check("prf_write", prf_write[g] == (wb_valid && (ek == RU_NONE || (ek == RU_DYNAMIC && g < 2))));
        check("vc_insert", vc_insert[g] == (g != 0 && wb_valid && ek == RU_NONE));
        check("remap", remap_req[g] == (ek != RU_NONE) && rc_drop[g] == (ek != RU_NONE));
        check("dynamic actions", rc_inc[g] == (ek == RU_DYNAMIC) && drop_to_p2[g] == (ek == RU_DYNAMIC && g != 3)
                                 && alias_create[g] == (ek == RU_DYNAMIC));
      end
    end
    check("all outcomes", seen[0] > 100 && seen[1] > 100 && seen[2] > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

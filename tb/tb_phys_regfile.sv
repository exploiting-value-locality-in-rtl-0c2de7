// tb_phys_regfile: random self-checking test of the register file. Writes of
// random values to random registers, some marked static (must not be written);
// reads with random value states: a known state returns its constant without an
// access, a register read returns the model's contents. Access counters are
// compared with counts kept by the test.
module tb_phys_regfile;
  import vl_pkg::*;
  localparam int unsigned NP = 60, XL = 64, NS = 2, TW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_static;
  logic [TW-1:0] wr_preg;
  logic [XL-1:0] wr_value;
  logic rd_valid [2];
  vstate_e rd_vstate [2];
  logic [TW-1:0] rd_tag [2];
  logic [XL-1:0] rd_data [2];
  logic [31:0] n_wr, n_wr_supp, n_rd, n_rd_elim;
  int checks = 0, failures = 0, e_wr = 0, e_ws = 0, e_rd = 0, e_re = 0;
  logic [XL-1:0] m [NP];

  phys_regfile #(.NUM_PREGS(NP), .XLEN(XL), .NUM_STATIC(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    wr_valid = 0; wr_static = 0; wr_preg = '0; wr_value = '0;
    for (int s = 0; s < 2; s++) begin rd_valid[s] = 0; rd_vstate[s] = VS_REG; rd_tag[s] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // fill every register once
    for (int p = NS; p < NP; p++) begin
      @(negedge clk); wr_valid = 1; wr_static = 0; wr_preg = TW'(p); wr_value = {$urandom, $urandom};
      m[p] = wr_value; e_wr++;
    end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      wr_valid = $urandom % 2; wr_static = ($urandom % 3) == 0;
      wr_preg = TW'(NS + $urandom % (NP - NS)); wr_value = {$urandom, $urandom};
      for (int s = 0; s < 2; s++) begin
        rd_valid[s] = ($urandom % 4) != 0;
        rd_vstate[s] = ($urandom % 3 == 0) ? vstate_e'(1 + $urandom % 3) : VS_REG;
        rd_tag[s] = TW'(NS + $urandom % (NP - NS));
      end
      #1;
      for (int s = 0; s < 2; s++) begin
        if (rd_vstate[s] == VS_REG) check("rd_data reg", rd_data[s] == m[rd_tag[s]]);
        else check("rd_data const", rd_data[s] == XL'(int'(rd_vstate[s]) - 1));
        if (rd_valid[s]) begin if (rd_vstate[s] == VS_REG) e_rd++; else e_re++; end
      end
      @(posedge clk);
      if (wr_valid && !wr_static) begin m[wr_preg] = wr_value; e_wr++; end
      if (wr_valid && wr_static) e_ws++;
      #1;
      check("n_wr", int'(n_wr) == e_wr);
      check("n_wr_supp", int'(n_wr_supp) == e_ws);
      check("n_rd", int'(n_rd) == e_rd);
      check("n_rd_elim", int'(n_rd_elim) == e_re);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

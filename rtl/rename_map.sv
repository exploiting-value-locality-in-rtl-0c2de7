// rename_map: logical-to-physical register map that allows many logical registers
// to point at one physical register.
//
// Rename reads two source mappings and writes the destination mapping with the
// newly allocated register. At writeback a result that duplicates a value held
// elsewhere (or is a reserved constant) asks for its destination to be re-mapped
// to that register; the map is written only if the logical register still points
// at the register allocated to that result, i.e. no later instruction has
// renamed it since (the document's rule). rm_done reports an actual map write.
//
// This design's choices: a second, committed map is kept; commit writes it and
// reports the mapping it overwrites so the reference count can be released; flush
// copies the committed map (including a same-cycle commit) into the speculative
// map. At reset every logical register maps to P0, the register reserved for 0.
// Within one cycle the rename of the destination is younger than the writeback,
// so it wins over a re-mapping of the same logical register; source reads see a
// same-cycle re-mapping (forwarded) but not the same-cycle destination write.
//
// Timing: reads are combinational; writes happen at the next rising edge.
module rename_map #(
  parameter int unsigned NUM_PREGS = 60,
  parameter int unsigned NUM_LREGS = 32,
  localparam int unsigned TAGW     = $clog2(NUM_PREGS),
  localparam int unsigned LW       = $clog2(NUM_LREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-1:0]   rs_lreg [2],
  output logic [TAGW-1:0] rs_preg [2],
  input  logic            rn_valid,
  input  logic [LW-1:0]   rn_lreg,
  input  logic [TAGW-1:0] rn_preg,
  input  logic            rm_valid,
  input  logic [LW-1:0]   rm_lreg,
  input  logic [TAGW-1:0] rm_expect,
  input  logic [TAGW-1:0] rm_preg,
  output logic            rm_done,
  input  logic            cm_valid,
  input  logic [LW-1:0]   cm_lreg,
  input  logic [TAGW-1:0] cm_preg,
  output logic            cm_old_valid,
  output logic [TAGW-1:0] cm_old_preg,
  input  logic            flush,
  output logic [TAGW-1:0] commit_map [NUM_LREGS]
);

  logic [TAGW-1:0] spec_q [NUM_LREGS];
  logic [TAGW-1:0] comm_q [NUM_LREGS];

  logic rm_hit;
  assign rm_hit  = rm_valid && spec_q[rm_lreg] == rm_expect;
  assign rm_done = rm_hit && !(rn_valid && rn_lreg == rm_lreg);

  always_comb begin
    for (int unsigned i = 0; i < 2; i++) begin
      rs_preg[i] = spec_q[rs_lreg[i]];
      if (rm_hit && rm_lreg == rs_lreg[i]) rs_preg[i] = rm_preg;
    end
  end

  assign cm_old_valid = cm_valid;
  assign cm_old_preg  = comm_q[cm_lreg];
  assign commit_map   = comm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < NUM_LREGS; l++) begin
        spec_q[l] <= '0;
        comm_q[l] <= '0;
      end
    end else begin
      if (cm_valid) comm_q[cm_lreg] <= cm_preg;
      if (flush) begin
        for (int unsigned l = 0; l < NUM_LREGS; l++)
          spec_q[l] <= (cm_valid && cm_lreg == LW'(l)) ? cm_preg : comm_q[l];
      end else begin
        if (rm_done)  spec_q[rm_lreg] <= rm_preg;
        if (rn_valid) spec_q[rn_lreg] <= rn_preg;
      end
    end
  end

endmodule

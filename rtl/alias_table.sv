// alias_table: redirects reads of a re-mapped physical register.
//
// When a result is found to duplicate a value held in register NEW, the register
// OLD that was allocated for it is given up and an entry <OLD, NEW, valid> is
// created. Consumers that were renamed to OLD, and that are told OLD has since been
// handed to another instruction, read NEW instead by looking OLD up here. An entry
// is freed when its NEW register is returned to the free list: by then every
// consumer of the value has committed. These rules follow the document.
//
// This design's choices: one entry per physical register, indexed by OLD, so a
// lookup is an array read rather than a search; `live` exposes the valid bits so
// the writeback logic can refuse to give up a register whose entry is still live
// (an entry is never overwritten); a flush clears every entry; lookups are
// combinational (the zero-latency table of the evaluation).
//
// Timing: lookup is combinational; create and free take effect at the next rising
// edge, create winning over free for the same entry.
module alias_table #(
  parameter int unsigned NUM_PREGS = 60,
  parameter int unsigned NPORTS    = 2,
  localparam int unsigned TAGW     = $clog2(NUM_PREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 create_valid,
  input  logic [TAGW-1:0]      create_old,
  input  logic [TAGW-1:0]      create_new,
  input  logic [NUM_PREGS-1:0] free_mask,
  input  logic                 flush,
  input  logic [TAGW-1:0]      lk_tag [NPORTS],
  output logic                 lk_hit [NPORTS],
  output logic [TAGW-1:0]      lk_new [NPORTS],
  output logic [NUM_PREGS-1:0] live
);

  logic [NUM_PREGS-1:0] valid_q;
  logic [TAGW-1:0]      new_q [NUM_PREGS];

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      lk_hit[i] = valid_q[lk_tag[i]];
      lk_new[i] = new_q[lk_tag[i]];
    end
  end

  assign live = valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (flush) begin
      valid_q <= '0;
    end else begin
      for (int unsigned p = 0; p < NUM_PREGS; p++)
        if (valid_q[p] && free_mask[new_q[p]]) valid_q[p] <= 1'b0;
      if (create_valid) valid_q[create_old] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (create_valid) new_q[create_old] <= create_new;
  end

  // An entry is never overwritten while live.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (!flush && create_valid) |-> !valid_q[create_old])
    else $error("alias entry P%0d overwritten", create_old);

endmodule

// partitioned_free_list: free physical registers kept in two partitions.
//
// Partition 1 holds registers freed the conventional way (reference count reached
// zero at commit). Partition 2 holds registers given up because their result was
// found elsewhere and the destination was re-mapped. Allocation takes from
// partition 1 whenever it is not empty and only then from partition 2, which keeps
// a re-mapped register readable under its old name for as long as possible. That
// policy is the document's; the grant flag alloc_from_p2 tells the caller that the
// old contents of the register are about to be overwritten, so readers still using
// the old name must be redirected through the Alias Table.
//
// This design's choices: each partition is a bit vector, the lowest-numbered free
// register is granted, the reserved static registers are never in either
// partition, and a flush reloads partition 1 from a mask and empties partition 2.
//
// Timing: the grant is combinational from the current state; the granted
// register leaves the list, and freed registers join it, at the next rising edge.
module partitioned_free_list #(
  parameter int unsigned NUM_PREGS  = 60,
  parameter int unsigned NUM_STATIC = 2,
  localparam int unsigned TAGW      = $clog2(NUM_PREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc_req,
  output logic                 alloc_valid,
  output logic [TAGW-1:0]      alloc_preg,
  output logic                 alloc_from_p2,
  input  logic [NUM_PREGS-1:0] free1_mask,
  input  logic [NUM_PREGS-1:0] free2_mask,
  input  logic                 flush,
  input  logic [NUM_PREGS-1:0] flush_free,
  output logic [TAGW:0]        count1,
  output logic [TAGW:0]        count2
);

  localparam logic [NUM_PREGS-1:0] DYN_MASK = ~((NUM_PREGS)'((1 << NUM_STATIC) - 1));

  logic [NUM_PREGS-1:0] p1_q, p2_q;
  logic                 hit1, hit2;
  logic [TAGW-1:0]      idx1, idx2;
  logic [NUM_PREGS-1:0] take;

  always_comb begin
    hit1 = 1'b0; idx1 = '0;
    hit2 = 1'b0; idx2 = '0;
    for (int p = NUM_PREGS - 1; p >= 0; p--) begin
      if (p1_q[p]) begin hit1 = 1'b1; idx1 = TAGW'(p); end
      if (p2_q[p]) begin hit2 = 1'b1; idx2 = TAGW'(p); end
    end
    alloc_valid   = alloc_req && (hit1 || hit2);
    alloc_from_p2 = !hit1;
    alloc_preg    = hit1 ? idx1 : idx2;
    take = '0;
    if (alloc_valid) take[alloc_preg] = 1'b1;
    count1 = '0;
    count2 = '0;
    for (int unsigned p = 0; p < NUM_PREGS; p++) begin
      count1 = count1 + (TAGW+1)'(p1_q[p]);
      count2 = count2 + (TAGW+1)'(p2_q[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q <= DYN_MASK;
      p2_q <= '0;
    end else if (flush) begin
      p1_q <= flush_free & DYN_MASK;
      p2_q <= '0;
    end else begin
      p1_q <= ((p1_q & ~take) | free1_mask) & DYN_MASK;
      p2_q <= ((p2_q & ~take) | free2_mask) & DYN_MASK;
    end
  end

  // A register is never freed while it is already free.
  a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n)
    !flush |-> ((free1_mask | free2_mask) & (p1_q | p2_q)) == '0)
    else $error("double free");

endmodule

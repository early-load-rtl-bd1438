// el_iq: instruction queue with the early-load lookahead pointer.
//
// The queue decouples fetch from decode: fetch pushes up to W instructions a
// cycle at the tail, decode pops up to W a cycle at the head, in order. Each
// entry carries the instruction word and, for an early load candidate, the
// index of its early load queue (ELQ) entry.
//
// The early-load (EL) pointer runs EL_DIST instructions behind the head. When
// it reaches a load, the load's ELQ entry becomes active, so the early load
// starts about EL_DIST instructions before the load is decoded. Because the
// head may advance by W per cycle, and because a load may be pushed into a
// slot the pointer has already passed, this design activates every candidate
// whose distance from the head is at most EL_DIST, each cycle; the ELQ keeps
// the Active bit, so repeated activation does no harm.
//
// Sizes follow the evaluated machine: 24 entries, early load distance 4,
// fetch/decode width 2. The push/pop handshake (counts, a free count, a flush
// that empties the queue) is this design's choice.
//
// Timing: pushes and pops take effect at the clock edge; head entries,
// free count and the activation vector are read combinationally from the
// registered state. Reset is synchronous, active low.
module el_iq
  import el_pkg::*;
#(
  parameter int unsigned DEPTH     = 24,
  parameter int unsigned W         = 2,
  parameter int unsigned EL_DIST   = 4,
  parameter int unsigned ELQ_DEPTH = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,
  // push side (fetch)
  input  logic [$clog2(W+1)-1:0]      push_cnt,
  input  iq_entry_t [W-1:0]           push_entry,
  output logic [$clog2(DEPTH+1)-1:0]  free_cnt,
  // pop side (decode)
  input  logic [$clog2(W+1)-1:0]      pop_cnt,
  output iq_entry_t [W-1:0]           head_entry,
  output logic [W-1:0]                head_valid,
  // EL pointer: ELQ entries to set active
  output logic [ELQ_DEPTH-1:0]        activate
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  iq_entry_t        mem [DEPTH];
  logic [PW-1:0]    head, tail;
  logic [CW-1:0]    count;

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input int unsigned k);
    int unsigned v;
    v = int'(p) + k;
    if (v >= DEPTH) v = v - DEPTH;
    return v[PW-1:0];
  endfunction

  assign free_cnt = CW'(DEPTH) - count;

  always_comb begin
    for (int s = 0; s < W; s++) begin
      head_entry[s] = mem[wrap_add(head, s)];
      head_valid[s] = (s < int'(count));
    end
  end

  // EL pointer window: offsets 0 .. EL_DIST from the head
  always_comb begin
    iq_entry_t e;
    activate = '0;
    for (int k = 0; k <= EL_DIST && k < DEPTH; k++) begin
      e = mem[wrap_add(head, k)];
      if (k < int'(count) && e.el_cand && int'(e.elq_id) < ELQ_DEPTH)
        activate[e.elq_id] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      for (int s = 0; s < W; s++)
        if (s < int'(push_cnt)) mem[wrap_add(tail, s)] <= push_entry[s];
      tail  <= wrap_add(tail, int'(push_cnt));
      head  <= wrap_add(head, int'(pop_cnt));
      count <= count + CW'(push_cnt) - CW'(pop_cnt);
    end
  end

  // handshake rules
  always_ff @(posedge clk) begin
    if (rst_n && !flush) begin
      assert (int'(pop_cnt) <= int'(count) && int'(pop_cnt) <= W)
        else $error("el_iq: pop of %0d with %0d entries", pop_cnt, count);
      assert (int'(push_cnt) <= int'(free_cnt) && int'(push_cnt) <= W)
        else $error("el_iq: push of %0d with %0d free", push_cnt, free_cnt);
    end
  end

endmodule

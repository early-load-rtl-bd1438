// el_predecode_select: pre-decoding in parallel with the I-cache tag compare.
//
// To identify loads in the fetch cycle without lengthening it, every way of
// the instruction cache gets its own pre-decoders, working on that way's data
// while the tags are still being compared. The tag-hit vector then selects
// both the instruction words that go to the instruction queue and the
// pre-decode results that go to the early load queue; a result is passed on
// as a candidate only when the "is early load candidate" bit is set.
//
// The duplication and the selection after the tag compare follow the
// document. It draws two ways; the default of four ways is the cache of its
// evaluated machine (32 KB, 4-way) and the fetch width of two its dual-issue
// front end. The tag arrays and comparators belong to the host cache: this
// block takes the one-hot hit vector. The select is an AND-OR multiplexer, so
// a hit vector with no bit set yields zero words and no candidate.
//
// Combinational; no clock.
module el_predecode_select
  import el_pkg::*;
#(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned FETCH_W = 2
) (
  input  logic [WAYS-1:0][FETCH_W-1:0][31:0] way_data,  // data of every way
  input  logic [WAYS-1:0]                    way_hit,   // one-hot tag compare result
  output logic                               hit,
  output logic [FETCH_W-1:0][31:0]           instr,     // to the instruction queue
  output predec_t [FETCH_W-1:0]              pd         // to the early load queue
);

  predec_t [WAYS-1:0][FETCH_W-1:0] pd_way;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    for (genvar s = 0; s < FETCH_W; s++) begin : g_slot
      el_predecoder u_pd (.instr(way_data[w][s]), .pd(pd_way[w][s]));
    end
  end

  always_comb begin
    hit   = |way_hit;
    instr = '0;
    pd    = '0;
    for (int w = 0; w < WAYS; w++) begin
      for (int s = 0; s < FETCH_W; s++) begin
        instr[s] = instr[s] | (way_data[w][s] & {32{way_hit[w]}});
        pd[s]    = pd[s]    | (pd_way[w][s]   & {$bits(predec_t){way_hit[w]}});
      end
    end
  end

  always_comb assert ($onehot0(way_hit)) else $error("el_predecode_select: way_hit not one-hot");

endmodule

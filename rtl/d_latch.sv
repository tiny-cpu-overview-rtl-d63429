// d_latch: gated (level-sensitive) D latch.
//
// While the gate c is 1 the latch is transparent and q follows d; while c
// is 0 it is opaque and q holds the value d had when c fell. qn is the
// complement of q. This is the building block of the master-slave flip-flop
// (ms_dff). The function follows the latch description; writing it as a
// behavioural always_latch instead of a gate netlist is this design's
// choice. The latch that lint tools report here is the intended function of
// the module, and it has no reset, like the latch it models.
module d_latch (
  input  logic d,
  input  logic c,
  output logic q,
  output logic qn
);

  always_latch begin
    if (c) q = d;
  end

  always_comb qn = ~q;

endmodule

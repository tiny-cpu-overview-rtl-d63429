// ms_dff: master-slave D flip-flop built from two gated D latches.
//
// The master latch passes d to its output y while its gate is open; the
// slave latch passes y to q while its gate is open. The two gates are CK
// and its inverse, so exactly one latch is transparent at a time and q
// changes only at one clock edge, taking the value d had just before it:
//   RISING = 0: master gated by CK, slave by ~CK; q takes d at the falling
//               edge of ck (the default, as in the falling-edge example).
//   RISING = 1: master gated by ~CK, slave by CK; q takes d at the rising
//               edge.
// y is the master output, brought out for observation. The structure
// follows the master-slave description; the parameter is this design's way
// of offering both variants. The latches reported by lint tools are the
// two d_latch instances that make up the flip-flop.
module ms_dff #(
  parameter bit RISING = 1'b0
) (
  input  logic d,
  input  logic ck,
  output logic q,
  output logic qn,
  output logic y
);

  logic ck_n, c_master, c_slave, y_n;

  always_comb begin
    ck_n     = ~ck;
    c_master = RISING ? ck_n : ck;
    c_slave  = RISING ? ck   : ck_n;
  end

  d_latch u_master (.d(d), .c(c_master), .q(y), .qn(y_n));
  d_latch u_slave  (.d(y), .c(c_slave),  .q(q), .qn(qn));

endmodule

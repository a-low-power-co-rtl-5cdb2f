// output_comparator: the classifier's decision stage.
//
// The network is trained with two sigmoid output nodes; since the sigmoid is
// monotonic, the larger pre-activation gives the larger probability, so the
// sigmoids are replaced by one signed comparison of the two final nodes.
// node1 is the arrhythmia (class A) node and node0 the normal (class N) node
// (the assignment of nodes to classes is this design's choice); a tie is
// reported as normal.  Combinational; arrhythmia and normal are exclusive.
module output_comparator
  import coap_pkg::*;
(
  input  q_t   node0,
  input  q_t   node1,
  output logic arrhythmia,
  output logic normal
);
  assign arrhythmia = (node1 > node0);
  assign normal     = !arrhythmia;
endmodule

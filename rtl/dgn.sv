// dgn: destination grammarnode transition decoder.
//
// `dgnenable` goes high when all eight bits of the destination grammarnode
// transition probability field of the topology word are ones. That code marks
// a transition so unlikely that the Viterbi processor treats the current
// state as unable to reach the destination grammarnode. Combinational.
module dgn (
  input  logic [7:0] gn_transprob,
  output logic       dgnenable
);

  assign dgnenable = &gn_transprob;

endmodule

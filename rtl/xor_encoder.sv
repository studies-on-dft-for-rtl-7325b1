// xor_encoder -- EOR-tree output compactor of the NS-DFT wrapper.
//
// Compresses NI bits onto TW test-output lanes: lane j is the XOR of every
// input bit i with i mod TW = j. With NI <= TW it is the identity, padded with
// zeros. Purely combinational. The EOR tree follows the published wrapper;
// the bit-to-lane assignment is this design's choice.
module xor_encoder #(
  parameter int unsigned NI = 16,
  parameter int unsigned TW = 16
) (
  input  logic [NI-1:0] din,
  output logic [TW-1:0] to
);

  always_comb begin
    to = '0;
    for (int unsigned i = 0; i < NI; i++) to[i % TW] = to[i % TW] ^ din[i];
  end

endmodule

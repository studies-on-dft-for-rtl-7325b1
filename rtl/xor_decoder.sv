// xor_decoder -- EOR-network input decompressor of the NS-DFT wrapper.
//
// Expands TW test-input lanes to NO decoded bits. Bit i is lane (i mod TW);
// from bit TW on, a second lane is XORed in, (i mod TW) + 1 + ((i/TW - 1) mod
// (TW-1)) taken mod TW, which is never the first lane. With NO <= TW the
// decoder is the identity. Purely combinational. The use of an EOR network
// follows the published wrapper; this particular lane assignment is this
// design's choice (the test patterns must be encoded for it).
module xor_decoder #(
  parameter int unsigned TW = 16,
  parameter int unsigned NO = 32
) (
  input  logic [TW-1:0] ti,
  output logic [NO-1:0] dout
);

  function automatic int unsigned second_lane(input int unsigned i);
    if (TW < 2) return 0;
    return ((i % TW) + 1 + ((i / TW - 1) % (TW - 1))) % TW;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < NO; i++) begin
      if (i < TW) dout[i] = ti[i % TW];
      else        dout[i] = ti[i % TW] ^ ti[second_lane(i)];
    end
  end

endmodule

// ns_dft_wrapper -- core test wrapper for a core with non-scan DFT (NS-DFT).
//
// NS-DFT needs parallel access to every core input and output, which a core
// with more pins than the TAM gives it cannot have. The wrapper therefore
// compresses bit width: an EOR-network decoder expands the TW test-input lanes
// to the core's NPI inputs, and an EOR-tree encoder compacts the core's NPO
// outputs onto TW test-output lanes. Test length is not changed by this.
//
// The mode input selects one of five modes (dft_pkg::wmode_e):
//   WM_NORMAL   func_in -> core_in, core_out -> func_out, test_out = 0
//   WM_TEST     decode(test_in) -> core_in, encode(core_out) -> test_out
//   WM_ISOLATE  core_in = 0, func_out = 0 (while another core is tested)
//   WM_IN_IC    encode(func_in) -> test_out: observes the interconnect that
//               drives this core's inputs
//   WM_OUT_IC   decode(test_in) -> func_out: controls the interconnect driven
//               by this core's outputs
// Outside WM_TEST and WM_IN_IC test_out is 0, so the test outputs of many
// wrappers can be ORed onto shared TAM lanes. Outside WM_NORMAL and WM_TEST
// core_in is 0; outside WM_NORMAL and WM_OUT_IC func_out is 0. Clock and
// asynchronous signals do not pass through the wrapper.
//
// One decoder and one encoder of width max(NPI, NPO) serve both the core test
// and the interconnect tests, as in the published wrapper. The five modes and
// the compression scheme follow it; holding isolated pins at 0, the
// combinational (unregistered) paths and the lane assignment of the
// decoder/encoder are this design's choices. Defaults: core No.1 (Gcd),
// 32 inputs, 16 outputs, TAM width 16.
module ns_dft_wrapper
  import dft_pkg::wmode_e, dft_pkg::WM_NORMAL, dft_pkg::WM_TEST, dft_pkg::WM_ISOLATE,
         dft_pkg::WM_IN_IC, dft_pkg::WM_OUT_IC;
#(
  parameter int unsigned NPI = 32,
  parameter int unsigned NPO = 16,
  parameter int unsigned TW  = 16
) (
  input  wmode_e         mode,
  // SoC side
  input  logic [NPI-1:0] func_in,
  output logic [NPO-1:0] func_out,
  // core side
  output logic [NPI-1:0] core_in,
  input  logic [NPO-1:0] core_out,
  // TAM side
  input  logic [TW-1:0]  test_in,
  output logic [TW-1:0]  test_out
);

  localparam int unsigned MW = (NPI > NPO) ? NPI : NPO;

  logic [MW-1:0] dec_out, enc_in;
  logic [TW-1:0] enc_out;

  xor_decoder #(.TW(TW), .NO(MW)) u_dec (.ti(test_in), .dout(dec_out));
  xor_encoder #(.NI(MW), .TW(TW)) u_enc (.din(enc_in), .to(enc_out));

  always_comb begin
    enc_in   = (mode == WM_IN_IC) ? MW'(func_in) : MW'(core_out);
    core_in  = '0;
    func_out = '0;
    test_out = '0;
    unique case (mode)
      WM_NORMAL: begin
        core_in  = func_in;
        func_out = core_out;
      end
      WM_TEST: begin
        core_in  = dec_out[NPI-1:0];
        test_out = enc_out;
      end
      WM_IN_IC:  test_out = enc_out;
      WM_OUT_IC: func_out = dec_out[NPO-1:0];
      WM_ISOLATE: ;
      default: ;
    endcase
  end

endmodule

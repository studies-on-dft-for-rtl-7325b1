// tb_ns_dft_wrapper -- self-checking test of the NS-DFT core test wrapper.
//
// Three wrappers with the pin counts of cores from the core table: Gcd
// (32 in, 16 out, 16 lanes, the default), DctF (129 in, 260 out, 64 lanes)
// and Risc (32 in, 98 out, 32 lanes). A toy core model closes the loop from
// core_in to core_out. For every mode and random stimuli the outputs are
// compared with a reference written here from the decoder/encoder rules
// (bit i of the decoder = lane i%TW, XOR lane (i%TW + 1 + (i/TW-1)%(TW-1))%TW
// from bit TW on; lane j of the encoder = XOR of all bits i with i%TW = j).
`timescale 1ns/1ps
module tb_ns_dft_wrapper;
  import dft_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int mode_seen [5];

  // one DUT plus its reference, parameterized
  for (genvar v = 0; v < 3; v++) begin : g_v
    localparam int unsigned NPI = (v == 0) ? 32 : (v == 1) ? 129 : 32;
    localparam int unsigned NPO = (v == 0) ? 16 : (v == 1) ? 260 : 98;
    localparam int unsigned TW  = (v == 0) ? 16 : (v == 1) ? 64  : 32;
    localparam int unsigned MW  = (NPI > NPO) ? NPI : NPO;

    wmode_e         mode;
    logic [NPI-1:0] func_in, core_in;
    logic [NPO-1:0] func_out, core_out;
    logic [TW-1:0]  test_in, test_out;

    if (v == 0) begin : g_dut
      ns_dft_wrapper dut (.mode, .func_in, .func_out, .core_in, .core_out, .test_in, .test_out);
    end else begin : g_dut
      ns_dft_wrapper #(.NPI(NPI), .NPO(NPO), .TW(TW)) dut (
        .mode, .func_in, .func_out, .core_in, .core_out, .test_in, .test_out);
    end

    // toy core: each output bit is the XOR of two input bits
    always_comb
      for (int o = 0; o < NPO; o++) core_out[o] = core_in[o % NPI] ^ core_in[(3 * o + 1) % NPI];

    function automatic logic [MW-1:0] ref_dec(input logic [TW-1:0] t);
      logic [MW-1:0] d;
      for (int i = 0; i < MW; i++) begin
        int l1, l2;
        l1 = i % TW;
        d[i] = t[l1];
        if (i >= TW) begin
          l2 = (l1 + 1 + ((i / TW - 1) % (TW - 1))) % TW;
          d[i] = t[l1] ^ t[l2];
        end
      end
      return d;
    endfunction

    function automatic logic [TW-1:0] ref_enc(input logic [MW-1:0] x);
      logic [TW-1:0] r;
      for (int j = 0; j < TW; j++) begin
        r[j] = 1'b0;
        for (int i = j; i < MW; i += TW) r[j] ^= x[i];
      end
      return r;
    endfunction

    function automatic logic [NPO-1:0] ref_core(input logic [NPI-1:0] ci);
      logic [NPO-1:0] co;
      for (int o = 0; o < NPO; o++) co[o] = ci[o % NPI] ^ ci[(3 * o + 1) % NPI];
      return co;
    endfunction

    task automatic run(input int n);
      for (int it = 0; it < n; it++) begin
        logic [MW-1:0] dec;
        logic [NPI-1:0] e_ci;
        logic [NPO-1:0] e_fo;
        logic [TW-1:0]  e_to;
        for (int b = 0; b < NPI; b++) func_in[b] = 1'($urandom);
        for (int b = 0; b < TW; b++)  test_in[b] = 1'($urandom);
        mode = wmode_e'(it % 5);
        #1;
        dec = ref_dec(test_in);
        e_ci = '0; e_fo = '0; e_to = '0;
        unique case (mode)
          WM_NORMAL:  begin e_ci = func_in; e_fo = ref_core(func_in); end
          WM_TEST:    begin e_ci = dec[NPI-1:0]; e_to = ref_enc(MW'(ref_core(dec[NPI-1:0]))); end
          WM_ISOLATE: ;
          WM_IN_IC:   e_to = ref_enc(MW'(func_in));
          WM_OUT_IC:  e_fo = dec[NPO-1:0];
          default: ;
        endcase
        check(core_in == e_ci, $sformatf("v%0d mode %0d core_in", v, mode));
        check(func_out == e_fo, $sformatf("v%0d mode %0d func_out", v, mode));
        check(test_out == e_to, $sformatf("v%0d mode %0d test_out", v, mode));
        mode_seen[int'(mode)]++;
      end
    endtask
  end

  initial begin
    g_v[0].run(200);
    g_v[1].run(200);
    g_v[2].run(200);
    for (int m = 0; m < 5; m++) check(mode_seen[m] > 0, $sformatf("mode %0d exercised", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_relay_spu_configs: runs the end-to-end relay test at the two extreme
// (w, c) configurations of the published resource and latency tables,
// (12, 12) and (18, 18), for both the ZF and the MMSE build. The default
// (12, 6) configuration is covered by tb_relay_spu and tb_relay_spu_mmse;
// the intermediate rows differ only in size and are left out to keep the
// build short (each configuration is a separate elaboration of the full
// unit). Each relay_spu_checker instance drives random channel sets with
// random clock-enable stalls and input bubbles, checks every output
// bit-exactly against the behavioural model and checks the latency
// (w + c + 30 for ZF, w + c + 31 for MMSE); this testbench sums the counts
// and prints the share of correct network-coded decisions per build.
module tb_relay_spu_configs;
  import relay_pkg::*;

  localparam int NCFG = 2;
  localparam int CFG_W [NCFG] = '{12, 18};
  localparam int CFG_C [NCFG] = '{12, 18};

  int zf_checks [NCFG], zf_failures [NCFG], zf_correct [NCFG], zf_out [NCFG];
  int mm_checks [NCFG], mm_failures [NCFG], mm_correct [NCFG], mm_out [NCFG];
  bit zf_done [NCFG], mm_done [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    relay_spu_checker #(.W(CFG_W[i]), .C(CFG_C[i]), .DET(DET_ZF), .NSETS(40)) u_zf (
      .checks(zf_checks[i]), .failures(zf_failures[i]), .n_correct_o(zf_correct[i]),
      .n_out_o(zf_out[i]), .done(zf_done[i])
    );
    relay_spu_checker #(.W(CFG_W[i]), .C(CFG_C[i]), .DET(DET_MMSE), .NSETS(40)) u_mmse (
      .checks(mm_checks[i]), .failures(mm_failures[i]), .n_correct_o(mm_correct[i]),
      .n_out_o(mm_out[i]), .done(mm_done[i])
    );
  end

  int checks, failures;

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      #100;
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (!zf_done[i] || !mm_done[i]) all_done = 0;
    end
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks   += zf_checks[i] + mm_checks[i];
      failures += zf_failures[i] + mm_failures[i];
      $display("w=%0d c=%0d: ZF %0d/%0d correct decisions, MMSE %0d/%0d", CFG_W[i], CFG_C[i],
               zf_correct[i], 2 * zf_out[i], mm_correct[i], 2 * mm_out[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

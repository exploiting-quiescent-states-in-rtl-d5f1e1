// tb_tribank_rf_workloads: the end-to-end core model run against the
// register file configurations that are evaluated besides the default one
// (which tb_tribank_rf_full covers):
//   c3_iw8 : 8-wide, RF1 16 entries, RF2 and RF3 64 registers each, banks
//            read in one cycle;
//   c3_iw4 : the same organisation 4-wide;
//   c4_iw4 : the default organisation (128 + 128 registers, two-cycle
//            banks) 4-wide.
// Each runs a 64-entry reorder buffer and 20000 instructions. With 64
// registers per bank, 64 instructions in flight plus 32 committed values
// exceed RF2, so the C3 runs must also show rename stalls. At 4-wide the
// 16 RF1 entries never all hold unconsumed values, so those runs do not
// require a forced RF1 replacement.
//
// The three instances run side by side, each with its own clock; the test
// ends when all are done and reports the sum of their checks and failures.
// A watchdog ends it if any instance hangs.
module tb_tribank_rf_workloads;
  import tribank_pkg::*;
  localparam int NRUN = 3;
  logic [NRUN-1:0] done;
  int ck [NRUN], fl [NRUN];
  int checks, failures;

  tribank_core_model #(.IW(8), .NPHYS(64), .RDLAT(1), .EXPECT_STALL(1), .NAME("c3_iw8"))
    u_c3_iw8 (.done(done[0]), .checks(ck[0]), .failures(fl[0]));
  tribank_core_model #(.IW(4), .NPHYS(64), .RDLAT(1), .EXPECT_STALL(1), .EXPECT_EVICT(0), .NAME("c3_iw4"))
    u_c3_iw4 (.done(done[1]), .checks(ck[1]), .failures(fl[1]));
  tribank_core_model #(.IW(4), .NPHYS(128), .RDLAT(2), .EXPECT_STALL(0), .EXPECT_EVICT(0), .NAME("c4_iw4"))
    u_c4_iw4 (.done(done[2]), .checks(ck[2]), .failures(fl[2]));

  task automatic report(input bit hung);
    checks = 0; failures = hung ? 1 : 0;
    for (int r = 0; r < NRUN; r++) begin
      checks += ck[r]; failures += fl[r];
    end
    if (hung) $display("watchdog expired, done = %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #1;
    wait (&done);
    report(0);
  end

  // each instance has its own cycle watchdog; this one bounds the whole run
  initial begin
    #(64'd100 * 250000);
    report(1);
  end
endmodule

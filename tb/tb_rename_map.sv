// tb_rename_map: random rename groups (with same-group dependences),
// transfers, in-order commits and occasional flushes, against shadow
// copies of the speculative and committed maps. Checks source lookups and
// flags, the registers released at commit and their bank, the live masks,
// and that a flush brings the committed map back.
module tb_rename_map;
  localparam int unsigned NLOG = 8, NPHYS = 16, IW = 2, AW = 4, LW = 3;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] rn_valid, rn_dst_valid;
  logic [IW-1:0][1:0][LW-1:0] rn_lsrc;
  logic [IW-1:0][LW-1:0] rn_ldst;
  logic [IW-1:0][AW-1:0] rn_pdst;
  logic [IW-1:0][1:0][AW-1:0] rn_psrc;
  logic [IW-1:0][1:0] rn_sflag;
  logic [NPHYS-1:0] xf_mask, cm_free2, cm_free3, live2, live3;
  logic [IW-1:0] cm_valid, cm_inrf2;
  logic [IW-1:0][LW-1:0] cm_ldst;
  logic [IW-1:0][AW-1:0] cm_pdst;
  logic flush;
  int checks = 0, failures = 0, cyc = 0, n_flush = 0, n_f2 = 0, n_f3 = 0;

  rename_map #(.NLOG(NLOG), .NPHYS(NPHYS), .IW(IW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    logic [AW-1:0] sp [NLOG], rp [NLOG];
    logic sf [NLOG], rf [NLOG];
    logic [AW-1:0] ep; logic ef;
    logic [NPHYS-1:0] e2, e3, l2, l3;
    for (int l = 0; l < NLOG; l++) begin sp[l] = AW'(l); rp[l] = AW'(l); sf[l] = 0; rf[l] = 0; end
    rn_valid = '0; rn_dst_valid = '0; rn_lsrc = '0; rn_ldst = '0; rn_pdst = '0;
    xf_mask = '0; cm_valid = '0; cm_inrf2 = '0; cm_ldst = '0; cm_pdst = '0; flush = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      flush = ($urandom_range(30, 0) == 0);
      rn_valid = flush ? '0 : IW'($urandom);
      rn_dst_valid = IW'($urandom);
      rn_lsrc = $urandom; rn_ldst = $urandom; rn_pdst = $urandom;
      cm_valid = flush ? '0 : IW'($urandom);
      cm_ldst = $urandom; cm_pdst = $urandom; cm_inrf2 = $urandom;
      xf_mask = NPHYS'($urandom & $urandom);
      #1;
      l2 = '0; l3 = '0;
      for (int l = 0; l < NLOG; l++) if (rf[l]) l3[rp[l]] = 1; else l2[rp[l]] = 1;
      chk(live2 == l2 && live3 == l3, "live masks");
      for (int k = 0; k < IW; k++)
        for (int s = 0; s < 2; s++) begin
          ep = sp[rn_lsrc[k][s]]; ef = sf[rn_lsrc[k][s]];
          for (int j = 0; j < k; j++)
            if (rn_valid[j] && rn_dst_valid[j] && rn_ldst[j] == rn_lsrc[k][s]) begin ep = rn_pdst[j]; ef = 0; end
          chk(rn_psrc[k][s] == ep && rn_sflag[k][s] == ef, "source lookup");
        end
      e2 = '0; e3 = '0;
      for (int k = 0; k < IW; k++)
        if (cm_valid[k]) begin
          if (rf[cm_ldst[k]]) e3[rp[cm_ldst[k]]] = 1; else e2[rp[cm_ldst[k]]] = 1;
          rp[cm_ldst[k]] = cm_pdst[k]; rf[cm_ldst[k]] = !cm_inrf2[k];
        end
      chk(cm_free2 == e2 && cm_free3 == e3, "released registers");
      if (e2 != 0) n_f2++;
      if (e3 != 0) n_f3++;
      @(posedge clk);
      for (int l = 0; l < NLOG; l++) begin
        if (!rf[l] && xf_mask[rp[l]]) rf[l] = 1;
        if (!sf[l] && xf_mask[sp[l]]) sf[l] = 1;
      end
      for (int k = 0; k < IW; k++)
        if (rn_valid[k] && rn_dst_valid[k]) begin sp[rn_ldst[k]] = rn_pdst[k]; sf[rn_ldst[k]] = 0; end
      if (flush) begin
        n_flush++;
        for (int l = 0; l < NLOG; l++) begin sp[l] = rp[l]; sf[l] = rf[l]; end
      end
    end
    chk(n_flush > 0 && n_f2 > 0 && n_f3 > 0, "flush and both release kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tribank_rf_full: the end-to-end run of tb_tribank_rf with the
// register file at its default size (8-wide, RF1 16, RF2/RF3 128 each)
// and a 64-entry window, 20000 instructions. A rename stall cannot occur
// at this size and is not required; everything else is as below.
//
// Small out-of-order core model:
//
// The model renames a random instruction stream (two logical sources, a
// logical destination for most), keeps a window of in-flight instructions,
// and for each one: asks for copies of its operands once their producers
// have written back (occasionally in the very cycle the producer writes
// back, when the request must not be launched), reads both operands from
// RF1 RDLAT+1 or more cycles later (a miss sends it back to ask again), marks them
// consumed, writes its result after a random delay and commits in program
// order. Now and then all uncommitted instructions are squashed.
//
// Every operand read is checked against the value a sequential machine
// would see (kept from the logical registers at rename time); renamed
// source registers are checked against the model's own map, and every copy
// must reach RF1 exactly RDLAT cycles after its launch. The test also
// counts each mechanism of the design and fails if one never happened:
// transfers to RF3, reads resolved to RF3 despite a stale RF2 flag, reads
// of an older value in RF3 while the same register number holds a newer
// mapping in RF2, unlaunched early requests, RF1 misses, forced RF1
// replacements, rename stalls, flushes, and releases at commit from RF2
// and from RF3.
module tb_tribank_rf_full;
  import tribank_pkg::*;
  localparam int unsigned IW = IW_DEF, NPHYS = NPHYS_DEF, NRF1 = NRF1_DEF, NLOG = NLOG_DEF,
                          XLEN = XLEN_DEF, IDW = IDW_DEF, RDLAT = RDLAT_DEF;
  localparam int WIN = 64;          // reorder buffer entries of the evaluated machine
  localparam int NINSTR = 20000;    // instructions renamed in the run
  localparam int WATCHDOG = 200000; // cycles
  // 64 in flight plus 32 committed values never fill 128 RF2 registers
  localparam bit EXPECT_STALL = 0;
  localparam int unsigned AW = $clog2(NPHYS), LW = $clog2(NLOG), NRP = 2 * IW;

  logic clk = 0, rst_n = 0;
  logic [IW-1:0] rn_valid, rn_dst_valid, rn_ready_v;
  logic rn_ready;
  logic [IW-1:0][1:0][LW-1:0] rn_lsrc;
  logic [IW-1:0][LW-1:0] rn_ldst;
  logic [IW-1:0][IDW-1:0] rn_id;
  logic [IW-1:0][AW-1:0] rn_pdst;
  logic [IW-1:0][1:0][AW-1:0] rn_psrc;
  logic [IW-1:0][1:0] rn_sflag;
  logic [IW-1:0] wb_valid;
  logic [IW-1:0][AW-1:0] wb_preg;
  logic [IW-1:0][XLEN-1:0] wb_data;
  logic [IW-1:0] fq_valid, fq_flag, fq_launch, fill_ok, fill_evict;
  logic [IW-1:0][AW-1:0] fq_preg;
  logic [IW-1:0][IDW-1:0] fq_id;
  logic [NRP-1:0][AW-1:0] rd_preg;
  logic [NRP-1:0] rd_flag, rd_hit, rd_bank;
  logic [NRP-1:0][IDW-1:0] rd_id;
  logic [NRP-1:0][XLEN-1:0] rd_data;
  logic [NRP-1:0] cs_valid, cs_bank;
  logic [NRP-1:0][AW-1:0] cs_preg;
  logic [IW-1:0] cm_valid;
  logic [IW-1:0][LW-1:0] cm_ldst;
  logic [IW-1:0][AW-1:0] cm_pdst;
  logic [IW-1:0][IDW-1:0] cm_id;
  logic flush;
  logic [IW-1:0] xf_valid;
  logic [IW-1:0][AW-1:0] xf_preg;
  logic [AW:0] rf2_free_cnt;
  logic [NRF1-1:0] rf1_valid;

  tribank_rf dut (.*);

  int checks = 0, failures = 0, cyc = 0;

  // long half period: the core model settles each port group with #1 steps
  always #50 clk = ~clk;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic logic [XLEN-1:0] result_of(input int s);
    return XLEN'(s * 32'h9E37_79B1 ^ 32'h0123_4567);
  endfunction

  // instruction records, indexed by sequence number
  typedef enum int {S_WAIT, S_FILL, S_EXEC, S_DONE, S_GONE} st_t;
  typedef struct {
    st_t st;
    bit dv;
    logic [LW-1:0] ld;
    logic [1:0][LW-1:0] ls;
    logic [AW-1:0] pd;
    logic [1:0][AW-1:0] ps;
    logic [1:0] sf;
    logic [1:0][XLEN-1:0] ev;
    int prod [2];      // producing instruction, -1 for a committed value
    int t_fill, t_exec, t_wb;
  } ins_t;
  ins_t I [NINSTR];

  int win [$];
  int nseq = 0;
  logic [XLEN-1:0] lval [NLOG], clval [NLOG];
  int lprod [NLOG];                  // in-flight producer of each logical register
  logic [AW-1:0] lpm [NLOG], cpm [NLOG];
  int last_alloc [NPHYS];            // latest instruction given each RF2 register

  // mechanism counters
  int n_xfer = 0, n_stale = 0, n_twolive = 0, n_nolaunch = 0, n_miss = 0, n_evict = 0;
  int n_fill = 0;
  int n_stall = 0, n_flush = 0, n_free2 = 0, n_free3 = 0, n_rf3read = 0, n_commit = 0;

  function automatic bit ready_src(input int s, input int k, input bit early);
    int p;
    p = I[s].prod[k];
    if (p < 0) return 1;
    if (I[p].st == S_DONE || I[p].st == S_GONE) return I[p].t_wb < cyc || (early && I[p].t_wb == cyc);
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < IW; b++) if (xf_valid[b]) n_xfer++;
    if (dut.cm_free2 != '0) n_free2++;
    if (dut.cm_free3 != '0) n_free3++;
  end

  initial begin
    int nport, s, nren, rdi, fqi;
    bit early, ok;
    rn_valid = '0; rn_dst_valid = '0; rn_lsrc = '0; rn_ldst = '0; rn_id = '0;
    wb_valid = '0; wb_preg = '0; wb_data = '0;
    fq_valid = '0; fq_flag = '0; fq_preg = '0; fq_id = '0;
    rd_preg = '0; rd_flag = '0; rd_id = '0;
    cs_valid = '0; cs_bank = '0; cs_preg = '0;
    cm_valid = '0; cm_ldst = '0; cm_pdst = '0; cm_id = '0; flush = 0;
    for (int l = 0; l < NLOG; l++) begin
      lval[l] = '0; clval[l] = '0; lprod[l] = -1; lpm[l] = AW'(l); cpm[l] = AW'(l);
    end
    for (int p = 0; p < NPHYS; p++) last_alloc[p] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nseq < NINSTR || win.size() > 0) begin
      @(negedge clk);
      cyc++;
      rn_valid = '0; wb_valid = '0; fq_valid = '0; cs_valid = '0; cm_valid = '0; flush = 0;
      rd_preg = '0; rd_flag = '0; rd_id = '0;
      // ---------- flush: squash everything not committed ----------
      if (cyc % 211 == 0 && win.size() > 0) begin
        flush = 1;
        n_flush++;
        foreach (win[i]) I[win[i]].st = S_GONE;
        win.delete();
        for (int l = 0; l < NLOG; l++) begin lval[l] = clval[l]; lpm[l] = cpm[l]; lprod[l] = -1; end
        continue;
      end
      // ---------- writeback (decided first: early requests depend on it) ----------
      nport = 0;
      foreach (win[i]) begin
        s = win[i];
        if (I[s].st == S_EXEC && I[s].t_exec <= cyc && nport < IW) begin
          if (I[s].dv) begin
            wb_valid[nport] = 1; wb_preg[nport] = I[s].pd; wb_data[nport] = result_of(s);
            nport++;
          end
          I[s].st = S_DONE; I[s].t_wb = cyc;
        end
      end
      // ---------- operand reads from RF1 ----------
      rdi = 0;
      foreach (win[i]) begin
        s = win[i];
        if (I[s].st == S_FILL && cyc >= I[s].t_fill + int'(RDLAT) + 1 && rdi + 2 <= NRP &&
            $urandom_range(2, 0) != 0) begin
          for (int k = 0; k < 2; k++) begin
            rd_preg[rdi+k] = I[s].ps[k]; rd_flag[rdi+k] = I[s].sf[k]; rd_id[rdi+k] = IDW'(s);
          end
          #1;
          if (rd_hit[rdi] && rd_hit[rdi+1]) begin
            for (int k = 0; k < 2; k++) begin
              chk(rd_data[rdi+k] == I[s].ev[k], "operand value");
              if (rd_data[rdi+k] != I[s].ev[k] && failures < 20)
                $display("  instr %0d src %0d p%0d bank %0d: got %h want %h", s, k, I[s].ps[k], rd_bank[rdi+k], rd_data[rdi+k], I[s].ev[k]);
              if (rd_bank[rdi+k]) n_rf3read++;
              if (rd_bank[rdi+k] && !I[s].sf[k]) n_stale++;
              if (rd_bank[rdi+k] && last_alloc[I[s].ps[k]] > s) n_twolive++;
              cs_valid[rdi+k] = 1; cs_bank[rdi+k] = rd_bank[rdi+k]; cs_preg[rdi+k] = I[s].ps[k];
            end
            I[s].st = S_EXEC; I[s].t_exec = cyc + $urandom_range(2, 0);
          end else begin
            n_miss++;
            I[s].st = S_WAIT;
          end
          rdi += 2;
        end
      end
      // ---------- copy requests (wakeup ready) ----------
      fqi = 0;
      foreach (win[i]) begin
        s = win[i];
        if (I[s].st == S_WAIT && fqi + 2 <= IW && $urandom_range(3, 0) != 0) begin
          early = ($urandom_range(3, 0) == 0);
          if (ready_src(s, 0, early) && ready_src(s, 1, early)) begin
            for (int k = 0; k < 2; k++) begin
              fq_valid[fqi+k] = 1; fq_preg[fqi+k] = I[s].ps[k]; fq_flag[fqi+k] = I[s].sf[k]; fq_id[fqi+k] = IDW'(s);
            end
            #1;
            ok = 1;
            for (int k = 0; k < 2; k++) begin
              bit same_cycle;
              same_cycle = I[s].prod[k] >= 0 && I[I[s].prod[k]].t_wb == cyc &&
                           I[I[s].prod[k]].st == S_DONE;
              if (same_cycle) begin
                chk(!fq_launch[fqi+k], "request for an unwritten value not launched");
                n_nolaunch++;
              end else chk(fq_launch[fqi+k], "request launched");
              ok &= fq_launch[fqi+k];
            end
            if (ok) begin I[s].st = S_FILL; I[s].t_fill = cyc; end
            fqi += 2;
          end
        end
      end
      // ---------- commit in program order ----------
      nport = 0;
      while (win.size() > 0 && nport < IW) begin
        s = win[0];
        if (!(I[s].st == S_DONE && I[s].t_wb < cyc)) break;
        if (I[s].dv) begin
          cm_valid[nport] = 1; cm_ldst[nport] = I[s].ld; cm_pdst[nport] = I[s].pd; cm_id[nport] = IDW'(s);
          clval[I[s].ld] = result_of(s); cpm[I[s].ld] = I[s].pd;
        end
        nport++;
        n_commit++;
        I[s].st = S_GONE;
        void'(win.pop_front());
      end
      // ---------- rename ----------
      nren = 0;
      for (int k = 0; k < IW; k++)
        if (nseq + k < NINSTR && win.size() + k < WIN) begin
          rn_valid[k] = 1;
          rn_dst_valid[k] = ($urandom_range(9, 0) != 0);
          rn_ldst[k] = LW'($urandom);
          rn_lsrc[k][0] = LW'($urandom); rn_lsrc[k][1] = LW'($urandom);
          rn_id[k] = IDW'(nseq + k);
        end
      #1;
      if (rn_valid != '0 && !rn_ready) n_stall++;
      if (rn_valid != '0 && rn_ready) begin
        for (int k = 0; k < IW; k++) if (rn_valid[k]) begin
          s = nseq;
          nseq++;
          I[s].st = S_WAIT; I[s].dv = rn_dst_valid[k]; I[s].ld = rn_ldst[k]; I[s].ls = rn_lsrc[k];
          I[s].pd = rn_pdst[k]; I[s].ps = rn_psrc[k]; I[s].sf = rn_sflag[k];
          I[s].t_fill = 0; I[s].t_exec = 0; I[s].t_wb = 0;
          for (int j = 0; j < 2; j++) begin
            chk(rn_psrc[k][j] == lpm[rn_lsrc[k][j]], "renamed source register");
            I[s].ev[j] = lval[rn_lsrc[k][j]];
            I[s].prod[j] = lprod[rn_lsrc[k][j]];
          end
          if (rn_dst_valid[k]) begin
            lval[rn_ldst[k]] = result_of(s); lprod[rn_ldst[k]] = s; lpm[rn_ldst[k]] = rn_pdst[k];
            last_alloc[rn_pdst[k]] = s;
          end
          win.push_back(s);
        end
      end
    end
    repeat (5) @(posedge clk);
    n_evict = n_evict;
    $display("committed %0d of %0d renamed; transfers %0d, RF3 reads %0d, stale-flag reads %0d, two-live reads %0d",
             n_commit, nseq, n_xfer, n_rf3read, n_stale, n_twolive);
    $display("unlaunched %0d, RF1 misses %0d, forced RF1 replacements %0d, rename stalls %0d, flushes %0d, commit frees RF2 %0d RF3 %0d, cycles %0d",
             n_nolaunch, n_miss, n_evict, n_stall, n_flush, n_free2, n_free3, cyc);
    chk(n_fill > 0, "copies into RF1");
    chk(n_xfer > 0, "transfers happened");
    chk(n_stale > 0, "stale flag resolved to RF3");
    chk(n_twolive > 0, "older value read from RF3 while a newer mapping holds RF2");
    chk(n_nolaunch > 0, "early request held back");
    chk(n_miss > 0, "RF1 miss and re-request");
    chk(n_evict > 0, "forced RF1 replacement");
    if (EXPECT_STALL) chk(n_stall > 0, "rename stall");
    chk(n_flush > 0, "flush");
    chk(n_free2 > 0, "old mapping released from RF2 at commit");
    chk(n_free3 > 0, "old mapping released from RF3 at commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) for (int f = 0; f < IW; f++) if (fill_evict[f]) n_evict++;

  // copy latency: a value reaches RF1 exactly RDLAT cycles after its request
  // was launched, on the same port
  logic [IW-1:0] launch_h [RDLAT];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < RDLAT; s++) launch_h[s] <= '0;
    end else begin
      for (int f = 0; f < IW; f++) if (fill_ok[f]) begin
        n_fill++;
        chk(launch_h[RDLAT-1][f], "fill arrives RDLAT cycles after its launch");
      end
      launch_h[0] <= fq_valid & fq_launch;
      for (int s = 1; s < RDLAT; s++) launch_h[s] <= launch_h[s-1];
    end
  end

endmodule

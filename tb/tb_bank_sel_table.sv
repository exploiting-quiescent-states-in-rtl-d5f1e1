// tb_bank_sel_table: first replays the two-mappings-of-one-register case
// (an older value of register 5 moved to RF3 while a newer mapping of 5
// lives in RF2) with hand-worked expected banks, including ids that wrap
// around. Then runs random allocations, releases and lookups against a
// shadow table.
module tb_bank_sel_table;
  localparam int unsigned NPHYS = 16, IDW = 8, NAL = 2, NLK = 4, NOW = 2, NLOG = 4, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [NAL-1:0] al_valid;
  logic [NAL-1:0][AW-1:0] al_preg;
  logic [NAL-1:0][IDW-1:0] al_id;
  logic [NPHYS-1:0] rf2_free;
  logic [NLK-1:0][AW-1:0] lk_preg;
  logic [NLK-1:0][IDW-1:0] lk_id;
  logic [NLK-1:0] lk_flag, lk_bank;
  logic [NOW-1:0] ow_valid;
  logic [NOW-1:0][AW-1:0] ow_preg;
  logic [NOW-1:0][IDW-1:0] ow_id;
  logic [NOW-1:0] ow_owned;
  int checks = 0, failures = 0, cyc = 0;

  bank_sel_table #(.NPHYS(NPHYS), .IDW(IDW), .NAL(NAL), .NLK(NLK), .NOW(NOW), .NLOG(NLOG)) dut (.*);

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

  task automatic idle();
    al_valid = '0; al_preg = '0; al_id = '0; rf2_free = '0;
  endtask

  task automatic look(input int p, input int id, input bit flag, input bit exp, input string what);
    lk_preg[0] = AW'(p); lk_id[0] = IDW'(id); lk_flag[0] = flag;
    #1 chk(lk_bank[0] == exp, what);
  endtask

  function automatic bit older(int a, int b);
    return ((a - b) & 8'hff) >= 128;
  endfunction

  initial begin
    logic [IDW-1:0] sid [NPHYS];
    logic [NPHYS-1:0] smax, ssel, sdone, used;
    idle();
    lk_preg = '0; lk_id = '0; lk_flag = '0; ow_preg = '0; ow_id = '0; ow_valid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // producer of the first value of register 5 (ids near the wrap point)
    al_valid = 2'b01; al_preg[0] = 5; al_id[0] = 250;
    @(negedge clk); idle();
    look(5, 251, 0, 0, "consumer of RF2 value");
    ow_preg[0] = 5; ow_id[0] = 250; #1 chk(ow_owned[0], "owned by producer");
    // value of register 5 moves to RF3
    rf2_free[5] = 1;
    @(negedge clk); idle();
    look(5, 251, 0, 1, "stale flag overridden after transfer");
    #1 chk(!ow_owned[0], "not owned after transfer");
    // register 5 mapped again in RF2, producer id 4 (after wrap)
    al_valid = 2'b10; al_preg[1] = 5; al_id[1] = 4;
    @(negedge clk); idle();
    look(5, 252, 0, 1, "older consumer reads RF3 through select bit");
    look(5, 5, 0, 0, "newer consumer follows its flag (RF2)");
    look(5, 6, 1, 1, "newer consumer follows its flag (RF3)");
    ow_id[0] = 4; #1 chk(ow_owned[0], "owned by new producer");
    // the new producer commits: from then on the flag alone decides, even
    // for an id that compares as older after wrap-around
    ow_valid[0] = 1;
    @(negedge clk); ow_valid = '0;
    look(5, 200, 0, 0, "after owner commit, far-away id follows its flag");
    ow_id[0] = 7;
    // random phase against a shadow table
    for (int i = 0; i < NPHYS; i++) begin
      sid[i] = (i < NLOG) ? 0 : 0; smax[i] = !(i < NLOG); ssel[i] = !(i < NLOG);
    end
    sdone = '1;
    sid[5] = 4; smax[5] = 0; ssel[5] = 1;
    for (cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      idle();
      used = '0;
      for (int a = 0; a < NAL; a++) begin
        al_preg[a] = AW'($urandom); al_id[a] = IDW'($urandom);
        if (smax[al_preg[a]] && !used[al_preg[a]] && $urandom_range(1, 0)) begin
          al_valid[a] = 1; used[al_preg[a]] = 1;
        end
      end
      rf2_free = NPHYS'($urandom & $urandom) & ~smax & ~used;
      for (int l = 0; l < NLK; l++) begin
        lk_preg[l] = AW'($urandom); lk_id[l] = IDW'($urandom); lk_flag[l] = $urandom_range(1, 0);
      end
      for (int o = 0; o < NOW; o++) begin
        ow_preg[o] = AW'($urandom);
        ow_id[o] = $urandom_range(1, 0) ? sid[ow_preg[o]] : IDW'($urandom);
        ow_valid[o] = $urandom_range(3, 0) == 0;
      end
      #1;
      for (int l = 0; l < NLK; l++)
        chk(lk_bank[l] == ((smax[lk_preg[l]] || (!sdone[lk_preg[l]] && older(lk_id[l], sid[lk_preg[l]]))) ? ssel[lk_preg[l]] : lk_flag[l]),
            "random lookup");
      for (int o = 0; o < NOW; o++)
        chk(ow_owned[o] == (!smax[ow_preg[o]] && sid[ow_preg[o]] == ow_id[o]), "random owner");
      @(posedge clk);
      for (int o = 0; o < NOW; o++)
        if (ow_valid[o] && !smax[ow_preg[o]] && sid[ow_preg[o]] == ow_id[o]) sdone[ow_preg[o]] = 1;
      for (int i = 0; i < NPHYS; i++) if (rf2_free[i]) begin smax[i] = 1; ssel[i] = 1; end
      for (int a = 0; a < NAL; a++) if (al_valid[a]) begin sid[al_preg[a]] = al_id[a]; smax[al_preg[a]] = 0; sdone[al_preg[a]] = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

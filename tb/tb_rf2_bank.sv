// tb_rf2_bank: random allocation groups, writebacks, releases and reads
// against a shadow model of the RF2 bank. Checks the allocator's choice
// (lowest-numbered free registers in slot order), alloc_ok, the free
// count, the allocated/written state bits, same-cycle transfer-bus reads
// and RDLAT-cycle operand reads.
module tb_rf2_bank;
  localparam int unsigned NPHYS = 16, IW = 4, NBUS = 2, XLEN = 32, RDLAT = 2, NLOG = 4, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] alloc_req, alloc_en;
  logic [IW-1:0][AW-1:0] alloc_preg;
  logic alloc_ok;
  logic [AW:0] free_cnt;
  logic [IW-1:0] wb_valid;
  logic [IW-1:0][AW-1:0] wb_preg;
  logic [IW-1:0][XLEN-1:0] wb_data;
  logic [IW-1:0][AW-1:0] rd_addr;
  logic [IW-1:0][XLEN-1:0] rd_data;
  logic [NBUS-1:0][AW-1:0] xf_addr;
  logic [NBUS-1:0][XLEN-1:0] xf_data;
  logic [NPHYS-1:0] free_mask, alloc_mask, written_mask;
  int checks = 0, failures = 0, cyc = 0, n_full = 0;
  logic [XLEN-1:0] m [NPHYS];
  logic [NPHYS-1:0] al, wr;
  logic [IW-1:0][XLEN-1:0] exp_q [RDLAT];

  rf2_bank #(.NPHYS(NPHYS), .IW(IW), .NBUS(NBUS), .XLEN(XLEN), .RDLAT(RDLAT), .NLOG(NLOG)) dut (.*);

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
    logic [NPHYS-1:0] tk, busy;
    int nfree, nreq, j;
    int fl [$];
    for (int i = 0; i < NPHYS; i++) m[i] = '0;
    al = '0; wr = '0;
    for (int i = 0; i < NLOG; i++) begin al[i] = 1; wr[i] = 1; end
    alloc_req = '0; alloc_en = '0; wb_valid = '0; wb_preg = '0; wb_data = '0;
    rd_addr = '0; xf_addr = '0; free_mask = '0;
    for (int s = 0; s < RDLAT; s++) exp_q[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (cyc >= RDLAT) chk(rd_data == exp_q[RDLAT-1], "read data");
      chk(alloc_mask == al, "allocated bits");
      chk(written_mask == wr, "written bits");
      fl.delete();
      for (int i = 0; i < NPHYS; i++) if (!al[i]) fl.push_back(i);
      chk(free_cnt == (AW+1)'(fl.size()), "free count");
      alloc_req = IW'($urandom);
      #1;
      nreq = 0;
      for (int k = 0; k < IW; k++)
        if (alloc_req[k]) begin
          if (nreq < fl.size()) chk(alloc_preg[k] == AW'(fl[nreq]), "allocated register");
          nreq++;
        end
      chk(alloc_ok == (nreq <= fl.size()), "alloc_ok");
      if (!alloc_ok) n_full++;
      alloc_en = (alloc_ok && $urandom_range(3, 0) != 0) ? alloc_req : '0;
      tk = '0;
      j = 0;
      for (int k = 0; k < IW; k++) if (alloc_req[k]) begin if (alloc_en[k]) tk[fl[j]] = 1; j++; end
      busy = tk;
      for (int w = 0; w < IW; w++) begin
        wb_preg[w] = AW'($urandom); wb_data[w] = $urandom;
        wb_valid[w] = al[wb_preg[w]] && !busy[wb_preg[w]] && $urandom_range(1, 0);
        if (wb_valid[w]) busy[wb_preg[w]] = 1;
      end
      free_mask = NPHYS'($urandom & $urandom) & al & ~busy;
      for (int r = 0; r < IW; r++) rd_addr[r] = AW'($urandom);
      for (int b = 0; b < NBUS; b++) xf_addr[b] = AW'($urandom);
      #1;
      for (int b = 0; b < NBUS; b++) chk(xf_data[b] == m[xf_addr[b]], "transfer bus data");
      for (int s = RDLAT - 1; s > 0; s--) exp_q[s] = exp_q[s-1];
      for (int r = 0; r < IW; r++) exp_q[0][r] = m[rd_addr[r]];
      @(posedge clk);
      for (int i = 0; i < NPHYS; i++) begin
        if (tk[i]) begin al[i] = 1; wr[i] = 0; end
        if (free_mask[i]) begin al[i] = 0; wr[i] = 0; end
      end
      for (int w = 0; w < IW; w++)
        if (wb_valid[w]) begin m[wb_preg[w]] = wb_data[w]; wr[wb_preg[w]] = 1; end
    end
    chk(n_full > 0, "allocator ran out of registers at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

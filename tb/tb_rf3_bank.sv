// tb_rf3_bank: random transfers into free registers, random releases and
// reads, all checked against a shadow copy of data and busy bits. Read
// data is checked RDLAT cycles after the address is presented.
module tb_rf3_bank;
  localparam int unsigned NPHYS = 16, IW = 4, NBUS = 4, XLEN = 32, RDLAT = 2, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [NBUS-1:0] xf_valid;
  logic [NBUS-1:0][AW-1:0] xf_preg;
  logic [NBUS-1:0][XLEN-1:0] xf_data;
  logic [IW-1:0][AW-1:0] rd_addr;
  logic [IW-1:0][XLEN-1:0] rd_data;
  logic [NPHYS-1:0] free_mask, busy_mask;
  int checks = 0, failures = 0, cyc = 0;
  logic [XLEN-1:0] m [NPHYS];
  logic [NPHYS-1:0] busy;
  logic [IW-1:0][XLEN-1:0] exp_q [RDLAT];

  rf3_bank #(.NPHYS(NPHYS), .IW(IW), .NBUS(NBUS), .XLEN(XLEN), .RDLAT(RDLAT)) dut (.*);

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
    logic [NPHYS-1:0] used;
    for (int i = 0; i < NPHYS; i++) m[i] = '0;
    busy = '0;
    xf_valid = '0; xf_preg = '0; xf_data = '0; rd_addr = '0; free_mask = '0;
    for (int s = 0; s < RDLAT; s++) exp_q[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // outputs of reads launched RDLAT cycles ago
      if (cyc >= RDLAT) chk(rd_data == exp_q[RDLAT-1], "read data");
      chk(busy_mask == busy, "busy");
      used = '0;
      for (int b = 0; b < NBUS; b++) begin
        xf_valid[b] = 0;
        xf_preg[b] = AW'($urandom);
        xf_data[b] = $urandom;
        if (!busy[xf_preg[b]] && !used[xf_preg[b]] && $urandom_range(1, 0)) begin
          xf_valid[b] = 1; used[xf_preg[b]] = 1;
        end
      end
      free_mask = NPHYS'($urandom & $urandom & $urandom) & busy & ~used;
      for (int r = 0; r < IW; r++) rd_addr[r] = AW'($urandom);
      for (int s = RDLAT - 1; s > 0; s--) exp_q[s] = exp_q[s-1];
      for (int r = 0; r < IW; r++) exp_q[0][r] = m[rd_addr[r]];
      @(posedge clk);
      busy = busy & ~free_mask;
      for (int b = 0; b < NBUS; b++)
        if (xf_valid[b]) begin m[xf_preg[b]] = xf_data[b]; busy[xf_preg[b]] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

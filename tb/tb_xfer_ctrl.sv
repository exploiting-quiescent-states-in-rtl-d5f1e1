// tb_xfer_ctrl: random eligibility masks against a reference that walks
// the registers from its own copy of the rotating pointer. Checks every
// grant (which registers, in which bus order, and the mask) each cycle.
module tb_xfer_ctrl;
  localparam int unsigned NPHYS = 16, NBUS = 4, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [NPHYS-1:0] elig, xf_mask;
  logic [NBUS-1:0] xf_valid;
  logic [NBUS-1:0][AW-1:0] xf_preg;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned ptr = 0;

  xfer_ctrl #(.NPHYS(NPHYS), .NBUS(NBUS)) dut (.*);

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
    logic [NBUS-1:0] ev;
    logic [NBUS-1:0][AW-1:0] ep;
    logic [NPHYS-1:0] em;
    int n;
    elig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      elig = (cyc % 3 == 0) ? NPHYS'($urandom) : NPHYS'($urandom & $urandom);
      #1;
      ev = '0; ep = '0; em = '0; n = 0;
      for (int i = 0; i < NPHYS; i++) begin
        int idx;
        idx = (ptr + i) % NPHYS;
        if (elig[idx] && n < NBUS) begin
          ev[n] = 1; ep[n] = AW'(idx); em[idx] = 1; n++;
        end
      end
      chk(xf_valid == ev, "valid");
      chk(xf_preg == ep, "preg");
      chk(xf_mask == em, "mask");
      if (n > 0) ptr = (int'(ep[n-1]) + 1) % NPHYS;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

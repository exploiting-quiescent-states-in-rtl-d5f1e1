// xfer_ctrl: chooses which RF2 registers move to RF3 this cycle.
//
// A register p is eligible when RF2 register p is mapped and already holds
// its value (the producer has written back) and RF3 register p is free:
// the two transfer conditions of the direct-mapped scheme. The caller
// folds both, plus anything it wants held back (a register being freed
// this cycle, a flush), into elig. Up to NBUS eligible registers are
// granted per cycle, one per transfer bus. The search starts at a rotating
// pointer that moves just past the last register granted, so no register
// waits behind a busy region for ever; this rotation is this design's own
// choice, the documented scheme only requires that both conditions hold.
//
// Purely combinational grants (xf_valid, xf_preg in the same cycle as
// elig); only the pointer is a register.
module xfer_ctrl
  import tribank_pkg::*;
#(
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned NBUS  = IW_DEF,
  localparam int unsigned AW   = $clog2(NPHYS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPHYS-1:0]        elig,
  output logic [NBUS-1:0]         xf_valid,
  output logic [NBUS-1:0][AW-1:0] xf_preg,
  output logic [NPHYS-1:0]        xf_mask
);

  logic [AW-1:0] ptr_q, ptr_d;
  int unsigned   n;
  logic [AW-1:0] idx;

  always_comb begin
    xf_valid = '0;
    xf_preg  = '0;
    xf_mask  = '0;
    ptr_d    = ptr_q;
    n        = '0;
    for (int i = 0; i < NPHYS; i++) begin
      idx = ptr_q + AW'(i);
      if (elig[idx] && n < NBUS) begin
        xf_valid[n] = 1'b1;
        xf_preg[n]  = idx;
        xf_mask[idx] = 1'b1;
        ptr_d = idx + 1'b1;
        n = n + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;

endmodule

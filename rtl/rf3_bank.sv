// rf3_bank: the retention bank (RF3) of the TriBank register file.
//
// RF3 has as many registers as RF2 and is direct-mapped to it: the value of
// RF2 register p can only move into RF3 register p. A value sits here from
// its transfer until the mapping it belongs to is released, which is when
// a later instruction with the same logical destination commits (or when
// the mapping is squashed). Each register carries a 'busy' bit: set by a
// transfer, cleared through free_mask. RF3 is never written by results,
// only by the NBUS transfer buses, and is read by IW ports with RDLAT-cycle
// latency to copy operands into RF1.
//
// Timing: a transfer presented in cycle t writes the word and sets busy at
// the edge ending t. A register freed in cycle t may take a new transfer
// from t+1. Sizes and port counts follow the documented main
// configuration; the busy-bit bookkeeping is this design's own. The
// shared storage (rf_array) also offers a same-cycle read port, which only
// RF2 needs; here it is tied to address 0 and its output left unused.
module rf3_bank
  import tribank_pkg::*;
#(
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned IW    = IW_DEF,
  parameter int unsigned NBUS  = IW_DEF,
  parameter int unsigned XLEN  = XLEN_DEF,
  parameter int unsigned RDLAT = RDLAT_DEF,
  localparam int unsigned AW   = $clog2(NPHYS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // transfer buses from RF2
  input  logic [NBUS-1:0]           xf_valid,
  input  logic [NBUS-1:0][AW-1:0]   xf_preg,
  input  logic [NBUS-1:0][XLEN-1:0] xf_data,
  // operand copy reads (RDLAT cycles)
  input  logic [IW-1:0][AW-1:0]     rd_addr,
  output logic [IW-1:0][XLEN-1:0]   rd_data,
  // registers released this cycle
  input  logic [NPHYS-1:0]          free_mask,
  output logic [NPHYS-1:0]          busy_mask
);

  logic [NPHYS-1:0] busy_q;
  logic [0:0][AW-1:0]   pk_addr;
  logic [0:0][XLEN-1:0] pk_data;

  assign pk_addr = '0;

  rf_array #(.NREG(NPHYS), .NWR(NBUS), .NRD(IW), .XLEN(XLEN), .RDLAT(RDLAT), .NPK(1)) u_arr (
    .clk, .rst_n,
    .we(xf_valid), .waddr(xf_preg), .wdata(xf_data),
    .raddr(rd_addr), .rdata(rd_data),
    .paddr(pk_addr), .pdata(pk_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= '0;
    else begin
      busy_q <= busy_q & ~free_mask;
      for (int b = 0; b < NBUS; b++)
        if (xf_valid[b]) busy_q[xf_preg[b]] <= 1'b1;
    end
  end

  assign busy_mask = busy_q;

  // Direct mapping: a transfer may only target a free RF3 register.
  for (genvar b = 0; b < NBUS; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      xf_valid[b] |-> !busy_q[xf_preg[b]]);
  end

endmodule

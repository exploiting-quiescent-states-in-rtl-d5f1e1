// rf2_bank: the rename bank (RF2) of the TriBank register file.
//
// Every destination register is allocated here at rename and every result
// is written here at writeback. Each register carries two state bits:
// 'allocated' (mapped to a logical register) and 'written' (its value has
// arrived, i.e. the producer has passed writeback). A register that is
// allocated and written is a candidate for transfer to RF3; the transfer,
// a commit that frees an old mapping still held here, or a squash return
// it to the free pool through free_mask.
//
// Allocation: up to IW slots ask for a register in one cycle (alloc_req).
// The bank offers the IW lowest-numbered free registers; requesting slot k
// receives the j-th of them where j counts the requesting slots before k.
// alloc_ok says whether there are enough; the registers are taken only for
// the slots raised on alloc_en (the caller raises them when it renames).
// A register freed in a cycle can be allocated from the next cycle on.
//
// Ports: IW write ports (writeback), IW read ports with RDLAT-cycle
// latency (operand copies to RF1), NBUS combinational read ports that
// drive the transfer buses to RF3. Port counts, the 128-register size and
// the two-cycle read follow the documented main configuration. The
// lowest-free allocation order and the reset state (logical register i
// mapped to register i, written with zero) are this design's choices.
module rf2_bank
  import tribank_pkg::*;
#(
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned IW    = IW_DEF,
  parameter int unsigned NBUS  = IW_DEF,
  parameter int unsigned XLEN  = XLEN_DEF,
  parameter int unsigned RDLAT = RDLAT_DEF,
  parameter int unsigned NLOG  = NLOG_DEF,
  localparam int unsigned AW   = $clog2(NPHYS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // allocation at rename
  input  logic [IW-1:0]             alloc_req,
  input  logic [IW-1:0]             alloc_en,
  output logic [IW-1:0][AW-1:0]     alloc_preg,
  output logic                      alloc_ok,
  output logic [AW:0]               free_cnt,
  // writeback
  input  logic [IW-1:0]             wb_valid,
  input  logic [IW-1:0][AW-1:0]     wb_preg,
  input  logic [IW-1:0][XLEN-1:0]   wb_data,
  // operand copy reads (RDLAT cycles)
  input  logic [IW-1:0][AW-1:0]     rd_addr,
  output logic [IW-1:0][XLEN-1:0]   rd_data,
  // transfer bus reads (same cycle)
  input  logic [NBUS-1:0][AW-1:0]   xf_addr,
  output logic [NBUS-1:0][XLEN-1:0] xf_data,
  // registers returned to the free pool this cycle
  input  logic [NPHYS-1:0]          free_mask,
  // state
  output logic [NPHYS-1:0]          alloc_mask,
  output logic [NPHYS-1:0]          written_mask
);

  logic [NPHYS-1:0] allocated_q, written_q;
  logic [IW-1:0][AW-1:0] cand;
  logic [AW:0] navail, nreq;
  logic [NPHYS-1:0] take;

  rf_array #(.NREG(NPHYS), .NWR(IW), .NRD(IW), .XLEN(XLEN), .RDLAT(RDLAT), .NPK(NBUS)) u_arr (
    .clk, .rst_n,
    .we(wb_valid), .waddr(wb_preg), .wdata(wb_data),
    .raddr(rd_addr), .rdata(rd_data),
    .paddr(xf_addr), .pdata(xf_data)
  );

  // The IW lowest-numbered free registers.
  always_comb begin
    navail = '0;
    cand   = '0;
    for (int i = 0; i < NPHYS; i++) begin
      if (!allocated_q[i] && navail < (AW+1)'(IW)) begin
        cand[navail[$clog2(IW)-1:0]] = AW'(i);
        navail = navail + 1'b1;
      end
    end
  end

  always_comb begin
    nreq       = '0;
    alloc_preg = '0;
    for (int k = 0; k < IW; k++) begin
      if (alloc_req[k]) begin
        alloc_preg[k] = cand[nreq[$clog2(IW)-1:0]];
        nreq = nreq + 1'b1;
      end
    end
  end

  always_comb begin
    take = '0;
    for (int k = 0; k < IW; k++)
      if (alloc_en[k]) take[alloc_preg[k]] = 1'b1;
  end

  assign alloc_ok = (nreq <= navail);

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < NPHYS; i++) free_cnt = free_cnt + (AW+1)'(!allocated_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) begin
        allocated_q[i] <= (i < NLOG);
        written_q[i]   <= (i < NLOG);
      end
    end else begin
      for (int i = 0; i < NPHYS; i++) begin
        if (take[i]) begin
          allocated_q[i] <= 1'b1;
          written_q[i]   <= 1'b0;
        end else if (free_mask[i]) begin
          allocated_q[i] <= 1'b0;
          written_q[i]   <= 1'b0;
        end
      end
      for (int w = 0; w < IW; w++)
        if (wb_valid[w] && allocated_q[wb_preg[w]]) written_q[wb_preg[w]] <= 1'b1;
    end
  end

  assign alloc_mask   = allocated_q;
  assign written_mask = written_q;

  // A result may only be written into a register that is mapped.
  for (genvar w = 0; w < IW; w++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      wb_valid[w] |-> allocated_q[wb_preg[w]]);
    assert property (@(posedge clk) disable iff (!rst_n)
      alloc_en[w] |-> alloc_req[w] && alloc_ok);
  end

endmodule

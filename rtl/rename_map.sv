// rename_map: speculative and committed logical-to-physical maps, each
// entry carrying a bank flag (0: value in RF2, 1: value in RF3).
//
// Rename: IW slots per cycle look up two logical sources each and map
// their logical destination to the RF2 register handed out by the RF2
// allocator. A source written by an earlier slot of the same group takes
// that slot's new register (flag RF2). New mappings always start in RF2.
//
// Transfer: when RF2 register p moves to RF3, every map entry that names
// p with flag RF2 has its flag set to RF3 (in both maps), as the
// documented scheme requires for the rename map table.
//
// Commit: IW slots per cycle, in program order. Each installs its mapping
// in the committed map and releases the mapping it replaces, exactly as a
// conventional file frees the previous register of the same logical
// destination. The released register is freed in the bank its committed
// flag names (cm_free2 / cm_free3). The caller says, per slot, whether the
// new register still belongs to the committing instruction in RF2
// (cm_inrf2); if not, the value has already moved to RF3.
//
// Flush: on a squash of all uncommitted instructions the speculative map
// is restored from the committed map. live2/live3 list the registers the
// committed map still uses, so the caller can release everything else.
// Keeping a committed map (rather than per-branch checkpoints) and
// recovering with a full flush are this design's choices.
//
// Timing: lookups are combinational; map updates at the clock edge. The
// caller must not commit or rename in a flush cycle.
module rename_map
  import tribank_pkg::*;
#(
  parameter int unsigned NLOG  = NLOG_DEF,
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned IW    = IW_DEF,
  localparam int unsigned AW   = $clog2(NPHYS),
  localparam int unsigned LW   = $clog2(NLOG)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // rename
  input  logic [IW-1:0]                 rn_valid,
  input  logic [IW-1:0][1:0][LW-1:0]    rn_lsrc,
  input  logic [IW-1:0]                 rn_dst_valid,
  input  logic [IW-1:0][LW-1:0]         rn_ldst,
  input  logic [IW-1:0][AW-1:0]         rn_pdst,
  output logic [IW-1:0][1:0][AW-1:0]    rn_psrc,
  output logic [IW-1:0][1:0]            rn_sflag,
  // transfer RF2 -> RF3
  input  logic [NPHYS-1:0]              xf_mask,
  // commit
  input  logic [IW-1:0]                 cm_valid,
  input  logic [IW-1:0][LW-1:0]         cm_ldst,
  input  logic [IW-1:0][AW-1:0]         cm_pdst,
  input  logic [IW-1:0]                 cm_inrf2,
  output logic [NPHYS-1:0]              cm_free2,
  output logic [NPHYS-1:0]              cm_free3,
  // recovery
  input  logic                          flush,
  output logic [NPHYS-1:0]              live2,
  output logic [NPHYS-1:0]              live3
);

  typedef struct packed {
    logic [AW-1:0] preg;
    logic          flag;
  } map_t;

  map_t smap_q [NLOG];
  map_t rmap_q [NLOG];
  map_t smap_d [NLOG];
  map_t rmap_c [NLOG];
  map_t rmap_d [NLOG];

  // Rename lookups with in-group forwarding.
  always_comb begin
    for (int k = 0; k < IW; k++)
      for (int s = 0; s < 2; s++) begin
        rn_psrc[k][s]  = smap_q[rn_lsrc[k][s]].preg;
        rn_sflag[k][s] = smap_q[rn_lsrc[k][s]].flag;
        for (int j = 0; j < k; j++)
          if (rn_valid[j] && rn_dst_valid[j] && rn_ldst[j] == rn_lsrc[k][s]) begin
            rn_psrc[k][s]  = rn_pdst[j];
            rn_sflag[k][s] = BANK_RF2;
          end
      end
  end

  // Commit: install and release, in slot order.
  always_comb begin
    cm_free2 = '0;
    cm_free3 = '0;
    for (int l = 0; l < NLOG; l++) rmap_c[l] = rmap_q[l];
    for (int k = 0; k < IW; k++)
      if (cm_valid[k]) begin
        if (rmap_c[cm_ldst[k]].flag == BANK_RF2) cm_free2[rmap_c[cm_ldst[k]].preg] = 1'b1;
        else                                     cm_free3[rmap_c[cm_ldst[k]].preg] = 1'b1;
        rmap_c[cm_ldst[k]].preg = cm_pdst[k];
        rmap_c[cm_ldst[k]].flag = cm_inrf2[k] ? BANK_RF2 : BANK_RF3;
      end
  end

  // Transfers of this cycle move committed mappings to RF3 as well.
  always_comb begin
    for (int l = 0; l < NLOG; l++) rmap_d[l] = rmap_c[l];
    for (int l = 0; l < NLOG; l++)
      if (rmap_d[l].flag == BANK_RF2 && xf_mask[rmap_d[l].preg]) rmap_d[l].flag = BANK_RF3;
  end

  always_comb begin
    for (int l = 0; l < NLOG; l++) smap_d[l] = smap_q[l];
    for (int l = 0; l < NLOG; l++)
      if (smap_d[l].flag == BANK_RF2 && xf_mask[smap_d[l].preg]) smap_d[l].flag = BANK_RF3;
    for (int k = 0; k < IW; k++)
      if (rn_valid[k] && rn_dst_valid[k]) begin
        smap_d[rn_ldst[k]].preg = rn_pdst[k];
        smap_d[rn_ldst[k]].flag = BANK_RF2;
      end
    if (flush)
      for (int l = 0; l < NLOG; l++) smap_d[l] = rmap_d[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLOG; l++) begin
        smap_q[l] <= '{preg: AW'(l), flag: BANK_RF2};
        rmap_q[l] <= '{preg: AW'(l), flag: BANK_RF2};
      end
    end else begin
      for (int l = 0; l < NLOG; l++) begin
        smap_q[l] <= smap_d[l];
        rmap_q[l] <= rmap_d[l];
      end
    end
  end

  always_comb begin
    live2 = '0;
    live3 = '0;
    for (int l = 0; l < NLOG; l++)
      if (rmap_q[l].flag == BANK_RF2) live2[rmap_q[l].preg] = 1'b1;
      else                            live3[rmap_q[l].preg] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) flush |-> cm_valid == '0 && rn_valid == '0);

endmodule
